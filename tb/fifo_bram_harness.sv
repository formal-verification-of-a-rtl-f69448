// fifo_bram_harness -- one FIFO configuration under random traffic.
//
// Instantiates fifo_bram with the given parameters, drives random traffic
// in filling, draining and mixed phases, checks every word read against a
// reference queue and every flag against fifo_env_model, and checks that
// FULL, EMPTY and LSTBLK are each reached again from every phase (the FIFO
// can always become full, empty and reach its last block). Reports its
// counts and raises done when finished.
module fifo_bram_harness #(
  parameter int unsigned ITEMS      = 16,
  parameter int unsigned BLOCK_SIZE = 4,
  parameter int unsigned BRAM_TYPE  = 18,
  parameter int unsigned DATA_WIDTH = 16,
  parameter int unsigned PHASES     = 12
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  logic RESET = 1'b1, WR = 1'b0, RD = 1'b0;
  logic [DATA_WIDTH-1:0] DI = '0, DO;
  logic DV, FULL, EMPTY, LSTBLK;

  fifo_bram #(.ITEMS(ITEMS), .BLOCK_SIZE(BLOCK_SIZE), .BRAM_TYPE(BRAM_TYPE),
              .DATA_WIDTH(DATA_WIDTH)) dut (.CLK(clk), .*);

  int env_counter, env_checks, env_failures, env_full, env_empty, env_lstblk;
  fifo_env_model #(.ITEMS(ITEMS), .BLOCK_SIZE(BLOCK_SIZE)) env (
    .clk(clk), .reset(RESET), .wr(WR), .rd(RD), .empty(EMPTY), .full(FULL),
    .lstblk(LSTBLK), .counter(env_counter), .checks(env_checks),
    .failures(env_failures), .n_full(env_full), .n_empty(env_empty),
    .n_lstblk(env_lstblk));

  logic [DATA_WIDTH-1:0] q[$];
  logic [DATA_WIDTH-1:0] exp_word;
  bit exp_dv = 1'b0;
  int my_checks = 0, my_failures = 0;

  assign checks   = my_checks + env_checks;
  assign failures = my_failures + env_failures;

  task automatic chk(input bit ok, input string what);
    my_checks++;
    if (!ok) begin
      my_failures++;
      if (my_failures <= 5)
        $display("%0t [ITEMS=%0d BLOCK_SIZE=%0d BRAM_TYPE=%0d DATA_WIDTH=%0d] %s",
                 $time, ITEMS, BLOCK_SIZE, BRAM_TYPE, DATA_WIDTH, what);
    end
  endtask

  always @(posedge clk) begin
    bit w, r;
    if (RESET) begin
      q.delete();
      exp_dv = 1'b0;
    end else begin
      chk(DV == exp_dv, "DV");
      if (exp_dv) chk(DO == exp_word, $sformatf("DO=%h expected %h", DO, exp_word));
      w = WR && (q.size() < int'(ITEMS));
      r = RD && (q.size() > 0);
      exp_dv = r;
      if (r) exp_word = q.pop_front();
      if (w) q.push_back(DI);
    end
  end

  initial begin
    done = 1'b0;
    repeat (2) @(negedge clk);
    RESET = 1'b0;
    for (int phase = 0; phase < int'(PHASES); phase++) begin
      int pw, pr, f0, e0, l0;
      f0 = env_full; e0 = env_empty; l0 = env_lstblk;
      case (phase % 3)
        0: begin pw = 85; pr = 25; end
        1: begin pw = 25; pr = 85; end
        default: begin pw = 65; pr = 65; end
      endcase
      repeat (8 * ITEMS + 40) begin
        @(negedge clk);
        WR = ($urandom_range(99) < pw);
        RD = ($urandom_range(99) < pr);
        DI = DATA_WIDTH'({$urandom, $urandom});
      end
      // From wherever this phase left the FIFO, it can still become full
      // (and so reach its last block) and then empty.
      @(negedge clk);
      WR = 1'b1; RD = 1'b0;
      repeat (ITEMS + 1) @(negedge clk);
      WR = 1'b0; RD = 1'b1;
      repeat (ITEMS + 2) @(negedge clk);
      RD = 1'b0;
      @(negedge clk);
      chk(env_full > f0, "FULL reached");
      chk(env_lstblk > l0, "LSTBLK reached");
      chk(env_empty > e0, "EMPTY reached");
    end
    done = 1'b1;
  end
endmodule
