// tb_fifo_bram -- end-to-end test of the block-RAM FIFO at its default size.
//
// Runs random write/read traffic in phases that fill, drain and mix, with
// every parameter at its default (64 items of 16 bits, blocks of 4). A queue
// here is the reference for the data: every word that leaves on DO must be
// the oldest word written and not yet read, and DV must be high exactly one
// cycle after each accepted read. fifo_env_model checks EMPTY, FULL and
// LSTBLK against its own item count in every cycle. The test counts how
// often each mechanism happens -- a write refused while FULL, a read refused
// while EMPTY, a read and a write in one cycle, LSTBLK rising and falling,
// the addresses wrapping, a reset with data inside -- and fails if one never
// does.
module tb_fifo_bram;
  localparam int ITEMS = 64;
  localparam int BLOCK_SIZE = 4;
  localparam int DW = 16;

  logic clk = 1'b0, RESET = 1'b1, WR = 1'b0, RD = 1'b0;
  logic [DW-1:0] DI = '0, DO;
  logic DV, FULL, EMPTY, LSTBLK;
  int checks = 0, failures = 0;

  fifo_bram dut (.CLK(clk), .*);

  int env_counter, env_checks, env_failures, env_full, env_empty, env_lstblk;
  fifo_env_model #(.ITEMS(ITEMS), .BLOCK_SIZE(BLOCK_SIZE)) env (
    .clk(clk), .reset(RESET), .wr(WR), .rd(RD), .empty(EMPTY), .full(FULL),
    .lstblk(LSTBLK),
    .counter(env_counter), .checks(env_checks), .failures(env_failures),
    .n_full(env_full), .n_empty(env_empty), .n_lstblk(env_lstblk));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + env_checks, failures + env_failures);
    $finish;
  end

  logic [DW-1:0] q[$];
  logic [DW-1:0] exp_word;
  bit exp_dv = 1'b0;
  int n_wr_refused = 0, n_rd_refused = 0, n_both = 0, n_lst_rise = 0, n_lst_fall = 0;
  int n_writes = 0, n_reads = 0, n_reset_full = 0;
  logic lst_prev = 1'b0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("%0t %s", $time, what);
    end
  endtask

  // Reference: decided from the inputs and flags before the edge, checked
  // against DO/DV after it.
  always @(posedge clk) begin
    bit w, r;
    if (RESET) begin
      if (q.size() > 0) n_reset_full++;
      q.delete();
      exp_dv = 1'b0;
    end else begin
      chk(DV == exp_dv, $sformatf("DV=%0b expected %0b", DV, exp_dv));
      if (exp_dv) chk(DO == exp_word, $sformatf("DO=%h expected %h", DO, exp_word));
      w = WR && (q.size() < ITEMS);
      r = RD && (q.size() > 0);
      if (WR && !w) n_wr_refused++;
      if (RD && !r) n_rd_refused++;
      if (w && r) n_both++;
      if (LSTBLK && !lst_prev) n_lst_rise++;
      if (!LSTBLK && lst_prev) n_lst_fall++;
      lst_prev = LSTBLK;
      exp_dv = r;
      if (r) begin exp_word = q.pop_front(); n_reads++; end
      if (w) begin q.push_back(DI); n_writes++; end
    end
  end

  task automatic traffic(input int cycles, input int pw, input int pr);
    repeat (cycles) begin
      @(negedge clk);
      WR = ($urandom_range(99) < pw);
      RD = ($urandom_range(99) < pr);
      DI = DW'($urandom);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    RESET = 1'b0;
    for (int phase = 0; phase < 24; phase++) begin
      case (phase % 3)
        0: traffic(300, 90, 25);
        1: traffic(300, 25, 90);
        default: traffic(300, 70, 70);
      endcase
      if (phase == 12) begin
        // Reset with data inside.
        traffic(20, 100, 0);
        @(negedge clk);
        RESET = 1'b1; WR = 1'b0; RD = 1'b0;
        @(negedge clk);
        RESET = 1'b0;
      end
    end
    @(negedge clk);
    WR = 1'b0; RD = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_wr_refused == 0 || n_rd_refused == 0 || n_both == 0 || n_lst_rise == 0 ||
        n_lst_fall == 0 || n_writes <= ITEMS || n_reset_full == 0 || env_full == 0 ||
        env_empty == 0 || env_lstblk == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("writes=%0d reads=%0d write refused (FULL)=%0d read refused (EMPTY)=%0d",
             n_writes, n_reads, n_wr_refused, n_rd_refused);
    $display("read+write in one cycle=%0d LSTBLK rises=%0d falls=%0d resets with data=%0d",
             n_both, n_lst_rise, n_lst_fall, n_reset_full);
    $display("cycles FULL=%0d EMPTY=%0d LSTBLK=%0d", env_full, env_empty, env_lstblk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + env_checks, failures + env_failures);
    $finish;
  end
endmodule
