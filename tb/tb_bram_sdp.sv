// tb_bram_sdp -- self-checking test of the block RAM column.
//
// Fills a 32 x 18 memory with random words, reads them back in random order
// and checks each word one cycle after its read, checks that rdata holds
// while re is low, that a read and a write of one address in one cycle
// return the old word, and that reset clears rdata.
module tb_bram_sdp;
  localparam int W = 18;
  localparam int D = 32;
  localparam int AW = $clog2(D);

  logic clk = 1'b0, reset = 1'b1;
  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] ref_mem [D];
  int checks = 0, failures = 0;

  bram_sdp #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_rdata(input logic [W-1:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("%0t %s: rdata=%h expected %h", $time, what, rdata, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 1'b0;
    expect_rdata('0, "after reset");
    // Write every address.
    for (int a = 0; a < D; a++) begin
      we = 1'b1; waddr = AW'(a); wdata = W'($urandom);
      ref_mem[a] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    // Random reads, each checked one cycle later; idle cycles in between.
    for (int i = 0; i < 200; i++) begin
      int a;
      a = $urandom_range(D - 1);
      re = 1'b1; raddr = AW'(a);
      @(negedge clk);
      re = 1'b0;
      raddr = AW'($urandom);
      expect_rdata(ref_mem[a], "read");
      repeat ($urandom_range(2)) begin
        @(negedge clk);
        expect_rdata(ref_mem[a], "hold");
      end
    end
    // Read and write of one address in one cycle: old word comes out.
    for (int i = 0; i < 20; i++) begin
      int a;
      a = $urandom_range(D - 1);
      we = 1'b1; re = 1'b1; waddr = AW'(a); raddr = AW'(a); wdata = W'($urandom);
      @(negedge clk);
      we = 1'b0; re = 1'b0;
      expect_rdata(ref_mem[a], "read-first");
      ref_mem[a] = wdata;
      re = 1'b1;
      @(negedge clk);
      re = 1'b0;
      expect_rdata(ref_mem[a], "new word");
    end
    reset = 1'b1;
    @(negedge clk);
    reset = 1'b0;
    expect_rdata('0, "reset clears rdata");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
