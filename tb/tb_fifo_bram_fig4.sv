// tb_fifo_bram_fig4 -- the "write until full with the reader stopped" case.
//
// A 16-item FIFO with blocks of 4 is brought to read address 1011 and write
// address 0100 (nine items inside, seven free); then the reader stays still
// while seven more words are written, one per clock, until the FIFO is full.
// A last-block flag derived from the block part of the addresses drops in
// the middle of this sequence and is low when FULL rises. This design must
// instead raise LSTBLK when the fourth-last free item remains and keep it
// high up to and including FULL. The test checks the address sequence, the
// flag in every cycle, and that the words come out in order afterwards.
module tb_fifo_bram_fig4;
  localparam int ITEMS = 16;
  localparam int BLOCK_SIZE = 4;
  localparam int DW = 16;

  logic clk = 1'b0, RESET = 1'b1, WR = 1'b0, RD = 1'b0;
  logic [DW-1:0] DI = '0, DO;
  logic DV, FULL, EMPTY, LSTBLK;
  int checks = 0, failures = 0;
  int free_items;

  fifo_bram #(.ITEMS(ITEMS), .BLOCK_SIZE(BLOCK_SIZE)) dut (.CLK(clk), .*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t %s", $time, what);
    end
  endtask

  task automatic write_word(input logic [DW-1:0] d);
    WR = 1'b1; DI = d;
    @(negedge clk);
    WR = 1'b0;
  endtask

  task automatic read_word(input logic [DW-1:0] exp);
    RD = 1'b1;
    @(negedge clk);
    RD = 1'b0;
    chk(DV && DO == exp, $sformatf("read DV=%0b DO=%h expected %h", DV, DO, exp));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    RESET = 1'b0;
    // Move both addresses to 1011 (11 words in and out).
    for (int i = 0; i < 11; i++) write_word(DW'(16'h0100 + i));
    for (int i = 0; i < 11; i++) read_word(DW'(16'h0100 + i));
    chk(EMPTY && !FULL && !LSTBLK, "empty after the first pass");
    // Nine words: the write address wraps to 0100, seven items stay free.
    for (int i = 0; i < 9; i++) write_word(DW'(16'h0200 + i));
    chk(dut.waddr == 4'b0100 && dut.raddr == 4'b1011, "addresses 0100 / 1011 at instant 1");
    // Seven writes with the reader stopped, checking every cycle.
    free_items = 7;
    for (int i = 0; i < 7; i++) begin
      chk(int'(dut.waddr) == (4 + i) % ITEMS, $sformatf("write address %b", dut.waddr));
      chk(dut.raddr == 4'b1011, "read address stays 1011");
      chk(LSTBLK == (free_items <= BLOCK_SIZE),
          $sformatf("LSTBLK=%0b with %0d free items", LSTBLK, free_items));
      chk(!FULL, "not full yet");
      write_word(DW'(16'h0200 + 9 + i));
      free_items--;
    end
    chk(dut.waddr == 4'b1011, "write address reaches 1011");
    chk(FULL && LSTBLK, $sformatf("at FULL, LSTBLK=%0b FULL=%0b", LSTBLK, FULL));
    // A further write is refused.
    write_word(16'hdead);
    chk(FULL && dut.waddr == 4'b1011, "write refused while full");
    // Drain: sixteen words in order; LSTBLK falls when five items are free.
    for (int i = 0; i < 16; i++) begin
      read_word(DW'(16'h0200 + i));
      chk(LSTBLK == (i + 1 <= BLOCK_SIZE), $sformatf("LSTBLK with %0d free", i + 1));
    end
    chk(EMPTY, "empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
