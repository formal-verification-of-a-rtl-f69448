// tb_fifo_bram_ctrl -- self-checking test of the FIFO address/flag logic.
//
// Drives random write and read requests through phases that favour filling,
// draining and mixed traffic, and compares every output in every cycle with
// a reference kept here: write and read addresses that wrap at ITEMS, the
// number of free items, accepted operations, and the EMPTY, FULL and LSTBLK
// flags defined from the free count. Default parameters (64 items, blocks
// of 4).
module tb_fifo_bram_ctrl;
  localparam int ITEMS = 64;
  localparam int BLOCK_SIZE = 4;
  localparam int AW = $clog2(ITEMS);
  localparam int CW = $clog2(ITEMS + 1);

  logic clk = 1'b0, reset = 1'b1, wr = 1'b0, rd = 1'b0;
  logic wr_en, rd_en, empty, full, lstblk;
  logic [AW-1:0] waddr, raddr;
  logic [CW-1:0] cnt_diff;
  int checks = 0, failures = 0;
  int m_waddr, m_raddr, m_free;
  int n_full = 0, n_empty = 0, n_lstblk = 0, n_both = 0, n_free_eq_block = 0;

  fifo_bram_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("%0t %s = %0d, expected %0d", $time, what, got, exp);
    end
  endtask

  // Compare all outputs with the reference (inputs already driven).
  task automatic compare();
    bit m_wr_en, m_rd_en;
    #1;  // let the combinational outputs settle
    m_wr_en = wr && (m_free != 0);
    m_rd_en = rd && (m_free != ITEMS);
    chk(int'(waddr), m_waddr, "waddr");
    chk(int'(raddr), m_raddr, "raddr");
    chk(int'(cnt_diff), m_free, "cnt_diff");
    chk(int'(empty), int'(m_free == ITEMS), "empty");
    chk(int'(full), int'(m_free == 0), "full");
    chk(int'(lstblk), int'(m_free <= BLOCK_SIZE), "lstblk");
    chk(int'(wr_en), int'(m_wr_en), "wr_en");
    chk(int'(rd_en), int'(m_rd_en), "rd_en");
    if (m_free == 0) n_full++;
    if (m_free == ITEMS) n_empty++;
    if (m_free <= BLOCK_SIZE) n_lstblk++;
    if (m_free == BLOCK_SIZE) n_free_eq_block++;
    if (m_wr_en && m_rd_en) n_both++;
  endtask

  task automatic step();
    bit m_wr_en, m_rd_en;
    m_wr_en = wr && (m_free != 0);
    m_rd_en = rd && (m_free != ITEMS);
    @(negedge clk);
    if (m_wr_en) begin m_waddr = (m_waddr + 1) % ITEMS; m_free--; end
    if (m_rd_en) begin m_raddr = (m_raddr + 1) % ITEMS; m_free++; end
  endtask

  initial begin
    m_waddr = 0; m_raddr = 0; m_free = ITEMS;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    for (int phase = 0; phase < 30; phase++) begin
      int pw, pr;
      case (phase % 3)
        0: begin pw = 90; pr = 20; end  // filling
        1: begin pw = 20; pr = 90; end  // draining
        default: begin pw = 60; pr = 60; end
      endcase
      repeat (200) begin
        wr = ($urandom_range(99) < pw);
        rd = ($urandom_range(99) < pr);
        compare();
        step();
      end
    end
    // Reset in the middle of traffic empties the FIFO.
    wr = 1'b1; rd = 1'b0;
    repeat (10) step();
    reset = 1'b1; wr = 1'b0;
    @(negedge clk);
    reset = 1'b0;
    m_waddr = 0; m_raddr = 0; m_free = ITEMS;
    compare();
    checks++;
    if (n_full == 0 || n_empty == 0 || n_lstblk == 0 || n_both == 0 || n_free_eq_block == 0) begin
      failures++;
      $display("coverage hole: full=%0d empty=%0d lstblk=%0d both=%0d free==block=%0d",
               n_full, n_empty, n_lstblk, n_both, n_free_eq_block);
    end
    $display("cycles full=%0d empty=%0d lstblk=%0d read+write=%0d", n_full, n_empty, n_lstblk, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
