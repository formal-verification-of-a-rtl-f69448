// tb_fifo_bram_params -- the FIFO over a range of parameter combinations.
//
// Runs fifo_bram_harness for FIFO depths of 8 to 64 items, block sizes from
// 1 item to the whole FIFO, block RAM column widths of 1, 2, 4, 9, 18 and 36
// bits (several columns side by side where the word is wider than a column)
// and data widths of 8, 16 and 32 bits, including depths and block sizes
// that are not powers of two. All run in parallel on one clock.
module tb_fifo_bram_params;
  localparam int N = 10;
  logic clk = 1'b0;
  int   c[N], f[N];
  logic d[N];
  int   checks, failures;

  always #5 clk = ~clk;

  fifo_bram_harness #(.ITEMS(64), .BLOCK_SIZE(4),  .BRAM_TYPE(18), .DATA_WIDTH(16)) h0 (clk, c[0], f[0], d[0]);
  fifo_bram_harness #(.ITEMS(16), .BLOCK_SIZE(4),  .BRAM_TYPE(18), .DATA_WIDTH(16)) h1 (clk, c[1], f[1], d[1]);
  fifo_bram_harness #(.ITEMS(32), .BLOCK_SIZE(8),  .BRAM_TYPE(9),  .DATA_WIDTH(16)) h2 (clk, c[2], f[2], d[2]);
  fifo_bram_harness #(.ITEMS(16), .BLOCK_SIZE(1),  .BRAM_TYPE(1),  .DATA_WIDTH(8))  h3 (clk, c[3], f[3], d[3]);
  fifo_bram_harness #(.ITEMS(16), .BLOCK_SIZE(2),  .BRAM_TYPE(2),  .DATA_WIDTH(8))  h4 (clk, c[4], f[4], d[4]);
  fifo_bram_harness #(.ITEMS(64), .BLOCK_SIZE(16), .BRAM_TYPE(4),  .DATA_WIDTH(16)) h5 (clk, c[5], f[5], d[5]);
  fifo_bram_harness #(.ITEMS(32), .BLOCK_SIZE(4),  .BRAM_TYPE(36), .DATA_WIDTH(32)) h6 (clk, c[6], f[6], d[6]);
  fifo_bram_harness #(.ITEMS(8),  .BLOCK_SIZE(8),  .BRAM_TYPE(18), .DATA_WIDTH(16)) h7 (clk, c[7], f[7], d[7]);
  fifo_bram_harness #(.ITEMS(24), .BLOCK_SIZE(5),  .BRAM_TYPE(18), .DATA_WIDTH(16)) h8 (clk, c[8], f[8], d[8]);
  fifo_bram_harness #(.ITEMS(20), .BLOCK_SIZE(3),  .BRAM_TYPE(9),  .DATA_WIDTH(32)) h9 (clk, c[9], f[9], d[9]);

  initial begin
    #3000000;
    failures = 1;
    foreach (f[i]) failures += f[i];
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, failures);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      foreach (d[i]) if (!d[i]) all_done = 1'b0;
    end while (!all_done);
    checks = 0; failures = 0;
    foreach (c[i]) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
