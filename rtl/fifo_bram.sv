// fifo_bram -- FIFO buffer in block RAM with a last-free-block signal.
//
// A first-in first-out buffer of ITEMS words of DATA_WIDTH bits, meant for
// queuing data between the units of a network monitoring pipeline. Besides
// the usual EMPTY and FULL it raises LSTBLK when BLOCK_SIZE or fewer free
// items are left, so that a writer that produces data in blocks of
// BLOCK_SIZE words can tell whether one more whole block fits.
//
// Structure: fifo_bram_ctrl holds the read and write address registers, the
// free-item register and the flags; the storage is ceil(DATA_WIDTH /
// BRAM_TYPE) side-by-side bram_sdp columns, each BRAM_TYPE bits wide and
// ITEMS words deep (the columns' unused top bits are written as zero).
//
// Interface and timing (all on the rising edge of CLK):
//   WR/DI   - a word on DI is stored in a cycle with WR high and FULL low;
//             a write while FULL is ignored.
//   RD      - a read is taken in a cycle with RD high and EMPTY low; a read
//             while EMPTY is ignored.
//   DO/DV   - the word read appears on DO one cycle after the read is taken,
//             with DV high in that cycle; DO holds its value otherwise.
//   EMPTY   - high exactly when the FIFO holds no item.
//   FULL    - high exactly when the FIFO holds ITEMS items.
//   LSTBLK  - high exactly when ITEMS minus the item count is BLOCK_SIZE or
//             less.
//   RESET   - synchronous, active high; empties the FIFO.
// A read and a write may be taken in the same cycle. The flags are
// registered and change on the edge that ends the cycle of the operation.
//
// Following the description: the ports, their names and meaning, 16-bit
// data, the four parameters and the exact flag definitions. Own choices:
// ITEMS = 64 (six address bits), BLOCK_SIZE = 4, BRAM_TYPE as the data width
// of one block RAM column (18), one cycle of read latency, synchronous reset.
module fifo_bram #(
  parameter int unsigned ITEMS      = 64,
  parameter int unsigned BLOCK_SIZE = 4,
  parameter int unsigned BRAM_TYPE  = 18,
  parameter int unsigned DATA_WIDTH = 16
) (
  input  logic                  CLK,
  input  logic                  RESET,
  input  logic                  WR,
  input  logic [DATA_WIDTH-1:0] DI,
  input  logic                  RD,
  output logic [DATA_WIDTH-1:0] DO,
  output logic                  DV,
  output logic                  FULL,
  output logic                  EMPTY,
  output logic                  LSTBLK
);

  if (BRAM_TYPE < 1) begin : g_bad_bram_type
    $error("fifo_bram: BRAM_TYPE must be at least 1");
  end

  localparam int unsigned AW   = (ITEMS > 1) ? $clog2(ITEMS) : 1;
  localparam int unsigned NCOL = (DATA_WIDTH + BRAM_TYPE - 1) / BRAM_TYPE;
  localparam int unsigned PW   = NCOL * BRAM_TYPE;

  logic          wr_en, rd_en;
  logic [AW-1:0] waddr, raddr;

  fifo_bram_ctrl #(
    .ITEMS      (ITEMS),
    .BLOCK_SIZE (BLOCK_SIZE)
  ) u_ctrl (
    .clk      (CLK),
    .reset    (RESET),
    .wr       (WR),
    .rd       (RD),
    .wr_en    (wr_en),
    .waddr    (waddr),
    .rd_en    (rd_en),
    .raddr    (raddr),
    .cnt_diff (),
    .empty    (EMPTY),
    .full     (FULL),
    .lstblk   (LSTBLK)
  );

  // Data padded to a whole number of block RAM columns.
  logic [PW-1:0] wdata_pad, rdata_pad;
  assign wdata_pad = PW'(DI);

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    bram_sdp #(
      .WIDTH (BRAM_TYPE),
      .DEPTH (ITEMS)
    ) u_bram (
      .clk   (CLK),
      .reset (RESET),
      .we    (wr_en),
      .waddr (waddr),
      .wdata (wdata_pad[c*BRAM_TYPE +: BRAM_TYPE]),
      .re    (rd_en),
      .raddr (raddr),
      .rdata (rdata_pad[c*BRAM_TYPE +: BRAM_TYPE])
    );
  end

  assign DO = rdata_pad[DATA_WIDTH-1:0];

  always_ff @(posedge CLK) begin
    if (RESET) DV <= 1'b0;
    else       DV <= rd_en;
  end

  // DV is high only in the cycle after an accepted read.
  a_dv: assert property (@(posedge CLK) disable iff (RESET)
    DV |-> $past(rd_en));

endmodule
