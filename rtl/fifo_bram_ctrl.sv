// fifo_bram_ctrl -- address and status logic of the block-RAM FIFO.
//
// The FIFO holds up to ITEMS words; the items are grouped in blocks of
// BLOCK_SIZE, and LSTBLK tells the writer that only the last free block
// (BLOCK_SIZE free items or fewer) is left. This module keeps the write and
// read address registers, which wrap from ITEMS-1 to 0, and a register
// cnt_diff holding the number of free items. A write is accepted in a cycle
// with wr high and full low; a read is accepted in a cycle with rd high and
// empty low; both may be accepted in the same cycle. cnt_diff and the three
// flags are registered and follow the accepted operations at the same clock
// edge, so in every cycle
//   empty  == (cnt_diff == ITEMS)
//   full   == (cnt_diff == 0)
//   lstblk == (cnt_diff <= BLOCK_SIZE)
// exactly. The last-block flag is computed by a full comparison of cnt_diff
// with BLOCK_SIZE. Deriving it from the block part of the addresses, or from
// the upper bits of cnt_diff alone, is cheaper but wrong by up to a block.
//
// Interface: wr_en/waddr and rd_en/raddr drive the memory. rd_en is the
// accepted read; the word appears on the memory output one cycle later.
// Timing: the flags change on the clock edge that ends the cycle in which an
// operation is accepted. Reset is synchronous and active high and empties
// the FIFO.
//
// Following the description: the port set, the free-item register
// cnt_diff and the exact definitions of EMPTY, FULL and LSTBLK. Own choices:
// synchronous reset, registered flags, ignoring a write while full and a
// read while empty.
module fifo_bram_ctrl #(
  parameter int unsigned ITEMS      = 64,
  parameter int unsigned BLOCK_SIZE = 4,
  localparam int unsigned AW        = (ITEMS > 1) ? $clog2(ITEMS) : 1,
  localparam int unsigned CW        = $clog2(ITEMS + 1)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          wr,
  input  logic          rd,
  output logic          wr_en,
  output logic [AW-1:0] waddr,
  output logic          rd_en,
  output logic [AW-1:0] raddr,
  output logic [CW-1:0] cnt_diff,
  output logic          empty,
  output logic          full,
  output logic          lstblk
);

  if (ITEMS < 2) begin : g_bad_items
    $error("fifo_bram_ctrl: ITEMS must be at least 2");
  end
  if (BLOCK_SIZE < 1 || BLOCK_SIZE > ITEMS) begin : g_bad_block
    $error("fifo_bram_ctrl: BLOCK_SIZE must lie in 1..ITEMS");
  end

  localparam logic [AW-1:0] LAST_ADDR  = AW'(ITEMS - 1);
  localparam logic [CW-1:0] ALL_FREE   = CW'(ITEMS);
  localparam logic [CW-1:0] BLOCK_FREE = CW'(BLOCK_SIZE);

  logic [CW-1:0] cnt_diff_next;

  assign wr_en = wr && !full;
  assign rd_en = rd && !empty;

  always_comb begin
    cnt_diff_next = cnt_diff;
    if (wr_en && !rd_en) cnt_diff_next = cnt_diff - 1'b1;
    if (rd_en && !wr_en) cnt_diff_next = cnt_diff + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      waddr    <= '0;
      raddr    <= '0;
      cnt_diff <= ALL_FREE;
      empty    <= 1'b1;
      full     <= 1'b0;
      lstblk   <= (ALL_FREE <= BLOCK_FREE);
    end else begin
      if (wr_en) waddr <= (waddr == LAST_ADDR) ? '0 : waddr + 1'b1;
      if (rd_en) raddr <= (raddr == LAST_ADDR) ? '0 : raddr + 1'b1;
      cnt_diff <= cnt_diff_next;
      empty    <= (cnt_diff_next == ALL_FREE);
      full     <= (cnt_diff_next == '0);
      lstblk   <= (cnt_diff_next <= BLOCK_FREE);
    end
  end

  // An accepted read and an accepted write never address the same item.
  a_no_same_addr: assert property (@(posedge clk) disable iff (reset)
    !(wr_en && rd_en && waddr == raddr));
  // The free-item count stays within 0..ITEMS.
  a_cnt_range: assert property (@(posedge clk) disable iff (reset)
    cnt_diff <= ALL_FREE);

endmodule
