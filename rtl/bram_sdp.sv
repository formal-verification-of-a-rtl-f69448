// bram_sdp -- one column of on-chip block RAM used as FIFO storage.
//
// A simple dual-port memory of DEPTH words of WIDTH bits, modelled on one
// data column of an FPGA block RAM: one write port and one read port sharing
// a clock. The write port stores wdata at waddr on a rising edge with we
// high. The read port is synchronous, as in a block RAM: with re high the
// word at raddr appears on rdata after the next rising edge, and rdata holds
// its value while re is low. A read and a write to the same address in the
// same cycle return the old word (read-first); the FIFO that uses this
// memory never does that.
//
// The FIFO built from it is described as sitting in block RAM; the
// port widths, the read latency of one cycle and the read-first behaviour
// are this design's choices. The memory has no reset, like the real macro;
// rdata is cleared by reset so that it never shows uninitialised contents.
module bram_sdp #(
  parameter int unsigned WIDTH = 18,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (reset)   rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end

endmodule
