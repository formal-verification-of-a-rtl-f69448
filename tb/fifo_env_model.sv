// fifo_env_model -- observer of a FIFO's flags, used by the FIFO testbenches.
//
// Watches the handshake of a FIFO from outside and keeps its own count of
// the items in it: an item is written in a cycle with wr high and full low,
// and read in a cycle with rd high and empty low. The registers plus and
// minus record, one cycle later, that a write or a read went through. At
// every rising clock edge outside reset it checks that
//   full   is high exactly when counter == ITEMS,
//   empty  is high exactly when counter == 0,
//   lstblk is high exactly when ITEMS - counter <= BLOCK_SIZE,
//   lstblk is low when more than two blocks are free,
//   lstblk is high when less than one block is free,
//   the counter stays within 0..ITEMS,
// and it counts how often the FIFO was full, empty and in its last block.
// Inputs must be stable around the rising edge (drive them on the falling
// edge).
module fifo_env_model #(
  parameter int unsigned ITEMS      = 64,
  parameter int unsigned BLOCK_SIZE = 4
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          wr,
  input  logic          rd,
  input  logic          empty,
  input  logic          full,
  input  logic          lstblk,
  output int            counter,
  output int            checks,
  output int            failures,
  output int            n_full,
  output int            n_empty,
  output int            n_lstblk
);

  logic plus, minus;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10)
        $display("%0t env: %s violated (counter=%0d empty=%0b full=%0b lstblk=%0b)",
                 $time, what, counter, empty, full, lstblk);
    end
  endtask

  initial begin
    counter = 0; checks = 0; failures = 0;
    n_full = 0; n_empty = 0; n_lstblk = 0;
    plus = 1'b0; minus = 1'b0;
  end

  always @(posedge clk) begin
    if (reset) begin
      counter = 0;
      plus    = 1'b0;
      minus   = 1'b0;
    end else begin
      check(full  == (counter == int'(ITEMS)), "FULL iff counter = ITEMS");
      check(empty == (counter == 0),           "EMPTY iff counter = 0");
      check(lstblk == (int'(ITEMS) - counter <= int'(BLOCK_SIZE)),
            "LSTBLK iff free items <= BLOCK_SIZE");
      if (int'(ITEMS) - counter > 2 * int'(BLOCK_SIZE))
        check(!lstblk, "LSTBLK low with more than two blocks free");
      if (int'(ITEMS) - counter < int'(BLOCK_SIZE))
        check(lstblk, "LSTBLK high with less than one block free");
      check(counter <= int'(ITEMS) && counter >= 0, "counter within 0..ITEMS");
      if (full)   n_full++;
      if (empty)  n_empty++;
      if (lstblk) n_lstblk++;
      plus  = wr && !full;
      minus = rd && !empty;
      counter = counter + int'(plus) - int'(minus);
    end
  end

endmodule
