// sync_fifo: small synchronous FIFO of whole records (used for the cell FIFO
// between the segmentator and the ATM driver).
//
// Storage is a register array of DEPTH entries of type T with read and write
// pointers one bit wider than the address. push is ignored when full, pop
// when empty. dout shows the oldest entry whenever `valid` is high (first-word
// fall-through), so a consumer can use valid/pop as a ready/valid pair. One
// push and one pop can happen in the same cycle. The depth is this design's
// choice; the unit only needs a few cells of slack in front of the driver.
module sync_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     din,
  output logic full,
  input  logic pop,
  output T     dout,
  output logic valid
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T mem [DEPTH];
  logic [AW:0] wp, rp;

  assign valid = (wp != rp);
  assign full  = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);
  assign dout  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wp[AW-1:0]] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (push && !full) wp <= wp + 1'b1;
      if (pop && valid)  rp <= rp + 1'b1;
    end
  end

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("sync_fifo: DEPTH must be a power of two");
endmodule
