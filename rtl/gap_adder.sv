// gap_adder: 32-bit modular adder that also adds operands rotated left by K.
//
// Rotating both operands by K moves the original bit 0 to position K and
// the original bit 31 to position K-1. A rotated addition therefore needs
// its carry chain to start at position K, run to the top, wrap around to
// position 0 and stop after position K-1, where the carry out of the
// original most significant bit must be thrown away. The adder models the
// article's construction: a zero cell is inserted between positions K-1 and
// K, the carry wraps around the 33-cell ring, the zero cell absorbs the
// original carry-out and its sum bit (the "middle bit") is discarded.
// For plain operands (enc=0) the chain starts at position 0 and the carry
// passes the inserted cell unchanged, so one adder serves both runs (our
// choice). The ring is cut at a different place in each mode, so there is
// no combinational loop. Purely combinational.
module gap_adder #(
  parameter int unsigned K = 16   // rotation amount, 1..31
) (
  input  logic        enc,
  input  logic [31:0] x,
  input  logic [31:0] y,
  output logic [31:0] s
);
  logic [K-1:0]    s_lo;
  logic [31-K:0]   s_hi;
  logic            c_lo, c_hi;

  always_comb begin
    if (!enc) begin
      // plain: low cells, inserted cell propagates, high cells
      {c_lo, s_lo} = {1'b0, x[K-1:0]} + {1'b0, y[K-1:0]};
      // inserted cell (operand bits 1 and 0) passes c_lo on unchanged
      {c_hi, s_hi} = {1'b0, x[31:K]} + {1'b0, y[31:K]} + (32-K+1)'(c_lo);
    end else begin
      // rotated: start above the inserted zero, wrap around, stop in it
      {c_hi, s_hi} = {1'b0, x[31:K]} + {1'b0, y[31:K]};
      {c_lo, s_lo} = {1'b0, x[K-1:0]} + {1'b0, y[K-1:0]} + (K+1)'(c_hi);
      // c_lo is the carry-out of original bit 31: absorbed by the zero cell
    end
    s = {s_hi, s_lo};
  end
endmodule
