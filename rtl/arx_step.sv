// arx_step: one add-xor-rotate step of the ChaCha quarter round, built so
// that the same hardware also computes the step's inverse.
//
// Forward (inv=0):  x' = x + y;  z' = (z ^ x') <<< ROT_F
// Inverse (inv=1):  z' = (z >>> ROT_I) ^ x;  x' = x - y
//
// The adder is an adder/subtractor: subtraction complements y and sets the
// carry-in to one (two's complement), as the article's complementary scheme
// prescribes. The rotation is reverted by a multiplexer between the two
// fixed rotations; in the inverse the rotation is applied before the XOR.
// The exact ordering of the inverse operations is our derivation from the
// forward step. Purely combinational.
module arx_step
  import chacha_pkg::*;
#(
  parameter int unsigned ROT_F = 16,  // rotation used in forward mode
  parameter int unsigned ROT_I = 7    // rotation undone in inverse mode
) (
  input  logic  inv,
  input  word_t x,
  input  word_t y,
  input  word_t z,
  output word_t x_o,
  output word_t z_o
);
  word_t y_op, sum;

  always_comb begin
    y_op = inv ? ~y : y;
    sum  = x + y_op + word_t'(inv);      // adder/subtractor
    x_o  = sum;
    if (!inv) z_o = rotl(z ^ sum, ROT_F);
    else      z_o = rotr(z, ROT_I) ^ x;  // x here is the step's output value
  end
endmodule
