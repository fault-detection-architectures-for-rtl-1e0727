// sc_csel_adder: self-checking carry-select adder with two-rail output.
//
// Two W-bit ripple-carry adders compute the sum of a and b with carry-in 0
// (s0, c0) and with carry-in 1 (s1, c1); the actual carry-in selects the
// result, as in a carry-select adder. Because s1 = s0 + 1, bit i of s1 must
// be the complement of XNOR(s0[i], s0[i-1] & ... & s0[0]), and the carry c1
// must equal c0 | &s0. These W+1 complementary pairs feed a two-rail checker;
// a fault in either ripple-carry adder breaks at least one pair. The
// structure (two ripple adders, XNOR against the cin=1 sum, two-pair
// two-rail checker) follows the article's self-checking adder; the exact
// pair equations are derived from s1 = s0 + 1. Purely combinational.
// chk is complementary ("01"/"10") when no error is detected.
module sc_csel_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout,
  output logic [1:0]   chk
);
  logic [W-1:0] s0, s1;
  logic         k0, k1;          // ripple carries
  logic [W:0][1:0] pairs;
  logic [W:0]   run_and;         // run_and[i] = &s0[i-1:0]

  always_comb begin
    k0 = 1'b0;
    k1 = 1'b1;
    for (int unsigned i = 0; i < W; i++) begin
      s0[i] = a[i] ^ b[i] ^ k0;
      k0    = (a[i] & b[i]) | (k0 & (a[i] ^ b[i]));
      s1[i] = a[i] ^ b[i] ^ k1;
      k1    = (a[i] & b[i]) | (k1 & (a[i] ^ b[i]));
    end
    s    = cin ? s1 : s0;
    cout = cin ? k1 : k0;
  end

  // Check pairs: XNOR(s0[i], &s0[i-1:0]) is the complement of s1[i].
  assign run_and[0] = 1'b1;
  for (genvar i = 0; i < W; i++) begin : g_pair
    assign run_and[i+1] = run_and[i] & s0[i];
    assign pairs[i]     = {~(s0[i] ^ run_and[i]), s1[i]};
  end
  assign pairs[W] = {~(k0 | run_and[W]), k1};

  two_rail_checker #(.NP(W + 1)) u_chk (.p(pairs), .z(chk));
endmodule
