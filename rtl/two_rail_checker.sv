// two_rail_checker: reduces NP two-rail pairs to one pair.
//
// Each input pair (p[i][1], p[i][0]) is complementary ("01" or "10") in a
// fault-free circuit. The reduction uses the two-pair two-rail cell
//   z0 = a0&b0 | a1&b1,  z1 = a0&b1 | a1&b0,
// whose output is complementary exactly when both input pairs are. The cells
// are arranged as a chain; a balanced tree would be logically the same. The
// article names the two-pair two-rail checker; the cell equations and the
// arrangement are the standard ones. Purely combinational; the circuit is in
// error when z[1] == z[0].
module two_rail_checker #(
  parameter int unsigned NP = 8
) (
  input  logic [NP-1:0][1:0] p,
  output logic [1:0]         z
);
  logic [1:0] acc;
  always_comb begin
    acc = p[0];
    for (int unsigned i = 1; i < NP; i++) begin
      acc = { (acc[0] & p[i][1]) | (acc[1] & p[i][0]),
              (acc[0] & p[i][0]) | (acc[1] & p[i][1]) };
    end
    z = acc;
  end
endmodule
