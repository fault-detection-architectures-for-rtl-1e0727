// two_rail_checker_tb: all-complementary inputs give a complementary
// output; any single non-complementary pair gives a non-complementary one.
module two_rail_checker_tb;
  localparam int NP = 5;
  int checks = 0, failures = 0;
  logic [NP-1:0][1:0] p;
  logic [1:0] z;

  two_rail_checker #(.NP(NP)) dut (.p, .z);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << NP); v++) begin
      for (int i = 0; i < NP; i++) p[i] = v[i] ? 2'b10 : 2'b01;
      #1; checks++; if (z[1] == z[0]) failures++;
      for (int e = 0; e < NP; e++) begin
        logic [1:0] keep = p[e];
        p[e] = v[e+1] ? 2'b11 : 2'b00;
        #1; checks++; if (z[1] != z[0]) failures++;
        p[e] = keep;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
