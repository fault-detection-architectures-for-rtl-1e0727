// gap_adder_tb: plain addition, and addition of operands rotated by K whose
// back-rotated sum must equal the plain modular sum.
module gap_adder_tb;
  localparam int K = 16;
  int checks = 0, failures = 0;
  logic enc;
  logic [31:0] x, y, s;

  gap_adder #(.K(K)) dut (.enc, .x, .y, .s);

  function automatic logic [31:0] rotl(input logic [31:0] v, input int r);
    return (v << r) | (v >> (32 - r));
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] a, b;
      a = $urandom; b = $urandom;
      if (i % 4 == 0) begin a = 32'hFFFF_FFFF; end   // long carry chains
      enc = 0; x = a; y = b; #1;
      checks++; if (s !== a + b) failures++;
      enc = 1; x = rotl(a, K); y = rotl(b, K); #1;
      checks++; if (rotl(s, 32 - K) !== a + b) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
