// sphincs_f_tb: chain function F against the independent model, and a
// stuck-at fault inside a dual-rail checked adder that must raise err.
module sphincs_f_tb;
  import chacha_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done, err;
  logic [255:0] m, h;

  always #5 clk = ~clk;

  sphincs_f dut (.clk, .rst_n, .start, .m, .busy, .done, .h, .err);

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hash(input logic [255:0] v);
    @(negedge clk); m = v; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      logic [255:0] v;
      for (int w = 0; w < 8; w++) v[32*w +: 32] = $urandom;
      hash(v);
      checks++; if (h !== ref_f(v, 20)) failures++;
      checks++; if (err) failures++;
    end
    force dut.u_pi.g_qr[1].g_dr.u_qr.u_add2.s1[9] = 1'b1;
    for (int i = 0; i < 3; i++) begin
      logic [255:0] v;
      for (int w = 0; w < 8; w++) v[32*w +: 32] = $urandom;
      hash(v);
      checks++; if (!err) failures++;
    end
    release dut.u_pi.g_qr[1].g_dr.u_qr.u_add2.s1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
