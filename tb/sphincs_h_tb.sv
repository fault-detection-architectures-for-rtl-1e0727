// sphincs_h_tb: node hash H against the independent model on random
// inputs, latency of two permutations, and a stuck-at fault in the
// complementary quarter-round datapath that must raise err.
module sphincs_h_tb;
  import chacha_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done, err;
  logic [511:0] m;
  logic [255:0] h;

  always #5 clk = ~clk;

  sphincs_h dut (.clk, .rst_n, .start, .m, .busy, .done, .h, .err);

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hash(input logic [511:0] v, output int n);
    @(negedge clk); m = v; start = 1;
    @(negedge clk); start = 0; n = 1;
    while (!done) begin @(negedge clk); n++; end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5; i++) begin
      logic [511:0] v; int n;
      for (int w = 0; w < 16; w++) v[32*w +: 32] = $urandom;
      hash(v, n);
      checks++; if (h !== ref_h(v, 20)) failures++;
      checks++; if (err) failures++;
      checks++; if (n != 2 * (20 * 6 + 1) + 3) begin failures++; $display("latency %0d", n); end
    end
    force dut.u_pi.g_qr[0].g_comp.u_qr.g_step[3].x_o[0] = 1'b0;
    for (int i = 0; i < 3; i++) begin
      logic [511:0] v; int n;
      for (int w = 0; w < 16; w++) v[32*w +: 32] = $urandom;
      hash(v, n);
      checks++; if (!err) failures++;
    end
    release dut.u_pi.g_qr[0].g_comp.u_qr.g_step[3].x_o;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
