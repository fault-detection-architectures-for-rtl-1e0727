// arx_step_tb: forward step against the ChaCha step definition, and
// inverse mode undoing the forward step, on random words.
module arx_step_tb;
  int checks = 0, failures = 0;
  logic inv;
  logic [31:0] x, y, z, xo, zo, x1, z1;

  arx_step #(.ROT_F(12), .ROT_I(12)) dut (.inv, .x, .y, .z, .x_o(xo), .z_o(zo));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] ex, ez, x0, z0;
      x0 = $urandom; y = $urandom; z0 = $urandom;
      inv = 0; x = x0; z = z0; #1;
      ex = x0 + y; ez = ((z0 ^ ex) << 12) | ((z0 ^ ex) >> 20);
      checks++;
      if (xo !== ex || zo !== ez) failures++;
      x1 = xo; z1 = zo;
      inv = 1; x = x1; z = z1; #1;
      checks++;
      if (xo !== x0 || zo !== z0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
