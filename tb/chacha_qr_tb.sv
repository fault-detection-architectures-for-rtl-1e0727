// chacha_qr_tb: checks the combinational quarter round against the
// published ChaCha quarter-round test vector and against an independent
// model on random inputs.
module chacha_qr_tb;
  import chacha_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  qr_t in_q, out_q;

  chacha_qr dut (.in_q, .out_q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_q = '{a: 32'h11111111, b: 32'h01020304, c: 32'h9b8d6f43, d: 32'h01234567};
    #1;
    checks++;
    if (out_q !== '{a: 32'hea2a92f4, b: 32'hcb1cf8ce, c: 32'h4581472e, d: 32'h5881c4bb}) begin
      failures++; $display("vector mismatch %h", out_q);
    end
    for (int i = 0; i < 2000; i++) begin
      in_q = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (out_q !== qr_t'(qr128(in_q))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
