// spongent_round_fd_tb: one permutation round for b = 88 and b = 136
// against the independent model; predicted parity of the output equal to
// its actual parity; err_par when the incoming parity is wrong; err_sbox
// when a counter XOR bit is stuck.
module spongent_round_fd_tb;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [87:0] s1, o1;
  logic [135:0] s2, o2;
  logic p1, p2, po1, po2, ep1, ep2, es1, es2;
  logic [5:0] c1;
  logic [6:0] c2;

  spongent_round_fd #(.B(88), .W(6)) u1 (.st(s1), .sp(p1), .cnt(c1), .st_o(o1), .sp_o(po1), .err_par(ep1), .err_sbox(es1));
  spongent_round_fd #(.B(136), .W(7)) u2 (.st(s2), .sp(p2), .cnt(c2), .st_o(o2), .sp_o(po2), .err_par(ep2), .err_sbox(es2));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits = 0;
    for (int i = 0; i < 300; i++) begin
      logic [255:0] r;
      s1 = {$urandom, $urandom, $urandom}; s2 = {$urandom, $urandom, $urandom, $urandom, $urandom};
      c1 = 6'($urandom); c2 = 7'($urandom);
      p1 = ^s1; p2 = ^s2;
      #1;
      r = sp_round(256'(s1), 88, 6, int'(c1));
      checks++; if (o1 !== r[87:0]) failures++;
      r = sp_round(256'(s2), 136, 7, int'(c2));
      checks++; if (o2 !== r[135:0]) failures++;
      checks++; if (po1 !== ^o1 || po2 !== ^o2) failures++;
      checks++; if (ep1 || ep2 || es1 || es2) failures++;
      p1 = ~p1; #1;
      checks++; if (!ep1) failures++;
    end
    // stuck counter-XOR output bit: S-box input parity check must fire
    force u1.st1[1] = 1'b0;
    for (int i = 0; i < 50; i++) begin
      s1 = {$urandom, $urandom, $urandom}; c1 = 6'($urandom); p1 = ^s1;
      #1;
      if ((s1[1] ^ c1[1]) == 1'b1) begin checks++; hits++; if (!es1) failures++; end
    end
    release u1.st1;
    checks++; if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
