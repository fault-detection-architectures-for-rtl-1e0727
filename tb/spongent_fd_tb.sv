// spongent_fd_tb: SPONGENT-88/80/8 and SPONGENT-128/128/8 digests of random
// messages against the independent model; ROUNDS cycles per absorbed block;
// no false alarm; detection of a stuck-at on the state register and of a
// stuck S-box data bit, with the flag cleared on the next message.
module spongent_fd_tb;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  always #5 clk = ~clk;

  logic v1 = 0, l1 = 0, r1, hv1, e1;
  logic [7:0] d1;
  logic [87:0] h1;
  logic [2:0] f1;
  spongent_fd u1 (.clk, .rst_n, .m_valid(v1), .m_ready(r1), .m_data(d1), .m_last(l1),
                  .h_valid(hv1), .h(h1), .err_flags(f1), .err(e1));

  logic v2 = 0, l2 = 0, r2, hv2, e2;
  logic [7:0] d2;
  logic [127:0] h2;
  logic [2:0] f2;
  spongent_fd #(.B(136), .NH(128), .R(8), .ROUNDS(70), .CW(7), .CINIT(7'h7A), .CTAPS(7'h60)) u2 (
    .clk, .rst_n, .m_valid(v2), .m_ready(r2), .m_data(d2), .m_last(l2),
    .h_valid(hv2), .h(h2), .err_flags(f2), .err(e2));

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // hash msg on engine 1 (sel=0) or 2; returns the cycles between blocks
  task automatic hash(input int sel, input logic [7:0] msg [], output int gap);
    int t0, t;
    gap = 0;
    foreach (msg[i]) begin
      t = 0;
      while (!(sel == 0 ? r1 : r2)) begin @(negedge clk); t++; end
      if (i > 0) gap = t + 1;
      if (sel == 0) begin d1 = msg[i]; l1 = (i == msg.size() - 1); v1 = 1; end
      else          begin d2 = msg[i]; l2 = (i == msg.size() - 1); v2 = 1; end
      @(negedge clk); v1 = 0; v2 = 0;
    end
    while (!(sel == 0 ? hv1 : hv2)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      logic [7:0] msg [];
      logic [255:0] ex;
      int gap;
      msg = new[1 + $urandom_range(4)];
      foreach (msg[i]) msg[i] = 8'($urandom);
      hash(t % 2, msg, gap);
      if (t % 2 == 0) begin
        ex = sp_hash(msg, 88, 88, 6, 5, 45);
        checks++; if (h1 !== ex[87:0]) begin failures++; $display("88 mismatch"); end
        checks++; if (e1) failures++;
        if (msg.size() > 1) begin checks++; if (gap != 45) begin failures++; $display("gap %0d", gap); end end
      end else begin
        ex = sp_hash(msg, 136, 128, 7, 'h7A, 70);
        checks++; if (h2 !== ex[127:0]) begin failures++; $display("128 mismatch"); end
        checks++; if (e2) failures++;
        if (msg.size() > 1) begin checks++; if (gap != 70) failures++; end
      end
    end
    // state-register stuck-at: caught by the predicted/actual parity check
    begin
      logic [7:0] msg [];
      int gap;
      msg = new[2]; msg[0] = 8'h5A; msg[1] = 8'hC3;
      force u1.s[40] = 1'b1;
      hash(0, msg, gap);
      release u1.s;
      checks++; if (!f1[1]) begin failures++; $display("reg fault f1=%b", f1); end
      // stuck S-box table data bit: caught by the stored output parity
      force u2.u_round.g_sb[7].u_sb.e[6] = 1'b0;
      hash(1, msg, gap);
      release u2.u_round.g_sb[7].u_sb.e;
      checks++; if (!f2[0]) begin failures++; $display("sbox fault f2=%b", f2); end
      // the forced bit leaves an upset in the register: the next message
      // still sees it; the one after that is clean again
      hash(0, msg, gap);
      hash(0, msg, gap);
      checks++; if (e1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
