// chacha_qr_dr: ChaCha quarter round whose four modular adders are
// self-checking carry-select adders (dual-rail checked).
//
// The quarter round is computed combinationally as in chacha_qr, but every
// 32-bit addition goes through sc_csel_adder with carry-in 0. The four
// two-rail check pairs are merged by one more two-rail checker; the quarter
// round is flagged when the final pair is not complementary. Only the
// adders are covered, as in the article; XORs and rotations are wiring and
// XOR gates without a check. Registering the result and the flag, and the
// valid handshake, are our choices.
//
// The adders' carry-outs (co) are left unused: ChaCha adds modulo 2^32.
//
// Timing: out_valid and out_q follow in_valid by one cycle; busy is always
// low (a new quarter round may start every cycle).
module chacha_qr_dr
  import chacha_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  qr_t  in_q,
  output logic busy,
  output logic out_valid,
  output qr_t  out_q,
  output logic err
);
  word_t s_a0, s_c0, s_a1, s_c1, d0, b0, d1, b1;
  logic [3:0][1:0] chk;
  logic [3:0]      co;
  logic [1:0]      z;

  sc_csel_adder #(.W(32)) u_add0 (.a(in_q.a), .b(in_q.b), .cin(1'b0), .s(s_a0), .cout(co[0]), .chk(chk[0]));
  assign d0 = rotl(in_q.d ^ s_a0, 16);
  sc_csel_adder #(.W(32)) u_add1 (.a(in_q.c), .b(d0),     .cin(1'b0), .s(s_c0), .cout(co[1]), .chk(chk[1]));
  assign b0 = rotl(in_q.b ^ s_c0, 12);
  sc_csel_adder #(.W(32)) u_add2 (.a(s_a0),   .b(b0),     .cin(1'b0), .s(s_a1), .cout(co[2]), .chk(chk[2]));
  assign d1 = rotl(d0 ^ s_a1, 8);
  sc_csel_adder #(.W(32)) u_add3 (.a(s_c0),   .b(d1),     .cin(1'b0), .s(s_c1), .cout(co[3]), .chk(chk[3]));
  assign b1 = rotl(b0 ^ s_c1, 7);

  two_rail_checker #(.NP(4)) u_chk (.p(chk), .z(z));

  assign busy = 1'b0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_q     <= '0;
      err       <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_q <= '{a: s_a1, b: b1, c: s_c1, d: d1};
        err   <= (z[1] == z[0]);
      end
    end
  end
endmodule
