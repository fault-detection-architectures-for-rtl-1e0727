// chacha_qr: the unprotected ChaCha quarter round G(a,b,c,d) as one
// combinational block of four add/xor/rotate steps (rotations 16, 12, 8, 7),
// exactly the function defined in the article's ChaCha description. It is
// the reference structure that the error-detection schemes wrap or modify.
// Interface: in_q -> out_q, purely combinational, no clock.
module chacha_qr
  import chacha_pkg::*;
(
  input  qr_t in_q,
  output qr_t out_q
);
  word_t a0, b0, c0, d0, a1, b1, c1, d1;

  always_comb begin
    a0 = in_q.a + in_q.b;  d0 = rotl(in_q.d ^ a0, 16);
    c0 = in_q.c + d0;      b0 = rotl(in_q.b ^ c0, 12);
    a1 = a0 + b0;          d1 = rotl(d0 ^ a1, 8);
    c1 = c0 + d1;          b1 = rotl(b0 ^ c1, 7);
    out_q = '{a: a1, b: b1, c: c1, d: d1};
  end
endmodule
