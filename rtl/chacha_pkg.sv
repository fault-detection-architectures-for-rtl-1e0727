// chacha_pkg: types and constants shared by the ChaCha quarter-round
// datapaths and the permutation core.
//
// A quarter round G(a,b,c,d) works on four 32-bit words with four
// add/xor/rotate steps: a+=b, d=(d^a)<<<16; c+=d, b=(b^c)<<<12;
// a+=b, d=(d^a)<<<8; c+=d, b=(b^c)<<<7. The package gives the word and
// quarter-round types, the rotation amounts, a reference function used by
// the testbenches, and the enumeration that selects the error-detection
// scheme wrapped around each quarter round. The scheme list (original,
// complementary, recomputing with encoded operands, dual-rail checked
// adders) follows the article; the encoding of the enumeration is ours.
package chacha_pkg;

  typedef logic [31:0] word_t;

  typedef struct packed {
    word_t a;
    word_t b;
    word_t c;
    word_t d;
  } qr_t;

  // Full 512-bit ChaCha state, word 0 in the least significant position.
  typedef logic [15:0][31:0] state_t;

  typedef enum logic [1:0] {
    QR_ORIG = 2'd0,  // unprotected quarter round
    QR_COMP = 2'd1,  // forward + embedded inverse, compare with input
    QR_REEO = 2'd2,  // recompute with rotated operands
    QR_DR   = 2'd3   // self-checking carry-select adders
  } qr_scheme_e;

  // Rotation of step 0..3 of the quarter round.
  localparam int unsigned QR_ROT [4] = '{16, 12, 8, 7};

  function automatic word_t rotl(input word_t x, input int unsigned r);
    return (r == 0) ? x : ((x << r) | (x >> (32 - r)));
  endfunction

  function automatic word_t rotr(input word_t x, input int unsigned r);
    return (r == 0) ? x : ((x >> r) | (x << (32 - r)));
  endfunction

  // Reference quarter round (testbench model and documentation).
  function automatic qr_t qr_ref(input qr_t q);
    qr_t t = q;
    t.a = t.a + t.b; t.d = rotl(t.d ^ t.a, 16);
    t.c = t.c + t.d; t.b = rotl(t.b ^ t.c, 12);
    t.a = t.a + t.b; t.d = rotl(t.d ^ t.a, 8);
    t.c = t.c + t.d; t.b = rotl(t.b ^ t.c, 7);
    return t;
  endfunction

  function automatic qr_t qr_rotl(input qr_t q, input int unsigned r);
    return '{a: rotl(q.a, r), b: rotl(q.b, r), c: rotl(q.c, r), d: rotl(q.d, r)};
  endfunction

  function automatic qr_t qr_rotr(input qr_t q, input int unsigned r);
    return '{a: rotr(q.a, r), b: rotr(q.b, r), c: rotr(q.c, r), d: rotr(q.d, r)};
  endfunction

  // Word indices of quarter round g (0..3) in a column (even) or
  // diagonal (odd) step of the permutation.
  function automatic int unsigned qr_idx(input int unsigned g, input int unsigned k,
                                         input logic diag);
    int unsigned col;
    col = diag ? ((g + k) % 4) : g;
    return 4 * k + col;
  endfunction

endpackage
