// tb_ref_pkg: independent reference models for the testbenches: ChaCha
// quarter round and permutation, the tree node hash H, the chain function
// F, tree roots, and the SPONGENT permutation and sponge. Written directly
// from the algorithm definitions, without reusing design code.
package tb_ref_pkg;

  typedef logic [15:0][31:0] st_t;

  function automatic logic [31:0] rl(input logic [31:0] x, input int r);
    return (x << r) | (x >> (32 - r));
  endfunction

  function automatic void qr(ref logic [31:0] a, ref logic [31:0] b,
                             ref logic [31:0] c, ref logic [31:0] d);
    a += b; d = rl(d ^ a, 16);
    c += d; b = rl(b ^ c, 12);
    a += b; d = rl(d ^ a, 8);
    c += d; b = rl(b ^ c, 7);
  endfunction

  function automatic logic [127:0] qr128(input logic [127:0] q);
    logic [31:0] a, b, c, d;
    {a, b, c, d} = q;
    qr(a, b, c, d);
    return {a, b, c, d};
  endfunction

  function automatic void qri(ref st_t s, input int i0, input int i1, input int i2, input int i3);
    logic [31:0] a, b, c, d;
    a = s[i0]; b = s[i1]; c = s[i2]; d = s[i3];
    qr(a, b, c, d);
    s[i0] = a; s[i1] = b; s[i2] = c; s[i3] = d;
  endfunction

  function automatic st_t perm(input st_t s, input int rounds);
    for (int r = 0; r < rounds; r++) begin
      if (r % 2 == 0) begin
        qri(s, 0, 4, 8, 12); qri(s, 1, 5, 9, 13); qri(s, 2, 6, 10, 14); qri(s, 3, 7, 11, 15);
      end else begin
        qri(s, 0, 5, 10, 15); qri(s, 1, 6, 11, 12); qri(s, 2, 7, 8, 13); qri(s, 3, 4, 9, 14);
      end
    end
    return s;
  endfunction

  // "expand 32-byte to 64-byte state!" with byte 0 in the low byte of word 8
  function automatic logic [255:0] sphincs_c();
    string str = "expand 32-byte to 64-byte state!";
    logic [255:0] c = '0;
    for (int i = 0; i < 32; i++) c[8*i +: 8] = str[i];
    return c;
  endfunction

  function automatic logic [255:0] ref_h(input logic [511:0] m, input int rounds);
    st_t s;
    s = {sphincs_c(), m[255:0]};
    s = perm(s, rounds);
    s[7:0] = s[7:0] ^ m[511:256];
    s = perm(s, rounds);
    return s[7:0];
  endfunction

  function automatic logic [255:0] ref_f(input logic [255:0] m, input int rounds);
    st_t s;
    s = perm({sphincs_c(), m}, rounds);
    return s[7:0];
  endfunction

  // Root of a tree (L-tree when nleaf is not a power of two).
  function automatic logic [255:0] ref_root(input logic [255:0] lv [], input logic [511:0] q [],
                                            input int rounds);
    logic [255:0] cur [$], nxt [$];
    int j = 0;
    foreach (lv[i]) cur.push_back(lv[i]);
    while (cur.size() > 1) begin
      nxt = {};
      for (int k = 0; k + 1 < cur.size(); k += 2)
        nxt.push_back(ref_h({cur[k+1], cur[k]} ^ q[j], rounds));
      if (cur.size() % 2 == 1) nxt.push_back(cur[cur.size()-1]);
      cur = nxt;
      j++;
    end
    return cur[0];
  endfunction

  // ---------------------------------------------------------------- SPONGENT
  localparam int SB [16] = '{14, 13, 11, 0, 2, 1, 4, 15, 7, 10, 8, 5, 9, 12, 3, 6};

  function automatic logic [255:0] sp_round(input logic [255:0] s, input int b,
                                            input int w, input int cnt);
    logic [255:0] t, o;
    for (int k = 0; k < w; k++) begin
      s[k]       ^= cnt[k];
      s[b-1-k]   ^= cnt[k];
    end
    t = '0;
    for (int i = 0; i < b / 4; i++) t[4*i +: 4] = 4'(SB[s[4*i +: 4]]);
    o = '0;
    for (int j = 0; j < b; j++) begin
      if (j == b - 1) o[b-1] = t[j];
      else o[(j * b / 4) % (b - 1)] = t[j];
    end
    return o;
  endfunction

  function automatic int lfsr_next(input int l, input int w);
    int fb = ((l >> (w - 1)) ^ (l >> (w - 2))) & 1;
    return ((l << 1) | fb) & ((1 << w) - 1);
  endfunction

  function automatic logic [255:0] sp_perm(input logic [255:0] s, input int b, input int w,
                                           input int init, input int rounds);
    int l = init;
    for (int r = 0; r < rounds; r++) begin
      s = sp_round(s, b, w, l);
      l = lfsr_next(l, w);
    end
    return s;
  endfunction

  function automatic logic [255:0] sp_hash(input logic [7:0] msg [], input int b, input int nh,
                                           input int w, input int init, input int rounds);
    logic [255:0] s = '0, h = '0;
    foreach (msg[i]) begin
      s[7:0] ^= msg[i];
      s = sp_perm(s, b, w, init, rounds);
    end
    s[7:0] ^= 8'h80;
    s = sp_perm(s, b, w, init, rounds);
    for (int k = 0; k < nh / 8; k++) begin
      h = (h << 8) | 256'(s[7:0]);
      if (k != nh / 8 - 1) s = sp_perm(s, b, w, init, rounds);
    end
    return h;
  endfunction

endpackage
