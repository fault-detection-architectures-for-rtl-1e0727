// chacha_core_tb: the 4-parallel ChaCha permutation with each quarter-round
// scheme, against an independent model; the ChaCha20 block test vector
// (permutation plus feed-forward); cycles per permutation; and detection of
// a stuck-at fault in one quarter-round unit of each protected core.
module chacha_core_tb;
  import chacha_pkg::*;
  import tb_ref_pkg::*;
  localparam int NR = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  state_t in_state;
  state_t o [4];
  logic [3:0] busy, done, err;
  int cyc [4];

  always #5 clk = ~clk;

  chacha_core #(.ROUNDS(NR), .SCHEME(QR_ORIG)) u0 (.clk, .rst_n, .start, .in_state,
    .busy(busy[0]), .done(done[0]), .out_state(o[0]), .err(err[0]));
  chacha_core #(.ROUNDS(NR), .SCHEME(QR_COMP)) u1 (.clk, .rst_n, .start, .in_state,
    .busy(busy[1]), .done(done[1]), .out_state(o[1]), .err(err[1]));
  chacha_core #(.ROUNDS(NR), .SCHEME(QR_REEO)) u2 (.clk, .rst_n, .start, .in_state,
    .busy(busy[2]), .done(done[2]), .out_state(o[2]), .err(err[2]));
  chacha_core #(.ROUNDS(NR), .SCHEME(QR_DR)) u3 (.clk, .rst_n, .start, .in_state,
    .busy(busy[3]), .done(done[3]), .out_state(o[3]), .err(err[3]));

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic perm_all(input state_t s);
    logic [3:0] seen;
    int n;
    @(negedge clk); in_state = s; start = 1;
    @(negedge clk); start = 0;
    seen = '0; n = 1;
    while (seen != 4'hF) begin
      for (int k = 0; k < 4; k++) if (done[k] && !seen[k]) begin seen[k] = 1; cyc[k] = n; end
      @(negedge clk); n++;
    end
  endtask

  initial begin
    state_t kv, exp_blk;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ChaCha20 block function test vector (key 00..1f, counter 1, nonce 09 4a)
    kv = {32'h00000000, 32'h4a000000, 32'h09000000, 32'h00000001,
          32'h1f1e1d1c, 32'h1b1a1918, 32'h17161514, 32'h13121110,
          32'h0f0e0d0c, 32'h0b0a0908, 32'h07060504, 32'h03020100,
          32'h6b206574, 32'h79622d32, 32'h3320646e, 32'h61707865};
    exp_blk = {32'h4e3c50a2, 32'he883d0cb, 32'hb94e16de, 32'hd19c12b5,
               32'ha2028bd9, 32'h05d7c214, 32'h09aa9f07, 32'h466482d2,
               32'h4e6cd4c3, 32'h9aaa2204, 32'h0368c033, 32'hc7f4d1c7,
               32'hc47120a3, 32'h1fdd0f50, 32'h15593bd1, 32'he4e7f110};
    perm_all(kv);
    for (int k = 0; k < 4; k++) begin
      state_t blk;
      for (int w = 0; w < 16; w++) blk[w] = o[k][w] + kv[w];
      checks++; if (blk !== exp_blk) begin failures++; $display("core %0d block vector mismatch", k); end
      checks++; if (err[k]) failures++;
    end
    $display("cycles per permutation: orig %0d comp %0d reeo %0d dr %0d", cyc[0], cyc[1], cyc[2], cyc[3]);
    // per-round cost: orig 1+1, comp 5+1, reeo 4+1, dr 1+1 (quarter round + write-back)
    checks++; if (cyc[0] != NR * 2 + 1) failures++;
    checks++; if (cyc[1] != NR * 6 + 1) failures++;
    checks++; if (cyc[2] != NR * 5 + 1) failures++;
    checks++; if (cyc[3] != NR * 2 + 1) failures++;
    for (int i = 0; i < 6; i++) begin
      state_t s, r;
      for (int w = 0; w < 16; w++) s[w] = $urandom;
      r = perm(s, NR);
      perm_all(s);
      for (int k = 0; k < 4; k++) begin
        checks++; if (o[k] !== r) failures++;
        checks++; if (err[k]) failures++;
      end
    end
    // stuck-at faults inside one quarter-round unit of each protected core
    force u1.g_qr[2].g_comp.u_qr.g_step[0].x_o[7] = 1'b1;
    force u2.g_qr[1].g_reeo.u_qr.g_step[3].sum[30] = 1'b0;
    force u3.g_qr[3].g_dr.u_qr.u_add0.s0[12] = 1'b1;
    for (int i = 0; i < 3; i++) begin
      state_t s;
      for (int w = 0; w < 16; w++) s[w] = $urandom;
      perm_all(s);
      for (int k = 1; k < 4; k++) begin
        checks++; if (!err[k]) begin failures++; $display("core %0d fault not flagged", k); end
      end
      checks++; if (err[0]) failures++;
    end
    release u1.g_qr[2].g_comp.u_qr.g_step[0].x_o;
    release u2.g_qr[1].g_reeo.u_qr.g_step[3].sum;
    release u3.g_qr[3].g_dr.u_qr.u_add0.s0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
