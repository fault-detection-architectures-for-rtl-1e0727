// resn_tree_tb: RESN hash-tree engine with reduced rounds.
//  A: full tree of 8 leaves, both orderings (check per level / root first),
//     root against the independent model, no false alarm, and a stuck-at
//     fault on the output of one column's H unit that must be flagged on
//     that column or its swap partner;
//  B: L-tree of 7 leaves (odd pair count, lifted node, relocation);
//  C: 16 leaves with comparators on the first and last column only: a
//     fault in column 1 is caught, a fault in column 3 is not (by design).
// Counts how often swapping, relocation, lifting and root-first release
// happened; each must happen at least once.
module resn_tree_tb;
  import chacha_pkg::*;
  import tb_ref_pkg::*;
  localparam int NR = 2;
  int checks = 0, failures = 0;
  int n_bite = 0, n_swap = 0, n_reloc = 0, n_lift = 0, n_rootfirst = 0, n_detect = 0;
  logic clk = 0, rst_n = 0;

  always #5 clk = ~clk;

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- A
  logic a_start = 0, a_af = 0, a_busy, a_rv, a_done, a_herr, a_err;
  logic [7:0][255:0] a_leaves;
  logic [2:0][511:0] a_masks;
  logic [255:0] a_root;
  logic [3:0] a_ecol;
  resn_tree #(.NLEAF(8), .ROUNDS(NR), .SCHEME(QR_ORIG)) ta (
    .clk, .rst_n, .start(a_start), .avail_first(a_af), .leaves(a_leaves), .masks(a_masks),
    .busy(a_busy), .root_valid(a_rv), .root(a_root), .done(a_done), .err_col(a_ecol),
    .hash_err(a_herr), .err(a_err));

  // ---------------------------------------------------------------- B
  logic b_start = 0, b_busy, b_rv, b_done, b_herr, b_err;
  logic [6:0][255:0] b_leaves;
  logic [2:0][511:0] b_masks;
  logic [255:0] b_root;
  logic [2:0] b_ecol;
  resn_tree #(.NLEAF(7), .ROUNDS(NR), .SCHEME(QR_ORIG)) tb_l (
    .clk, .rst_n, .start(b_start), .avail_first(1'b0), .leaves(b_leaves), .masks(b_masks),
    .busy(b_busy), .root_valid(b_rv), .root(b_root), .done(b_done), .err_col(b_ecol),
    .hash_err(b_herr), .err(b_err));

  // ---------------------------------------------------------------- C
  logic c_start = 0, c_busy, c_rv, c_done, c_herr, c_err;
  logic [15:0][255:0] c_leaves;
  logic [3:0][511:0] c_masks;
  logic [255:0] c_root;
  logic [7:0] c_ecol;
  resn_tree #(.NLEAF(16), .ROUNDS(NR), .SCHEME(QR_ORIG), .CHECK_MASK(8'b1000_0001)) tc (
    .clk, .rst_n, .start(c_start), .avail_first(1'b0), .leaves(c_leaves), .masks(c_masks),
    .busy(c_busy), .root_valid(c_rv), .root(c_root), .done(c_done), .err_col(c_ecol),
    .hash_err(c_herr), .err(c_err));

  // mechanism monitors (swapped passes, relocated passes, lifted nodes)
  always @(posedge clk) begin
    if (ta.launch && ta.pass_s) begin
      if (ta.npairs > 1 && ta.npairs % 2 == 0) n_swap++; else n_reloc++;
    end
    if (tb_l.launch && tb_l.pass_s) begin
      if (tb_l.npairs > 1 && tb_l.npairs % 2 == 0) n_swap++; else n_reloc++;
    end
    if (tb_l.waiting && !tb_l.launch && !tb_l.pass_s && (tb_l.pending & ~tb_l.h_done) == '0
        && tb_l.prev_cnt % 2 == 1) n_lift++;
  end

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int w = 0; w < 8; w++) v[32*w +: 32] = $urandom;
    return v;
  endfunction

  task automatic run_a(input logic af, output logic [255:0] exp_root);
    logic [255:0] lv [];
    logic [511:0] q [];
    bit got_root;
    lv = new[8]; q = new[3];
    for (int i = 0; i < 8; i++) begin a_leaves[i] = rnd256(); lv[i] = a_leaves[i]; end
    for (int j = 0; j < 3; j++) begin a_masks[j] = {rnd256(), rnd256()}; q[j] = a_masks[j]; end
    exp_root = ref_root(lv, q, NR);
    @(negedge clk); a_af = af; a_start = 1;
    @(negedge clk); a_start = 0;
    got_root = 0;
    while (!a_done) begin
      if (a_rv) begin
        got_root = 1;
        if (af) n_rootfirst++;
      end
      @(negedge clk);
    end
    checks++; if (af && !got_root) failures++;
  endtask

  initial begin
    logic [255:0] er;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // A: fault free, both orderings
    for (int t = 0; t < 4; t++) begin
      run_a(t[0], er);
      checks++; if (a_root !== er) begin failures++; $display("A root mismatch"); end
      checks++; if (a_err) failures++;
    end
    // A: stuck-at on column 2's hash output
    force ta.h_out[2][17] = 1'b1;
    for (int t = 0; t < 6; t++) begin
      run_a(1'b0, er);
      if (a_root !== er) begin
        n_bite++;
        checks++; if (!a_err) begin failures++; $display("A undetected ecol=%b", a_ecol); end else n_detect++;
      end
      checks++; if ((a_ecol & 4'b0011) != 0) begin failures++; $display("A ecol=%b", a_ecol); end
    end
    release ta.h_out;

    // B: L-tree
    for (int t = 0; t < 3; t++) begin
      logic [255:0] lv [];
      logic [511:0] q [];
      lv = new[7]; q = new[3];
      for (int i = 0; i < 7; i++) begin b_leaves[i] = rnd256(); lv[i] = b_leaves[i]; end
      for (int j = 0; j < 3; j++) begin b_masks[j] = {rnd256(), rnd256()}; q[j] = b_masks[j]; end
      @(negedge clk); b_start = 1;
      @(negedge clk); b_start = 0;
      while (!b_done) @(negedge clk);
      checks++; if (b_root !== ref_root(lv, q, NR)) begin failures++; $display("B root mismatch"); end
      checks++; if (b_err) failures++;
    end
    // B: fault on column 0 (relocation must expose it)
    force tb_l.h_out[0][3] = 1'b0;
    for (int t = 0; t < 4; t++) begin
      logic [255:0] lv [];
      logic [511:0] q [];
      lv = new[7]; q = new[3];
      for (int i = 0; i < 7; i++) begin b_leaves[i] = rnd256(); lv[i] = b_leaves[i]; end
      for (int j = 0; j < 3; j++) q[j] = b_masks[j];
      @(negedge clk); b_start = 1;
      @(negedge clk); b_start = 0;
      while (!b_done) @(negedge clk);
      if (b_root !== ref_root(lv, q, NR)) begin
        n_bite++;
        checks++; if (!b_err) begin failures++; $display("B undetected"); end else n_detect++;
      end
    end
    release tb_l.h_out;

    // C: partial comparators
    for (int t = 0; t < 2; t++) begin
      logic [255:0] lv [];
      logic [511:0] q [];
      lv = new[16]; q = new[4];
      for (int i = 0; i < 16; i++) begin c_leaves[i] = rnd256(); lv[i] = c_leaves[i]; end
      for (int j = 0; j < 4; j++) begin c_masks[j] = {rnd256(), rnd256()}; q[j] = c_masks[j]; end
      if (t == 0) force tc.h_out[1][100] = 1'b1;
      else        force tc.h_out[3][100] = 1'b1;
      @(negedge clk); c_start = 1;
      @(negedge clk); c_start = 0;
      while (!c_done) @(negedge clk);
      release tc.h_out;
      release tc.h_out;
      checks++; if (c_root === ref_root(lv, q, NR)) begin failures++; $display("C no bite %0d", t); end   // the fault bites
      if (t == 0) begin checks++; if (!c_ecol[0]) failures++; else n_detect++; end
      else        begin checks++; if (c_err) begin failures++; $display("C err %b", c_ecol); end end       // no comparator there
    end

    $display("swap=%0d reloc=%0d lift=%0d rootfirst=%0d detect=%0d",
             n_swap, n_reloc, n_lift, n_rootfirst, n_detect);
    checks++; if (n_swap == 0) failures++;
    checks++; if (n_reloc == 0) failures++;
    checks++; if (n_lift == 0) failures++;
    checks++; if (n_rootfirst == 0) failures++;
    checks++; if (n_detect == 0) failures++;
    checks++; if (n_bite == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
