// hbs_fd_top_tb: end-to-end run of all engines of the top at reduced size
// (8-leaf tree, 2 ChaCha rounds). The tree root is checked against the
// independent model and against the root recomputed by the
// authentication-path engine for every leaf; F and SPONGENT digests are
// checked against their models. Then faults are forced in each engine:
// a column of the tree (RESN comparators), a quarter-round adder/subtractor
// of a tree hash (complementary check), a REEO adder of the authentication
// engine, a dual-rail adder of F and the SPONGENT state register. Every
// mechanism (swapped pass, relocated pass, root-first release, each
// detector) is counted and must occur at least once.
module hbs_fd_top_tb;
  import chacha_pkg::*;
  import tb_ref_pkg::*;
  localparam int NL = 8, LV = 3, NR = 2;
  int checks = 0, failures = 0;
  int n_swap = 0, n_reloc = 0, n_rootfirst = 0, n_resn = 0, n_comp = 0,
      n_reeo = 0, n_dr = 0, n_sponge = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tree_start = 0, tree_af = 0, tree_busy, tree_rv, tree_done, tree_herr, tree_err;
  logic [NL-1:0][255:0] leaves;
  logic [LV-1:0][511:0] masks;
  logic [255:0] tree_root;
  logic [NL/2-1:0] tree_ecol;
  logic auth_start = 0, auth_busy, auth_done, auth_err;
  logic [LV-1:0] auth_idx;
  logic [255:0] auth_leaf, auth_root;
  logic [LV-1:0][255:0] auth_path;
  logic f_start = 0, f_busy, f_done, f_err;
  logic [255:0] f_m, f_h;
  logic sp_v = 0, sp_r, sp_l = 0, sp_hv, sp_err;
  logic [7:0] sp_d;
  logic [87:0] sp_h;
  logic [2:0] sp_flags;

  hbs_fd_top #(.TREE_LEAVES(NL), .ROUNDS(NR)) dut (
    .clk, .rst_n,
    .tree_start, .tree_avail_first(tree_af), .tree_leaves(leaves), .tree_masks(masks),
    .tree_busy, .tree_root_valid(tree_rv), .tree_root, .tree_done, .tree_err_col(tree_ecol),
    .tree_hash_err(tree_herr), .tree_err,
    .auth_start, .auth_idx, .auth_leaf, .auth_path, .auth_busy, .auth_done,
    .auth_root_o(auth_root), .auth_err,
    .f_start, .f_m, .f_busy, .f_done, .f_h, .f_err,
    .sp_m_valid(sp_v), .sp_m_ready(sp_r), .sp_m_data(sp_d), .sp_m_last(sp_l),
    .sp_h_valid(sp_hv), .sp_h, .sp_err_flags(sp_flags), .sp_err);

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (dut.u_tree.launch && dut.u_tree.pass_s) begin
    if (dut.u_tree.npairs > 1 && dut.u_tree.npairs % 2 == 0) n_swap++; else n_reloc++;
  end

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int w = 0; w < 8; w++) v[32*w +: 32] = $urandom;
    return v;
  endfunction

  logic [255:0] nodes [LV+1][NL];

  task automatic new_tree();
    for (int i = 0; i < NL; i++) begin leaves[i] = rnd256(); nodes[0][i] = leaves[i]; end
    for (int j = 0; j < LV; j++) masks[j] = {rnd256(), rnd256()};
    for (int j = 1; j <= LV; j++)
      for (int i = 0; i < (NL >> j); i++)
        nodes[j][i] = ref_h({nodes[j-1][2*i+1], nodes[j-1][2*i]} ^ masks[j-1], NR);
  endtask

  int seen_rv, after_rv;
  task automatic run_tree(input logic af);
    @(negedge clk); tree_af = af; tree_start = 1;
    @(negedge clk); tree_start = 0;
    seen_rv = 0; after_rv = 0;
    while (!tree_done) begin
      if (tree_rv) seen_rv = 1;
      if (seen_rv && dut.u_tree.launch) after_rv++;
      @(negedge clk);
    end
    // root first: every level is re-checked after the root was released
    if (af && after_rv == LV) n_rootfirst++;
    checks++; if (after_rv != (af ? LV : 1)) failures++;
  endtask

  task automatic run_auth(input int li);
    auth_idx = LV'(li); auth_leaf = nodes[0][li];
    for (int j = 0; j < LV; j++) auth_path[j] = nodes[j][(li >> j) ^ 1];
    @(negedge clk); auth_start = 1;
    @(negedge clk); auth_start = 0;
    while (!auth_done) @(negedge clk);
  endtask

  task automatic run_f(input logic [255:0] m);
    @(negedge clk); f_m = m; f_start = 1;
    @(negedge clk); f_start = 0;
    while (!f_done) @(negedge clk);
  endtask

  task automatic run_sponge(input logic [7:0] msg []);
    foreach (msg[i]) begin
      while (!sp_r) @(negedge clk);
      sp_d = msg[i]; sp_l = (i == msg.size() - 1); sp_v = 1;
      @(negedge clk); sp_v = 0;
    end
    while (!sp_hv) @(negedge clk);
  endtask

  initial begin
    logic [7:0] msg [];
    logic [255:0] fm, ex;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---------------------------------------------------- fault-free operation
    for (int t = 0; t < 2; t++) begin
      new_tree();
      run_tree(t[0]);
      checks++; if (tree_root !== nodes[LV][0]) begin failures++; $display("root mismatch"); end
      checks++; if (tree_err) failures++;
      for (int li = 0; li < NL; li += 3) begin
        run_auth(li);
        checks++; if (auth_root !== tree_root) failures++;
        checks++; if (auth_err) failures++;
      end
    end
    fm = rnd256();
    run_f(fm);
    checks++; if (f_h !== ref_f(fm, NR) || f_err) failures++;
    msg = new[3]; foreach (msg[i]) msg[i] = 8'($urandom);
    run_sponge(msg);
    ex = sp_hash(msg, 88, 88, 6, 5, 45);
    checks++; if (sp_h !== ex[87:0] || sp_err) failures++;

    // ---------------------------------------------------- faults, one per engine
    // RESN: whole output of column 1's H stuck at one value
    force dut.u_tree.h_out[1] = '1;
    new_tree(); run_tree(1'b0);
    release dut.u_tree.h_out;
    checks++; if (tree_ecol == '0) failures++; else n_resn++;
    // complementary scheme inside a tree hash
    force dut.u_tree.g_col[0].u_h.u_pi.g_qr[1].g_comp.u_qr.g_step[2].x_o[11] = 1'b1;
    new_tree(); run_tree(1'b0);
    release dut.u_tree.g_col[0].u_h.u_pi.g_qr[1].g_comp.u_qr.g_step[2].x_o;
    checks++; if (!tree_herr) failures++; else n_comp++;
    // REEO inside the authentication-path engine
    force dut.u_auth.u_h.u_pi.g_qr[0].g_reeo.u_qr.g_step[0].sum[5] = 1'b0;
    new_tree(); run_auth(5);
    release dut.u_auth.u_h.u_pi.g_qr[0].g_reeo.u_qr.g_step[0].sum;
    checks++; if (!auth_err) failures++; else n_reeo++;
    // dual-rail adders in F
    force dut.u_f.u_pi.g_qr[2].g_dr.u_qr.u_add3.s0 = 32'h0;   // multiple stuck-at-0
    run_f(rnd256());
    release dut.u_f.u_pi.g_qr[2].g_dr.u_qr.u_add3.s0;
    checks++; if (!f_err) failures++; else n_dr++;
    // SPONGENT state register
    force dut.u_sponge.s[10] = 1'b1;
    run_sponge(msg);
    release dut.u_sponge.s;
    checks++; if (!sp_err) failures++; else n_sponge++;

    $display("swap=%0d reloc=%0d rootfirst=%0d resn=%0d comp=%0d reeo=%0d dr=%0d sponge=%0d",
             n_swap, n_reloc, n_rootfirst, n_resn, n_comp, n_reeo, n_dr, n_sponge);
    checks++; if (n_swap == 0) failures++;
    checks++; if (n_reloc == 0) failures++;
    checks++; if (n_rootfirst == 0) failures++;
    checks++; if (n_resn == 0) failures++;
    checks++; if (n_comp == 0) failures++;
    checks++; if (n_reeo == 0) failures++;
    checks++; if (n_dr == 0) failures++;
    checks++; if (n_sponge == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
