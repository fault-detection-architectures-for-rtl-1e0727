// hbs_fd_top_full_tb: one complete operation of every engine of the top at
// its default size: the root of a 32-leaf tree with 20-round ChaCha node
// hashes and RESN checking of every level, the same root recomputed from
// one leaf and its authentication path, one F evaluation and one
// SPONGENT-88/80/8 digest, all against the independent models and with no
// error flag raised.
module hbs_fd_top_full_tb;
  import chacha_pkg::*;
  import tb_ref_pkg::*;
  localparam int NL = 32, LV = 5, NR = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tree_start = 0, tree_busy, tree_rv, tree_done, tree_herr, tree_err;
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

  hbs_fd_top dut (
    .clk, .rst_n,
    .tree_start, .tree_avail_first(1'b0), .tree_leaves(leaves), .tree_masks(masks),
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

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int w = 0; w < 8; w++) v[32*w +: 32] = $urandom;
    return v;
  endfunction

  logic [255:0] nodes [LV+1][NL];

  initial begin
    logic [7:0] msg [];
    logic [255:0] ex;
    int li, cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NL; i++) begin leaves[i] = rnd256(); nodes[0][i] = leaves[i]; end
    for (int j = 0; j < LV; j++) masks[j] = {rnd256(), rnd256()};
    for (int j = 1; j <= LV; j++)
      for (int i = 0; i < (NL >> j); i++)
        nodes[j][i] = ref_h({nodes[j-1][2*i+1], nodes[j-1][2*i]} ^ masks[j-1], NR);
    // tree, F and SPONGENT run concurrently
    @(negedge clk); tree_start = 1; f_m = rnd256(); f_start = 1;
    @(negedge clk); tree_start = 0; f_start = 0;
    msg = new[4]; foreach (msg[i]) msg[i] = 8'($urandom);
    foreach (msg[i]) begin
      while (!sp_r) @(negedge clk);
      sp_d = msg[i]; sp_l = (i == msg.size() - 1); sp_v = 1;
      @(negedge clk); sp_v = 0;
    end
    cyc = 0;
    while (!tree_done) begin @(negedge clk); cyc++; end
    $display("tree done after about %0d cycles", cyc);
    checks++; if (tree_root !== nodes[LV][0]) begin failures++; $display("root mismatch"); end
    checks++; if (tree_err) failures++;
    checks++; if (f_h !== ref_f(f_m, NR) || f_err) failures++;
    ex = sp_hash(msg, 88, 88, 6, 5, 45);
    checks++; if (sp_h !== ex[87:0] || sp_err) failures++;
    li = 19;
    auth_idx = LV'(li); auth_leaf = nodes[0][li];
    for (int j = 0; j < LV; j++) auth_path[j] = nodes[j][(li >> j) ^ 1];
    @(negedge clk); auth_start = 1;
    @(negedge clk); auth_start = 0;
    while (!auth_done) @(negedge clk);
    checks++; if (auth_root !== nodes[LV][0]) failures++;
    checks++; if (auth_err) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
