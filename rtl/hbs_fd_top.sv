// hbs_fd_top: fault-detecting hash engines for a stateless hash-based
// signature scheme.
//
// Three ChaCha-based engines and one SPONGENT engine stand side by side:
//  * tree  : resn_tree builds the root of a full binary hash tree (or an
//            L-tree) over TREE_LEAVES leaves, with recomputation on swapped
//            nodes at tree level and the TREE_SCHEME check inside every
//            ChaCha quarter round (default: complementary scheme);
//  * auth  : auth_root recomputes a root from a leaf and its authentication
//            path, with AUTH_SCHEME inside its node hash (default: REEO);
//  * f     : sphincs_f, the chain function F, with F_SCHEME (default:
//            dual-rail checked adders);
//  * sponge: spongent_fd, SPONGENT-88/80/8 with parity-based detection.
// The pairing of engines and schemes is our choice: the article proposes
// the schemes as alternatives to be picked per reliability and overhead
// target, and every scheme parameter accepts every scheme. All engines
// share clock and reset and are otherwise independent; each keeps the
// handshake and timing of its own module.
module hbs_fd_top
  import chacha_pkg::*;
#(
  parameter int unsigned TREE_LEAVES = 32,
  parameter int unsigned ROUNDS      = 20,
  parameter qr_scheme_e  TREE_SCHEME = QR_COMP,
  parameter qr_scheme_e  AUTH_SCHEME = QR_REEO,
  parameter qr_scheme_e  F_SCHEME    = QR_DR,
  parameter int unsigned QR_STAGE    = 1,
  parameter int unsigned TREE_COLS   = TREE_LEAVES / 2,
  parameter logic [TREE_COLS-1:0] CHECK_MASK = '1,
  parameter int unsigned TREE_LEV    = $clog2(TREE_LEAVES)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // hash tree
  input  logic                              tree_start,
  input  logic                              tree_avail_first,
  input  logic [TREE_LEAVES-1:0][255:0]     tree_leaves,
  input  logic [TREE_LEV-1:0][511:0]        tree_masks,
  output logic                              tree_busy,
  output logic                              tree_root_valid,
  output logic [255:0]                      tree_root,
  output logic                              tree_done,
  output logic [TREE_COLS-1:0]              tree_err_col,
  output logic                              tree_hash_err,
  output logic                              tree_err,
  // root from authentication path
  input  logic                              auth_start,
  input  logic [TREE_LEV-1:0]               auth_idx,
  input  logic [255:0]                      auth_leaf,
  input  logic [TREE_LEV-1:0][255:0]        auth_path,
  output logic                              auth_busy,
  output logic                              auth_done,
  output logic [255:0]                      auth_root_o,
  output logic                              auth_err,
  // chain function F
  input  logic                              f_start,
  input  logic [255:0]                      f_m,
  output logic                              f_busy,
  output logic                              f_done,
  output logic [255:0]                      f_h,
  output logic                              f_err,
  // SPONGENT
  input  logic                              sp_m_valid,
  output logic                              sp_m_ready,
  input  logic [7:0]                        sp_m_data,
  input  logic                              sp_m_last,
  output logic                              sp_h_valid,
  output logic [87:0]                       sp_h,
  output logic [2:0]                        sp_err_flags,
  output logic                              sp_err
);
  resn_tree #(.NLEAF(TREE_LEAVES), .ROUNDS(ROUNDS), .SCHEME(TREE_SCHEME),
              .QR_STAGE(QR_STAGE), .COLS(TREE_COLS), .CHECK_MASK(CHECK_MASK),
              .NLEV(TREE_LEV)) u_tree (
    .clk, .rst_n, .start(tree_start), .avail_first(tree_avail_first),
    .leaves(tree_leaves), .masks(tree_masks), .busy(tree_busy),
    .root_valid(tree_root_valid), .root(tree_root), .done(tree_done),
    .err_col(tree_err_col), .hash_err(tree_hash_err), .err(tree_err));

  // The authentication-path engine verifies against the same masks.
  auth_root #(.H(TREE_LEV), .ROUNDS(ROUNDS), .SCHEME(AUTH_SCHEME),
              .QR_STAGE(QR_STAGE)) u_auth (
    .clk, .rst_n, .start(auth_start), .idx(auth_idx), .leaf(auth_leaf),
    .auth(auth_path), .masks(tree_masks), .busy(auth_busy), .done(auth_done),
    .root(auth_root_o), .err(auth_err));

  sphincs_f #(.ROUNDS(ROUNDS), .SCHEME(F_SCHEME), .QR_STAGE(QR_STAGE)) u_f (
    .clk, .rst_n, .start(f_start), .m(f_m), .busy(f_busy), .done(f_done),
    .h(f_h), .err(f_err));

  spongent_fd u_sponge (
    .clk, .rst_n, .m_valid(sp_m_valid), .m_ready(sp_m_ready),
    .m_data(sp_m_data), .m_last(sp_m_last), .h_valid(sp_h_valid), .h(sp_h),
    .err_flags(sp_err_flags), .err(sp_err));
endmodule
