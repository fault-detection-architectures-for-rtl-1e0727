// resn_tree: hash-tree root engine with recomputation on swapped nodes
// (RESN), for full binary trees and for unbalanced L-trees.
//
// Level j of the tree is N(i,j) = H((N(2i,j-1) || N(2i+1,j-1)) xor Q_j).
// The engine has one H unit per column (NLEAF/2 units); a level is computed
// by letting unit k hash pair k ("normal" pass). The level is then
// recomputed with the pairs swapped between neighbouring units (pair k on
// unit k^1). Because all pairs of a level use the same mask Q_j and the
// same H, the swapped pass must reproduce the normal results at the swapped
// positions; a fault in one unit gives mismatching values. Columns whose bit
// in CHECK_MASK is set carry a comparator, so protection can be limited to
// chosen columns (e.g. only the first and last ones) to save area.
// When a level has an odd number of pairs, or a single pair, swapping is
// impossible and the pairs are relocated by one column instead (pair k on
// unit (k+1) mod P; the single top pair on unit 1). For an L-tree (NLEAF
// not a power of two) a node with no right sibling is lifted unchanged to
// the next level. The swapping, relocation, lifting and partial comparators
// follow the article; the node memory and sequencing are our design.
//
// Two orderings are supported (avail_first): 0 = each level is checked
// before the next level starts; 1 = all levels are computed first, the
// root is released (root_valid) and the swapped recomputation of every
// level follows. avail_first is sampled together with start.
//
// Interface: pulse start with leaves (leaf i in leaves[i]) and masks
// (masks[j-1] = Q_j; low n bits apply to the left child) while busy is low.
// root_valid pulses when the root is known, done pulses when all checks
// are over; err_col names the columns whose comparator fired, hash_err
// collects the inner error flags of the H units. Each pass takes one H
// latency (two ChaCha permutations) plus two cycles.
module resn_tree
  import chacha_pkg::*;
#(
  parameter int unsigned NLEAF      = 32,
  parameter int unsigned ROUNDS     = 20,
  parameter qr_scheme_e  SCHEME     = QR_COMP,
  parameter int unsigned QR_STAGE   = 1,
  parameter int unsigned COLS       = NLEAF / 2,
  parameter logic [COLS-1:0] CHECK_MASK = '1,
  parameter int unsigned NLEV       = $clog2(NLEAF)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic                         avail_first,
  input  logic [NLEAF-1:0][255:0]      leaves,
  input  logic [NLEV-1:0][511:0]       masks,
  output logic                         busy,
  output logic                         root_valid,
  output logic [255:0]                 root,
  output logic                         done,
  output logic [COLS-1:0]              err_col,
  output logic                         hash_err,
  output logic                         err
);
  localparam int unsigned LW = $clog2(NLEV + 2);

  logic [255:0] node [NLEV+1][NLEAF];

  logic [LW-1:0]   lvl;
  logic            pass_s, waiting, launch;
  logic            af_q;            // ordering, sampled at start
  logic [COLS-1:0] pending, active;

  logic [COLS-1:0]        h_start, h_done, h_err;
  logic [COLS-1:0][511:0] h_m;
  logic [COLS-1:0][255:0] h_out;

  // Number of nodes on level j (lifted nodes included).
  function automatic int unsigned cnt_at(input int unsigned j);
    int unsigned c = NLEAF;
    for (int unsigned i = 0; i < NLEV; i++) if (i < j) c = (c + 1) / 2;
    return c;
  endfunction

  // Pair computed by column c in the swapped pass when the level has p pairs.
  function automatic int unsigned sigma_inv(input int unsigned c, input int unsigned p);
    if (p <= 1)          return 0;
    else if (p % 2 == 0) return c ^ 1;
    else                 return (c + p - 1) % p;
  endfunction

  int unsigned prev_cnt, npairs;
  always_comb begin
    prev_cnt = cnt_at(32'(lvl) - 1);
    npairs   = prev_cnt / 2;
  end

  // Column inputs and activity for the current pass.
  always_comb begin
    for (int unsigned c = 0; c < COLS; c++) begin
      int unsigned pk;
      pk = pass_s ? sigma_inv(c, npairs) : c;
      if (!pass_s)         active[c] = (c < npairs);
      else if (npairs == 1) active[c] = (COLS > 1) ? (c == 1) : (c == 0);
      else                 active[c] = (c < npairs);
      h_m[c] = {node[lvl-1][(2*pk+1) % NLEAF], node[lvl-1][(2*pk) % NLEAF]} ^ masks[lvl-1];
    end
  end

  assign launch  = busy && !waiting;
  assign h_start = launch ? active : '0;

  for (genvar c = 0; c < COLS; c++) begin : g_col
    logic unused_busy;
    sphincs_h #(.ROUNDS(ROUNDS), .SCHEME(SCHEME), .QR_STAGE(QR_STAGE)) u_h (
      .clk, .rst_n, .start(h_start[c]), .m(h_m[c]), .busy(unused_busy),
      .done(h_done[c]), .h(h_out[c]), .err(h_err[c]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      af_q       <= 1'b0;
      waiting    <= 1'b0;
      pending    <= '0;
      lvl        <= '0;
      pass_s     <= 1'b0;
      root_valid <= 1'b0;
      root       <= '0;
      done       <= 1'b0;
      err_col    <= '0;
      hash_err   <= 1'b0;
    end else begin
      root_valid <= 1'b0;
      done       <= 1'b0;
      if (start && !busy) begin
        for (int unsigned i = 0; i < NLEAF; i++) node[0][i] <= leaves[i];
        busy     <= 1'b1;
        af_q     <= avail_first;
        waiting  <= 1'b0;
        lvl      <= LW'(1);
        pass_s   <= 1'b0;
        err_col  <= '0;
        hash_err <= 1'b0;
      end else if (busy) begin
        if (launch) begin
          waiting <= 1'b1;
          pending <= active;
        end else begin
          pending  <= pending & ~h_done;
          hash_err <= hash_err | |(h_done & h_err);
        end
        if (waiting && !launch && (pending & ~h_done) == '0) begin
          waiting <= 1'b0;
          if (!pass_s) begin
            // normal pass: store the level, lift an unpaired node
            for (int unsigned c = 0; c < COLS; c++)
              if (c < npairs) node[lvl][c] <= h_out[c];
            if (prev_cnt % 2 == 1) node[lvl][npairs] <= node[lvl-1][prev_cnt-1];
            if (32'(lvl) == NLEV) begin
              root       <= h_out[0];   // the top level always holds one pair
              root_valid <= 1'b1;
            end
          end else begin
            // swapped pass: compare on the columns that have a comparator
            for (int unsigned c = 0; c < COLS; c++)
              if (active[c] && CHECK_MASK[c] &&
                  h_out[c] != node[lvl][sigma_inv(c, npairs)])
                err_col[c] <= 1'b1;
          end
          // next step
          if (!af_q) begin
            if (!pass_s) pass_s <= 1'b1;
            else if (32'(lvl) == NLEV) begin busy <= 1'b0; done <= 1'b1; end
            else begin pass_s <= 1'b0; lvl <= lvl + 1'b1; end
          end else begin
            if (32'(lvl) == NLEV) begin
              if (pass_s) begin busy <= 1'b0; done <= 1'b1; end
              else begin pass_s <= 1'b1; lvl <= LW'(1); end
            end else lvl <= lvl + 1'b1;
          end
        end
      end
    end
  end

  assign err = (|err_col) | hash_err;

  a_root_before_done: assert property (@(posedge clk) disable iff (!rst_n)
                                       done |-> !busy);
endmodule
