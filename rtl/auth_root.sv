// auth_root: root of a hash tree from one leaf and its authentication path.
//
// Starting from P0 = leaf, each level j = 1..H computes
//   Pj = H((P(j-1) || A(j-1)) xor Qj)  if bit j-1 of the leaf index is 0,
//   Pj = H((A(j-1) || P(j-1)) xor Qj)  if it is 1,
// with one node-hash unit used H times; PH is the root. This is the
// article's root-computation algorithm (as used when a signature is
// verified); the sequencing is ours. The node hash keeps its own ChaCha
// error detection, whose flags are ORed into err.
//
// Interface: pulse start with idx, leaf, auth (auth[j] = A_j) and masks
// (masks[j-1] = Q_j, low n bits applied to the left operand) while busy is
// low; done pulses with root after H node hashes.
module auth_root
  import chacha_pkg::*;
#(
  parameter int unsigned H        = 5,
  parameter int unsigned ROUNDS   = 20,
  parameter qr_scheme_e  SCHEME   = QR_COMP,
  parameter int unsigned QR_STAGE = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [H-1:0]         idx,
  input  logic [255:0]         leaf,
  input  logic [H-1:0][255:0]  auth,
  input  logic [H-1:0][511:0]  masks,
  output logic                 busy,
  output logic                 done,
  output logic [255:0]         root,
  output logic                 err
);
  localparam int unsigned JW = $clog2(H + 1);

  logic [255:0]  p;
  logic [JW-1:0] j;          // level being computed minus one
  logic [H-1:0]  ix;
  logic          h_start, h_busy, h_done, h_err, waiting;
  logic [511:0]  h_m;
  logic [255:0]  h_out;

  always_comb begin
    if (!ix[j]) h_m = {auth[j], p} ^ masks[j];
    else        h_m = {p, auth[j]} ^ masks[j];
  end

  assign h_start = busy && !waiting;

  sphincs_h #(.ROUNDS(ROUNDS), .SCHEME(SCHEME), .QR_STAGE(QR_STAGE)) u_h (
    .clk, .rst_n, .start(h_start), .m(h_m), .busy(h_busy),
    .done(h_done), .h(h_out), .err(h_err));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; waiting <= 1'b0; err <= 1'b0;
      p <= '0; j <= '0; ix <= '0; root <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; waiting <= 1'b0; err <= 1'b0;
        p <= leaf; j <= '0; ix <= idx;
      end else if (busy) begin
        if (h_start) waiting <= 1'b1;
        if (h_done) begin
          waiting <= 1'b0;
          p       <= h_out;
          err     <= err | h_err;
          if (32'(j) == H - 1) begin
            busy <= 1'b0; done <= 1'b1; root <= h_out;
          end else j <= j + 1'b1;
        end
      end
    end
  end

  a_hash_idle_at_start: assert property (@(posedge clk) disable iff (!rst_n)
                                         h_start |-> !h_busy);
endmodule
