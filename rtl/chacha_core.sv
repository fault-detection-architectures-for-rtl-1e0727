// chacha_core: ChaCha permutation on a 512-bit state with four quarter
// rounds in parallel ("4G" structure).
//
// Each round applies four quarter rounds at once: even rounds to the four
// columns of the 4x4 word matrix, odd rounds to the four diagonals, so a
// double round uses the four units twice. ROUNDS rounds are applied and the
// permuted state is returned without the ChaCha feed-forward addition. The
// SCHEME parameter picks the quarter-round implementation: unprotected,
// complementary (forward + embedded inverse), REEO (rotated recompute) or
// dual-rail checked adders. The error flags of all quarter rounds of one
// permutation are ORed into err. The 4-parallel organisation and ROUNDS=20
// follow the article; the handshake is ours.
//
// Interface: pulse start with in_state while busy is low; done pulses with
// out_state and err. Latency per round is that of the chosen quarter round
// plus one cycle (QR_ORIG: 1 cycle per round).
module chacha_core
  import chacha_pkg::*;
#(
  parameter int unsigned ROUNDS   = 20,
  parameter qr_scheme_e  SCHEME   = QR_COMP,
  parameter int unsigned QR_STAGE = 1      // pipeline stages inside a quarter round
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  state_t in_state,
  output logic   busy,
  output logic   done,
  output state_t out_state,
  output logic   err
);
  state_t st;
  logic [$clog2(ROUNDS+1)-1:0] rnd;
  logic   diag, waiting, launch;

  qr_t  [3:0] q_in, q_out;
  logic [3:0] q_ov, q_err;

  assign diag = rnd[0];

  // Gather the four quarter-round inputs of this round.
  always_comb begin
    for (int unsigned g = 0; g < 4; g++) begin
      q_in[g].a = st[qr_idx(g, 0, diag)];
      q_in[g].b = st[qr_idx(g, 1, diag)];
      q_in[g].c = st[qr_idx(g, 2, diag)];
      q_in[g].d = st[qr_idx(g, 3, diag)];
    end
  end

  for (genvar g = 0; g < 4; g++) begin : g_qr
    logic unused_busy;
    if (SCHEME == QR_COMP) begin : g_comp
      chacha_qr_comp #(.PIPE(QR_STAGE)) u_qr (
        .clk, .rst_n, .in_valid(launch), .in_q(q_in[g]), .busy(unused_busy),
        .out_valid(q_ov[g]), .out_q(q_out[g]), .err(q_err[g]));
    end else if (SCHEME == QR_REEO) begin : g_reeo
      chacha_qr_reeo #(.STAGES(QR_STAGE)) u_qr (
        .clk, .rst_n, .in_valid(launch), .in_q(q_in[g]), .busy(unused_busy),
        .out_valid(q_ov[g]), .out_q(q_out[g]), .err(q_err[g]));
    end else if (SCHEME == QR_DR) begin : g_dr
      chacha_qr_dr u_qr (
        .clk, .rst_n, .in_valid(launch), .in_q(q_in[g]), .busy(unused_busy),
        .out_valid(q_ov[g]), .out_q(q_out[g]), .err(q_err[g]));
    end else begin : g_orig
      qr_t comb_q;
      chacha_qr u_qr (.in_q(q_in[g]), .out_q(comb_q));
      assign unused_busy = 1'b0;
      always_ff @(posedge clk) begin
        if (!rst_n) q_ov[g] <= 1'b0;
        else        q_ov[g] <= launch;
        q_out[g] <= comb_q;
      end
      assign q_err[g] = 1'b0;
    end
  end

  assign launch = busy && !waiting;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      waiting <= 1'b0;
      done    <= 1'b0;
      err     <= 1'b0;
      rnd     <= '0;
      st      <= '0;
      out_state <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        st      <= in_state;
        rnd     <= '0;
        busy    <= 1'b1;
        waiting <= 1'b0;
        err     <= 1'b0;
      end else if (busy) begin
        if (launch) waiting <= 1'b1;
        if (waiting && q_ov[0]) begin
          for (int unsigned g = 0; g < 4; g++) begin
            st[qr_idx(g, 0, diag)] <= q_out[g].a;
            st[qr_idx(g, 1, diag)] <= q_out[g].b;
            st[qr_idx(g, 2, diag)] <= q_out[g].c;
            st[qr_idx(g, 3, diag)] <= q_out[g].d;
          end
          err     <= err | (|q_err);
          waiting <= 1'b0;
          if (32'(rnd) == ROUNDS - 1) begin
            busy <= 1'b0;
            done <= 1'b1;
            for (int unsigned g = 0; g < 4; g++) begin
              out_state[qr_idx(g, 0, diag)] <= q_out[g].a;
              out_state[qr_idx(g, 1, diag)] <= q_out[g].b;
              out_state[qr_idx(g, 2, diag)] <= q_out[g].c;
              out_state[qr_idx(g, 3, diag)] <= q_out[g].d;
            end
          end else begin
            rnd <= rnd + 1'b1;
          end
        end
      end
    end
  end

  a_lanes_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                                    q_ov[0] |-> &q_ov);
endmodule
