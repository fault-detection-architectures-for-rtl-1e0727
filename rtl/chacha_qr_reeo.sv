// chacha_qr_reeo: ChaCha quarter round with recomputation on encoded
// (rotated) operands, REEO.
//
// The sub-pipelined quarter round is run twice: once on the input words and,
// one cycle later, on the same words rotated left by K. XOR and the fixed
// rotations of ChaCha commute with the encoding; the modular additions use
// gap_adder so that the rotated run stays exact. The rotated result, rotated
// back, must equal the plain result; a fault in any adder bit slice, XOR or
// rotation shows up at different bit positions in the two runs and is
// flagged. The two runs overlap in the pipeline as normal/encoded pairs
// (N then S) in consecutive cycles. The scheme follows the article; K and the
// register positions are our choices.
//
// Timing: STAGES (0..3) pipeline registers inside the four steps
// (1: after step 1; 2: after steps 0 and 2; 3: after steps 0, 1, 2), plus
// a result register and an output register. out_valid follows in_valid
// after STAGES+3 cycles; in_valid is accepted while busy is low.
module chacha_qr_reeo
  import chacha_pkg::*;
#(
  parameter int unsigned STAGES = 1,
  parameter int unsigned K      = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  qr_t  in_q,
  output logic busy,
  output logic out_valid,
  output qr_t  out_q,
  output logic err
);
  function automatic bit reg_after(input int unsigned i);
    case (STAGES)
      0:       return 1'b0;
      1:       return (i == 1);
      2:       return (i == 0) || (i == 2);
      default: return (i < 3);
    endcase
  endfunction

  // ---------------------------------------------------------------- datapath
  logic iss_v, iss_enc;
  qr_t  iss_q;

  for (genvar u = 0; u < 4; u++) begin : g_step
    localparam bit AD = (u % 2 == 0);   // steps 0,2 update a,d; 1,3 update c,b
    word_t x, y, z, sum;
    qr_t   nx, sq, oq;
    logic  sv, se, ov, oe;

    if (u == 0) begin : g_first
      assign sq = iss_q; assign sv = iss_v; assign se = iss_enc;
    end else begin : g_next
      assign sq = g_step[u-1].oq; assign sv = g_step[u-1].ov; assign se = g_step[u-1].oe;
    end

    gap_adder #(.K(K)) u_add (.enc(se), .x(x), .y(y), .s(sum));

    always_comb begin
      nx = sq;
      if (AD) begin
        x = sq.a; y = sq.b; z = sq.d;
        nx.a = sum; nx.d = rotl(z ^ sum, QR_ROT[u]);
      end else begin
        x = sq.c; y = sq.d; z = sq.b;
        nx.c = sum; nx.b = rotl(z ^ sum, QR_ROT[u]);
      end
    end

    if (reg_after(u)) begin : g_reg
      always_ff @(posedge clk) begin
        if (!rst_n) ov <= 1'b0;
        else        ov <= sv;
        oq <= nx;
        oe <= se;
      end
    end else begin : g_wire
      assign oq = nx;
      assign ov = sv;
      assign oe = se;
    end
  end

  logic res_v, res_enc;
  qr_t  res_q;
  always_ff @(posedge clk) begin
    if (!rst_n) res_v <= 1'b0;
    else        res_v <= g_step[3].ov;
    res_q   <= g_step[3].oq;
    res_enc <= g_step[3].oe;
  end

  // ------------------------------------------------------------------ control
  logic enc_pending;
  qr_t  x_hold, n_hold;

  always_comb begin
    iss_v = 1'b0; iss_enc = 1'b0; iss_q = in_q;
    if (enc_pending) begin
      iss_v = 1'b1; iss_enc = 1'b1; iss_q = qr_rotl(x_hold, K);
    end else if (in_valid && !busy) begin
      iss_v = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      enc_pending <= 1'b0;
      out_valid   <= 1'b0;
      err         <= 1'b0;
      out_q       <= '0;
      x_hold      <= '0;
      n_hold      <= '0;
    end else begin
      out_valid   <= 1'b0;
      enc_pending <= 1'b0;
      if (in_valid && !busy) begin
        busy        <= 1'b1;
        x_hold      <= in_q;
        enc_pending <= 1'b1;
      end
      if (res_v && !res_enc) n_hold <= res_q;
      if (res_v && res_enc) begin
        busy      <= 1'b0;
        out_valid <= 1'b1;
        out_q     <= n_hold;
        err       <= (qr_rotr(res_q, K) != n_hold);
      end
    end
  end

  a_no_issue_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                         in_valid |-> !busy);
endmodule
