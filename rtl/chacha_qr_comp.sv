// chacha_qr_comp: ChaCha quarter round with the complementary
// error-detection scheme.
//
// The four add/xor/rotate steps are built from arx_step units whose adders
// are adder/subtractors and whose rotations can be reverted, so the same
// datapath computes either G or G^-1. Operand routing muxes change the role
// of each unit in inverse mode (unit i undoes forward step 3-i). A quarter
// round is first run forward on the input x, giving y; y is then fed back
// through the datapath in inverse mode, and the recovered value is compared
// with x. A permanent or transient fault in a shared adder, XOR or rotator
// makes x' differ from x. The inverse embedding and the comparison follow
// the article; the pipeline split and the control are our choices.
//
// Timing: PIPE (0 or 1) registers split the four steps 2+2. Latency from
// in_valid to out_valid is 2*(PIPE+1)+1 cycles. in_valid may only be
// asserted while busy is low. out_q carries y (the forward result), err is
// valid with out_valid.
module chacha_qr_comp
  import chacha_pkg::*;
#(
  parameter int unsigned PIPE = 1
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
  // ---------------------------------------------------------------- datapath
  logic iss_v, iss_inv;
  qr_t  iss_q;

  for (genvar u = 0; u < 4; u++) begin : g_step
    // Units 0 and 2 work on (a,b,d) forward; in inverse the roles swap.
    localparam bit AD_FWD = (u % 2 == 0);
    word_t x, y, z, x_o, z_o;
    qr_t   nx, sq, oq;
    logic  sv, si, ov, oi;

    if (u == 0) begin : g_first
      assign sq = iss_q; assign sv = iss_v; assign si = iss_inv;
    end else begin : g_next
      assign sq = g_step[u-1].oq; assign sv = g_step[u-1].ov; assign si = g_step[u-1].oi;
    end
    logic  use_ad;

    arx_step #(.ROT_F(QR_ROT[u]), .ROT_I(QR_ROT[3-u])) u_step (
      .inv(si), .x(x), .y(y), .z(z), .x_o(x_o), .z_o(z_o)
    );

    always_comb begin
      use_ad = AD_FWD ^ si;
      nx = sq;
      if (use_ad) begin
        x = sq.a; y = sq.b; z = sq.d;
        nx.a = x_o;   nx.d = z_o;
      end else begin
        x = sq.c; y = sq.d; z = sq.b;
        nx.c = x_o;   nx.b = z_o;
      end
    end

    if (PIPE >= 1 && u == 1) begin : g_reg
      always_ff @(posedge clk) begin
        if (!rst_n) ov <= 1'b0;
        else        ov <= sv;
        oq <= nx;
        oi <= si;
      end
    end else begin : g_wire
      assign oq = nx;
      assign ov = sv;
      assign oi = si;
    end
  end

  // Result register at the end of the datapath.
  logic res_v, res_inv;
  qr_t  res_q;
  always_ff @(posedge clk) begin
    if (!rst_n) res_v <= 1'b0;
    else        res_v <= g_step[3].ov;
    res_q   <= g_step[3].oq;
    res_inv <= g_step[3].oi;
  end

  // ------------------------------------------------------------------ control
  qr_t x_hold, y_hold;

  always_comb begin
    iss_v = 1'b0; iss_inv = 1'b0; iss_q = in_q;
    if (res_v && !res_inv) begin
      iss_v = 1'b1; iss_inv = 1'b1; iss_q = res_q;   // run result backwards
    end else if (in_valid && !busy) begin
      iss_v = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
      err       <= 1'b0;
      out_q     <= '0;
      x_hold    <= '0;
      y_hold    <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid && !busy) begin
        busy   <= 1'b1;
        x_hold <= in_q;
      end
      if (res_v && !res_inv) y_hold <= res_q;
      if (res_v && res_inv) begin
        busy      <= 1'b0;
        out_valid <= 1'b1;
        out_q     <= y_hold;
        err       <= (res_q != x_hold);
      end
    end
  end

  a_no_issue_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                         in_valid |-> !busy);
endmodule
