// spongent_fd: SPONGENT sponge hash with parity-based fault detection.
//
// The B-bit state starts at zero. Each R-bit message block is XORed into
// the lowest R bits of the state (absorbing) and the state is permuted by
// ROUNDS rounds of pi_b, one round per cycle. After the block flagged last,
// the padding block (a single one bit in the block's most significant
// position followed by zeros) is absorbed, so messages are whole blocks.
// Then R bits are read from the bottom of the state per squeeze, with a
// permutation between squeezes, until NH bits are collected (first block in
// the most significant bits of h). Error detection follows the article:
// the state carries a predicted parity bit that is updated on absorption
// (XOR with the block parity) and by the S-box signatures in every round,
// and compared with the actual state parity each round; S-box signatures
// and the round-counter parity are checked as well. Flags are sticky per
// message. The cycle-level control is ours.
//
// Defaults are SPONGENT-88/80/8 (b = 88); SPONGENT-128/128/8 uses B = 136,
// NH = 128, ROUNDS = 70, CW = 7, CINIT = 7'h7A, CTAPS = 7'h60.
//
// Timing: a block is accepted when m_valid and m_ready are high; m_ready
// returns ROUNDS cycles later. h_valid pulses when the digest is complete.
module spongent_fd #(
  parameter int unsigned   B      = 88,
  parameter int unsigned   NH     = 88,
  parameter int unsigned   R      = 8,
  parameter int unsigned   ROUNDS = 45,
  parameter int unsigned   CW     = 6,
  parameter logic [CW-1:0] CINIT  = 6'h05,
  parameter logic [CW-1:0] CTAPS  = 6'h30
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          m_valid,
  output logic          m_ready,
  input  logic [R-1:0]  m_data,
  input  logic          m_last,
  output logic          h_valid,
  output logic [NH-1:0] h,
  output logic [2:0]    err_flags,   // {counter, state parity, S-box}
  output logic          err
);
  typedef enum logic [1:0] {S_IDLE, S_PERM, S_PAD, S_SQ} st_e;
  typedef enum logic [1:0] {P_ABS, P_PAD, P_SQ} phase_e;

  localparam int unsigned NOUT = NH / R;
  localparam logic [R-1:0] PAD = R'(1) << (R - 1);

  st_e    state;
  phase_e phase;
  logic [B-1:0] s;
  logic         sp, last_blk, in_msg;
  logic [$clog2(ROUNDS+1)-1:0] rnd;
  logic [$clog2(NOUT+1)-1:0]   nout;

  logic         apply, r_first;
  logic [R-1:0] xin;
  logic [B-1:0] r_in, r_out;
  logic         r_sp_in, r_sp_out, e_par, e_sbox;
  logic [CW-1:0] cnt;
  logic         e_cnt, cnt_load;

  assign m_ready = (state == S_IDLE);

  // Round input: state XOR block (absorb), pad block, or nothing.
  always_comb begin
    xin     = '0;
    r_first = 1'b0;
    unique case (state)
      S_IDLE: begin xin = m_data; r_first = m_valid; end
      S_PAD:  begin xin = PAD;    r_first = 1'b1;    end
      S_SQ:   r_first = (32'(nout) != NOUT - 1);
      default: ;
    endcase
    apply   = r_first || (state == S_PERM);
    r_in    = s ^ B'(xin);
    r_sp_in = sp ^ (^xin);
  end

  spongent_round_fd #(.B(B), .W(CW)) u_round (
    .st(r_in), .sp(r_sp_in), .cnt(cnt), .st_o(r_out), .sp_o(r_sp_out),
    .err_par(e_par), .err_sbox(e_sbox));

  spongent_lcounter #(.W(CW), .INIT(CINIT), .TAPS(CTAPS)) u_cnt (
    .clk, .rst_n, .load(cnt_load), .step(apply), .cnt(cnt), .err(e_cnt));

  assign cnt_load = (state == S_PERM) && (32'(rnd) == ROUNDS - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; phase <= P_ABS;
      s <= '0; sp <= 1'b0; last_blk <= 1'b0; in_msg <= 1'b0;
      rnd <= '0; nout <= '0;
      h <= '0; h_valid <= 1'b0; err_flags <= '0;
    end else begin
      h_valid <= 1'b0;
      if (apply) begin
        s   <= r_out;
        sp  <= r_sp_out;
        // flags restart with the first block of a message
        err_flags <= (in_msg ? err_flags : 3'b000) | {e_cnt, e_par, e_sbox};
      end
      unique case (state)
        S_IDLE: if (m_valid) begin
          in_msg   <= 1'b1;
          last_blk <= m_last;
          phase    <= P_ABS;
          rnd      <= 1;
          state    <= S_PERM;
        end
        S_PERM: begin
          if (32'(rnd) == ROUNDS - 1) begin
            rnd <= '0;
            unique case (phase)
              P_ABS:   state <= last_blk ? S_PAD : S_IDLE;
              P_PAD:   begin state <= S_SQ; nout <= '0; end
              default: state <= S_SQ;
            endcase
          end else rnd <= rnd + 1'b1;
        end
        S_PAD: begin
          phase <= P_PAD;
          rnd   <= 1;
          state <= S_PERM;
        end
        S_SQ: begin
          h    <= {h[NH-R-1:0], s[R-1:0]};
          if (32'(nout) == NOUT - 1) begin
            h_valid  <= 1'b1;
            state    <= S_IDLE;
            phase    <= P_ABS;
            last_blk <= 1'b0;
            in_msg   <= 1'b0;
            s        <= '0;     // ready for the next message
            sp       <= 1'b0;
            nout     <= '0;
          end else begin
            nout  <= nout + 1'b1;
            phase <= P_SQ;
            rnd   <= 1;
            state <= S_PERM;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign err = |err_flags;

  a_perm_len: assert property (@(posedge clk) disable iff (!rst_n)
                               (state == S_PERM) |-> (32'(rnd) < ROUNDS));
endmodule
