// spongent_round_fd: one round of the SPONGENT permutation pi_b with
// parity-based fault detection.
//
// Round: the counter value is XORed into the B-bit state (into the lowest
// bits, and bit-reversed into the highest bits), every nibble goes through
// the S-box, and pLayer moves bit j to position j*B/4 mod (B-1).
// Checks, as in the article's predicted-parity/actual-parity scheme:
//  * err_par: actual parity of the incoming state against its predicted
//    parity sp (covers the state register, absorption and the wiring of the
//    previous pLayer);
//  * err_sbox: every S-box compares its stored signatures, with the input
//    parity predicted from the state nibble and the counter bits XORed in;
//  * sp_o: predicted parity of the round output, the XOR of the stored
//    output parities of all S-boxes (a bit permutation keeps the parity).
// Purely combinational.
module spongent_round_fd
  import spongent_pkg::*;
#(
  parameter int unsigned B = 88,
  parameter int unsigned W = 6
) (
  input  logic [B-1:0] st,
  input  logic         sp,
  input  logic [W-1:0] cnt,
  output logic [B-1:0] st_o,
  output logic         sp_o,
  output logic         err_par,
  output logic         err_sbox
);
  localparam int unsigned NS = B / 4;

  logic [B-1:0]      mask, st1, sb;
  logic [NS-1:0][1:0] xpar, ypar;
  logic [NS-1:0]     serr;

  always_comb begin
    mask = '0;
    for (int unsigned k = 0; k < W; k++) begin
      mask[k]       = mask[k] ^ cnt[k];
      mask[B-1-k]   = mask[B-1-k] ^ cnt[k];
    end
    st1 = st ^ mask;
    for (int unsigned i = 0; i < NS; i++)
      xpar[i] = ipar(st[4*i +: 4]) ^ ipar(mask[4*i +: 4]);
  end

  for (genvar i = 0; i < NS; i++) begin : g_sb
    spongent_sbox_fd u_sb (.x(st1[4*i +: 4]), .x_par(xpar[i]), .y(sb[4*i +: 4]),
                           .y_par(ypar[i]), .err(serr[i]));
  end

  always_comb begin
    for (int unsigned j = 0; j < B; j++) st_o[player_pos(j, B)] = sb[j];
    sp_o     = ^ypar;
    err_par  = (^st) != sp;
    err_sbox = |serr;
  end
endmodule
