// spongent_lcounter: the round counter of the SPONGENT permutation, a
// W-bit LFSR, with parity prediction.
//
// The register shifts left by one; the new bit 0 is the XOR of the tapped
// bits (TAPS). The parity of the next value is predicted from the current
// predicted parity, the bit shifted out and the feedback bit, and kept in
// its own flip-flop; err flags when the register's actual parity differs
// from the prediction. The parity prediction follows the article; widths,
// taps and start values come from the SPONGENT definition (6-bit, x^6+x^5+1,
// start 0x05 for b = 88; 7-bit, x^7+x^6+1, start 0x7A for b = 136).
//
// Interface: load restarts the sequence at INIT, step advances it by one;
// cnt is the value for the current round.
module spongent_lcounter #(
  parameter int unsigned W    = 6,
  parameter logic [W-1:0] INIT = 6'h05,
  parameter logic [W-1:0] TAPS = 6'h30
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         step,
  output logic [W-1:0] cnt,
  output logic         err
);
  logic par_pred, fb;

  assign fb  = ^(cnt & TAPS);
  assign err = (^cnt) != par_pred;

  always_ff @(posedge clk) begin
    if (!rst_n || load) begin
      cnt      <= INIT;
      par_pred <= ^INIT;
    end else if (step) begin
      cnt      <= {cnt[W-2:0], fb};
      par_pred <= par_pred ^ cnt[W-1] ^ fb;
    end
  end
endmodule
