// spongent_sbox_fd: SPONGENT 4-bit S-box as a lookup table whose entries
// carry error-detection signatures.
//
// Each 8-bit entry holds the 4-bit S-box output, the interleaved parity of
// that output (predicted parity, as tabulated in the article) and the
// interleaved parity of the input that selects the entry. On a lookup the
// stored output parity is compared with the parity actually computed on the
// data read out (catches corrupted data bits), and the stored input parity
// is compared with the parity predicted for the incoming nibble (catches
// faulty inputs and decoding errors that read the wrong entry). Widening
// the entries with these signatures follows the article; the exact entry
// layout {y, out parity, in parity} is ours. The table is computed at
// elaboration from the S-box. Purely combinational.
module spongent_sbox_fd
  import spongent_pkg::*;
(
  input  logic [3:0] x,
  input  logic [1:0] x_par,   // predicted interleaved parity of x
  output logic [3:0] y,
  output logic [1:0] y_par,   // stored (predicted) interleaved parity of y
  output logic       err
);
  function automatic logic [7:0] entry(input logic [3:0] a);
    return {SBOX[a], ipar(SBOX[a]), ipar(a)};
  endfunction

  logic [7:0] rom [16];
  always_comb for (int unsigned a = 0; a < 16; a++) rom[a] = entry(4'(a));

  logic [7:0] e;
  always_comb begin
    e     = rom[x];
    y     = e[7:4];
    y_par = e[3:2];
    err   = (ipar(y) != e[3:2]) || (e[1:0] != x_par);
  end
endmodule
