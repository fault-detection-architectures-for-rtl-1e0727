// spongent_pkg: constants and helpers of the SPONGENT permutation shared by
// the fault-detecting S-box, round and sponge modules.
//
// SBOX is SPONGENT's 4-bit S-box (E D B 0 2 1 4 F 7 A 8 5 9 C 3 6). ipar()
// is the interleaved parity used as error-detecting signature: bit 1 is the
// parity of the two most significant bits of a nibble, bit 0 that of the
// two least significant bits (the table of stored parities in the article
// uses this pairing). player_pos() is the bit permutation
// P(j) = j*b/4 mod (b-1), P(b-1) = b-1.
package spongent_pkg;

  localparam logic [3:0] SBOX [16] = '{
    4'hE, 4'hD, 4'hB, 4'h0, 4'h2, 4'h1, 4'h4, 4'hF,
    4'h7, 4'hA, 4'h8, 4'h5, 4'h9, 4'hC, 4'h3, 4'h6
  };

  function automatic logic [1:0] ipar(input logic [3:0] x);
    return {x[3] ^ x[2], x[1] ^ x[0]};
  endfunction

  function automatic int unsigned player_pos(input int unsigned j, input int unsigned b);
    return (j == b - 1) ? b - 1 : (j * b / 4) % (b - 1);
  endfunction

endpackage
