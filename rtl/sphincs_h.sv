// sphincs_h: two-to-one node hash H used inside the hash tree,
// H(M1 || M2) = first 256 bits of pi( pi(M1 || C) xor (M2 || 0) ).
//
// pi is the ChaCha permutation (chacha_core, with its error-detection
// scheme), C is the 256-bit constant "expand 32-byte to 64-byte state!"
// (ASCII, byte 0 in the least significant byte of word 8). M1 fills words
// 0..7 of the state and C words 8..15; after the first permutation M2 is
// XORed into words 0..7 and the state is permuted again. This construction
// is the one of the SPHINCS signature scheme; the article states only that
// H is derived from ChaCha. The node size n is fixed at 256 bits by the
// 512-bit ChaCha state.
//
// The permutation's busy output is not needed (the sequencing waits for
// its done pulse) and stays unconnected to logic; the upper half of the
// final state is chopped.
//
// Interface: pulse start with m = {M2, M1} (M1 in bits 255:0) while busy is
// low; done pulses with h and err (OR of the permutation error flags) after
// two permutations.
module sphincs_h
  import chacha_pkg::*;
#(
  parameter int unsigned ROUNDS   = 20,
  parameter qr_scheme_e  SCHEME   = QR_COMP,
  parameter int unsigned QR_STAGE = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [511:0] m,
  output logic         busy,
  output logic         done,
  output logic [255:0] h,
  output logic         err
);
  localparam logic [255:0] C = {"!etats etyb-46 ot etyb-23 dnapxe"};

  state_t c_in, c_out;
  logic   c_start, c_busy, c_done, c_err;
  logic   second;
  logic [255:0] m2;

  chacha_core #(.ROUNDS(ROUNDS), .SCHEME(SCHEME), .QR_STAGE(QR_STAGE)) u_pi (
    .clk, .rst_n, .start(c_start), .in_state(c_in), .busy(c_busy),
    .done(c_done), .out_state(c_out), .err(c_err));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      second  <= 1'b0;
      c_start <= 1'b0;
      c_in    <= '0;
      m2      <= '0;
      h       <= '0;
      err     <= 1'b0;
    end else begin
      done    <= 1'b0;
      c_start <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        second  <= 1'b0;
        err     <= 1'b0;
        m2      <= m[511:256];
        c_in    <= {C, m[255:0]};
        c_start <= 1'b1;
      end else if (busy && c_done) begin
        err <= err | c_err;
        if (!second) begin
          second  <= 1'b1;
          c_in    <= c_out ^ {256'd0, m2};
          c_start <= 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          h    <= c_out[7:0];
        end
      end
    end
  end
endmodule
