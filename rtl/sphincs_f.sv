// sphincs_f: one-to-one short-input hash F(M) = first 256 bits of pi(M || C),
// pi being the ChaCha permutation with its error-detection scheme and C the
// constant "expand 32-byte to 64-byte state!". F is the function iterated in
// the one-time-signature chains whose public keys are compressed by L-trees.
// The article states only that F is derived from ChaCha; the construction
// is that of the SPHINCS scheme.
//
// The upper half of the permuted state is chopped and stays unused.
//
// Interface: pulse start with m while busy is low; done pulses with h and
// err (error flag of the permutation) one permutation later.
module sphincs_f
  import chacha_pkg::*;
#(
  parameter int unsigned ROUNDS   = 20,
  parameter qr_scheme_e  SCHEME   = QR_DR,
  parameter int unsigned QR_STAGE = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [255:0] m,
  output logic         busy,
  output logic         done,
  output logic [255:0] h,
  output logic         err
);
  localparam logic [255:0] C = {"!etats etyb-46 ot etyb-23 dnapxe"};

  state_t c_out;
  logic   c_done, c_err;

  chacha_core #(.ROUNDS(ROUNDS), .SCHEME(SCHEME), .QR_STAGE(QR_STAGE)) u_pi (
    .clk, .rst_n, .start(start && !busy), .in_state({C, m}), .busy(busy),
    .done(c_done), .out_state(c_out), .err(c_err));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done <= 1'b0; h <= '0; err <= 1'b0;
    end else begin
      done <= c_done;
      if (c_done) begin
        h   <= c_out[7:0];
        err <= c_err;
      end
    end
  end
endmodule
