// spongent_sbox_fd_tb: all 16 entries against the S-box values and the
// interleaved parities tabulated in the article; no alarm with the right
// input parity, alarm with each wrong one; alarm when an output data bit
// of the table is stuck.
module spongent_sbox_fd_tb;
  int checks = 0, failures = 0;
  logic [3:0] x, y;
  logic [1:0] x_par, y_par;
  logic err;
  localparam logic [3:0] S [16] = '{4'hE, 4'hD, 4'hB, 4'h0, 4'h2, 4'h1, 4'h4, 4'hF,
                                    4'h7, 4'hA, 4'h8, 4'h5, 4'h9, 4'hC, 4'h3, 4'h6};
  localparam logic [1:0] P [16] = '{2'b01, 2'b01, 2'b10, 2'b00, 2'b01, 2'b01, 2'b10, 2'b00,
                                    2'b10, 2'b11, 2'b10, 2'b11, 2'b11, 2'b00, 2'b00, 2'b11};

  spongent_sbox_fd dut (.x, .x_par, .y, .y_par, .err);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int flagged = 0;
    for (int a = 0; a < 16; a++) begin
      logic [1:0] ip;
      x = 4'(a);
      ip = {x[3] ^ x[2], x[1] ^ x[0]};
      for (int e = 0; e < 4; e++) begin
        x_par = ip ^ 2'(e);
        #1;
        checks++; if (y !== S[a]) failures++;
        checks++; if (y_par !== P[a]) failures++;
        checks++; if (err !== (e != 0)) failures++;
      end
    end
    // stuck-at on an output data bit of the table
    force dut.y[2] = 1'b1;
    for (int a = 0; a < 16; a++) begin
      x = 4'(a); x_par = {x[3] ^ x[2], x[1] ^ x[0]};
      #1;
      if (!S[a][2]) begin checks++; if (!err) failures++; else flagged++; end
    end
    release dut.y;
    checks++; if (flagged != 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
