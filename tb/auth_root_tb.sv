// auth_root_tb: builds random trees with the independent model, takes the
// authentication path of random leaves and checks that the engine returns
// the root; with reduced rounds and height, and a REEO node hash.
module auth_root_tb;
  import chacha_pkg::*;
  import tb_ref_pkg::*;
  localparam int H = 3, NR = 4, NL = 1 << H;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done, err;
  logic [H-1:0] idx;
  logic [255:0] leaf, root;
  logic [H-1:0][255:0] auth;
  logic [H-1:0][511:0] masks;

  always #5 clk = ~clk;

  auth_root #(.H(H), .ROUNDS(NR), .SCHEME(QR_REEO)) dut (
    .clk, .rst_n, .start, .idx, .leaf, .auth, .masks, .busy, .done, .root, .err);

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      logic [255:0] nodes [H+1][NL];
      logic [255:0] lv [];
      logic [511:0] q [];
      lv = new[NL]; q = new[H];
      for (int j = 0; j < H; j++) for (int w = 0; w < 16; w++) masks[j][32*w +: 32] = $urandom;
      for (int j = 0; j < H; j++) q[j] = masks[j];
      for (int i = 0; i < NL; i++) begin
        for (int w = 0; w < 8; w++) nodes[0][i][32*w +: 32] = $urandom;
        lv[i] = nodes[0][i];
      end
      for (int j = 1; j <= H; j++)
        for (int i = 0; i < (NL >> j); i++)
          nodes[j][i] = ref_h({nodes[j-1][2*i+1], nodes[j-1][2*i]} ^ masks[j-1], NR);
      checks++; if (nodes[H][0] !== ref_root(lv, q, NR)) failures++;
      for (int r = 0; r < 2; r++) begin
        int li = $urandom_range(NL - 1);
        idx = H'(li); leaf = nodes[0][li];
        for (int j = 0; j < H; j++) auth[j] = nodes[j][(li >> j) ^ 1];
        @(negedge clk); start = 1;
        @(negedge clk); start = 0;
        while (!done) @(negedge clk);
        checks++; if (root !== nodes[H][0]) failures++;
        checks++; if (err) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
