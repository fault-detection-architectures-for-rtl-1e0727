// spongent_lcounter_tb: the 6-bit and 7-bit round counters against an
// independent LFSR model over a full period, load behaviour, and the
// parity check reacting to a flipped counter bit.
module spongent_lcounter_tb;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [5:0] c6;
  logic [6:0] c7;
  logic e6, e7;

  always #5 clk = ~clk;

  spongent_lcounter #(.W(6), .INIT(6'h05), .TAPS(6'h30)) u6 (.clk, .rst_n, .load, .step, .cnt(c6), .err(e6));
  spongent_lcounter #(.W(7), .INIT(7'h7A), .TAPS(7'h60)) u7 (.clk, .rst_n, .load, .step, .cnt(c7), .err(e7));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r6, r7;
    repeat (2) @(negedge clk);
    rst_n = 1;
    r6 = 5; r7 = 'h7A;
    for (int i = 0; i < 140; i++) begin
      checks++; if (c6 !== 6'(r6) || c7 !== 7'(r7)) failures++;
      checks++; if (e6 || e7) failures++;
      step = (i % 3 != 2);
      @(negedge clk);
      if (step) begin r6 = lfsr_next(r6, 6); r7 = lfsr_next(r7, 7); end
    end
    step = 0; load = 1; @(negedge clk); load = 0;
    checks++; if (c6 !== 6'h05 || c7 !== 7'h7A) failures++;
    // single-bit upset in the counter register
    force u6.cnt[2] = ~u6.cnt[2];
    #1;
    checks++; if (!e6) failures++;
    release u6.cnt;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
