// chacha_qr_reeo_tb: REEO quarter round with one and with two sub-pipeline
// stages: results, latency STAGES+3, no false alarm without faults, and detection of stuck-at faults forced on an adder output and on an XOR/rotate output.
// Faults are modelled with force on internal nets; a fault is counted as
// masked when the output stays correct.
module chacha_qr_reeo_tb;
  import chacha_pkg::*;
  import tb_ref_pkg::*;
  localparam int LAT = 4;
  int checks = 0, failures = 0;
  int corrupted = 0, flagged = 0, flagged_ok = 0, runs = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, busy, out_valid, err;
  qr_t in_q, out_q;

  chacha_qr_reeo #(.STAGES(1)) dut (.clk, .rst_n, .in_valid, .in_q, .busy, .out_valid, .out_q, .err);

  // two-stage sub-pipelined variant, driven by the same inputs
  logic busy2, out_valid2, err2;
  qr_t  out_q2;
  chacha_qr_reeo #(.STAGES(2)) dut2 (.clk, .rst_n, .in_valid, .in_q, .busy(busy2),
    .out_valid(out_valid2), .out_q(out_q2), .err(err2));

  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one quarter round; returns the latency in cycles
  task automatic run(input qr_t q, output int lat);
    @(negedge clk);
    in_q = q; in_valid = 1;
    lat = 0;
    @(negedge clk); in_valid = 0; lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
  endtask

  task automatic campaign();
    for (int i = 0; i < 300; i++) begin
      qr_t q; int lat;
      q = {$urandom, $urandom, $urandom, $urandom};
      run(q, lat);
      runs++;
      if (out_q !== qr_t'(qr128(q))) begin
        corrupted++;
        if (err) flagged++;
      end else if (err) flagged_ok++;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fault free
    for (int i = 0; i < 500; i++) begin
      qr_t q; int lat;
      q = {$urandom, $urandom, $urandom, $urandom};
      if (i == 0) q = '{a: 32'h11111111, b: 32'h01020304, c: 32'h9b8d6f43, d: 32'h01234567};
      run(q, lat);
      checks++; if (out_q !== qr_t'(qr128(q))) failures++;
      checks++; if (err !== 1'b0) failures++;
      checks++; if (lat != LAT) begin failures++; $display("latency %0d", lat); end
    end
    // two-stage variant: one cycle more latency, same results
    for (int i = 0; i < 200; i++) begin
      qr_t q; int lat;
      q = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      in_q = q; in_valid = 1;
      @(negedge clk); in_valid = 0; lat = 1;
      while (!out_valid2) begin @(negedge clk); lat++; end
      checks++; if (out_q2 !== qr_t'(qr128(q))) failures++;
      checks++; if (err2 !== 1'b0) failures++;
      checks++; if (lat != LAT + 1) begin failures++; $display("latency2 %0d", lat); end
    end
    // stuck-at fault 1
    force dut.g_step[1].sum[3] = 1'b1;
    campaign();
    release dut.g_step[1].sum;
    // stuck-at fault 2
    force dut.g_step[2].nx.d[20] = 1'b0;
    campaign();
    release dut.g_step[2].nx;
    $display("faulty runs=%0d corrupted=%0d flagged=%0d alarms_on_masked=%0d",
             runs, corrupted, flagged, flagged_ok);
    checks++; if (corrupted == 0) failures++;          // the faults must bite
    checks++; if (flagged != corrupted) failures++;    // every corrupted result flagged
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
