// sc_csel_adder_tb: sums and carries for both carry-in values, checker
// output complementary when fault free, and non-complementary when a
// stuck-at fault is forced on a sum bit of either ripple-carry adder.
module sc_csel_adder_tb;
  localparam int W = 32;
  int checks = 0, failures = 0, detected = 0, injected = 0;
  logic fv;
  logic [W-1:0] a, b, s;
  logic cin, cout;
  logic [1:0] chk;

  sc_csel_adder #(.W(W)) dut (.a, .b, .cin, .s, .cout, .chk);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a = $urandom; b = $urandom; cin = $urandom;
      if (i % 5 == 0) b = ~a;
      #1;
      checks++;
      if ({cout, s} !== 33'(a) + 33'(b) + 33'(cin)) failures++;
      checks++;
      if (chk[1] == chk[0]) failures++;
    end
    // stuck-at faults on the internal sums: the checker must react whenever
    // the stuck value differs from the fault-free one
    for (int i = 0; i < 400; i++) begin
      int bitn;
      a = $urandom; b = $urandom; cin = 0;
      bitn = i % 8;
      #1;
      // stuck at the complement of the fault-free value, on bit bitn*4+1
      case ({i % 2 == 0, bitn})
        {1'b1, 32'd0}: begin fv = ~dut.s0[1]; force dut.s0[1] = fv; end
        {1'b1, 32'd1}: begin fv = ~dut.s0[5]; force dut.s0[5] = fv; end
        {1'b1, 32'd2}: begin fv = ~dut.s0[9]; force dut.s0[9] = fv; end
        {1'b1, 32'd3}: begin fv = ~dut.s0[13]; force dut.s0[13] = fv; end
        {1'b0, 32'd4}: begin fv = ~dut.s1[17]; force dut.s1[17] = fv; end
        {1'b0, 32'd5}: begin fv = ~dut.s1[21]; force dut.s1[21] = fv; end
        {1'b0, 32'd6}: begin fv = ~dut.s1[25]; force dut.s1[25] = fv; end
        default:       begin fv = ~dut.s1[31]; force dut.s1[31] = fv; end
      endcase
      #1;
      injected++;
      if (chk[1] == chk[0]) detected++;
      release dut.s0; release dut.s1;
      #1;
    end
    checks++;
    if (detected != injected) begin
      failures++; $display("detected %0d of %0d", detected, injected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
