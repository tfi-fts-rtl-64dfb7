// Self-checking testbench for bma_lfsr.
// Two instances with the two primitive degree-4 connection polynomials are
// run from reset. Checks: every step matches an independent recurrence model;
// the period is 15 (maximal length) with all 15 non-zero states visited; the
// register holds when en is low; and a Berlekamp-Massey run on the produced
// bit stream returns linear complexity 4 and the instance's own connection
// polynomial.
`timescale 1ns / 1ps
module tb_bma_lfsr;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [3:0] st1, st2;
  int checks = 0, failures = 0;

  bma_lfsr #(.WIDTH(4), .TAPS(4'b1001), .SEED(4'b0001)) dut1 (.clk, .rst_n, .en, .state(st1));
  bma_lfsr #(.WIDTH(4), .TAPS(4'b1100), .SEED(4'b1010)) dut2 (.clk, .rst_n, .en, .state(st2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Berlekamp-Massey over GF(2): shortest LFSR generating bits[0..n-1].
  function automatic void bma(input bit bits[64], input int n, output int lin, output logic [31:0] conn);
    logic [31:0] c, b, t;
    int l, m;
    bit d;
    c = 32'd1; b = 32'd1; l = 0; m = 1;
    for (int k = 0; k < n; k++) begin
      d = bits[k];
      for (int i = 1; i <= l; i++) d ^= c[i] & bits[k-i];
      if (!d) m++;
      else if (2*l <= k) begin
        t = c; c = c ^ (b << m); l = k + 1 - l; b = t; m = 1;
      end else begin
        c = c ^ (b << m); m++;
      end
    end
    lin = l; conn = c;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit bits1[64], bits2[64];
    logic [3:0] m1, m2, first1;
    bit seen[16];
    int l1, l2, period;
    logic [31:0] conn1, conn2;
    repeat (2) @(posedge clk);
    check(st1 == 4'b0001 && st2 == 4'b1010, "reset loads seed");
    @(negedge clk) rst_n = 1'b1;
    // hold while en is low
    repeat (3) @(posedge clk);
    #1 check(st1 == 4'b0001 && st2 == 4'b1010, "holds with en low");
    @(negedge clk) en = 1'b1;
    m1 = 4'b0001; m2 = 4'b1010;
    first1 = st1; period = 0;
    foreach (seen[i]) seen[i] = 1'b0;
    for (int k = 0; k < 40; k++) begin
      @(posedge clk); #1;
      // independent model: new bit = XOR of tapped history bits
      m1 = {m1[2:0], m1[0] ^ m1[3]};          // 1 + x + x^4
      m2 = {m2[2:0], m2[2] ^ m2[3]};          // 1 + x^3 + x^4
      check(st1 == m1, $sformatf("lfsr1 step %0d: %b vs %b", k, st1, m1));
      check(st2 == m2, $sformatf("lfsr2 step %0d: %b vs %b", k, st2, m2));
      check(st1 != 4'b0 && st2 != 4'b0, "never all zero");
      bits1[k] = st1[0]; bits2[k] = st2[0];
      if (k < 15) seen[st1] = 1'b1;
      if (period == 0 && st1 == first1) period = k + 1;
    end
    check(period == 15, $sformatf("period 15, got %0d", period));
    for (int v = 1; v < 16; v++) check(seen[v], $sformatf("state %0d visited", v));
    bma(bits1, 40, l1, conn1);
    bma(bits2, 40, l2, conn2);
    check(l1 == 4 && conn1 == 32'b1_0011, $sformatf("BMA lfsr1 L=%0d C=%b", l1, conn1[4:0]));
    check(l2 == 4 && conn2 == 32'b1_1001, $sformatf("BMA lfsr2 L=%0d C=%b", l2, conn2[4:0]));
    // hold again
    @(negedge clk) en = 1'b0; m1 = st1;
    repeat (3) @(posedge clk);
    #1 check(st1 == m1, "holds after en drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
