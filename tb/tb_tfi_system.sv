// Self-checking testbench for tfi_system.
// An independent model of the two LFSRs, the XOR/control path and the one-hot
// position predicts, for every clock, the registered data and the faulted
// output. The run applies 100 clocks with injection enabled at a 10 ns clock
// and checks that they give exactly 100 single-bit faults in 1000 ns, then
// checks that with injection disabled the user data passes unchanged.
`timescale 1ns / 1ps
module tb_tfi_system;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [3:0] ud = '0, dq, fo, oh;
  logic fa;
  int checks = 0, failures = 0;
  int faults = 0, clean_cycles = 0;
  int pos_count[4];
  realtime t_first, t_last;

  tfi_system dut (.clk, .rst_n, .inject_en(en), .user_data(ud),
                  .data_q(dq), .fault_out(fo), .onehot(oh), .fault_active(fa));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] m1, m2, e_oh, e_ud;
    logic       e_en;
    foreach (pos_count[i]) pos_count[i] = 0;
    m1 = 4'b0001; m2 = 4'b1010;
    repeat (2) @(posedge clk);
    #1 check(dq == 4'd0 && oh == 4'd0 && !fa, "reset state");
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 160; k++) begin
      e_en = (k >= 10 && k < 110);
      en = e_en;
      ud = 4'($urandom);
      e_ud = ud;
      // model: position from the XOR of the LFSR states before this edge
      e_oh = e_en ? 4'(1 << ((m1 ^ m2) & 4'd3)) : 4'd0;
      @(posedge clk);
      m1 = {m1[2:0], m1[0] ^ m1[3]};
      m2 = {m2[2:0], m2[2] ^ m2[3]};
      #1;
      check(dq == e_ud, $sformatf("cycle %0d data_q %h vs %h", k, dq, e_ud));
      check(oh == e_oh, $sformatf("cycle %0d onehot %b vs %b", k, oh, e_oh));
      check(fo == (e_ud ^ e_oh), $sformatf("cycle %0d fault_out %h", k, fo));
      check(fa == e_en, $sformatf("cycle %0d fault_active %b", k, fa));
      if (fa && $countones(fo ^ dq) == 1) begin
        if (faults == 0) t_first = $realtime;
        t_last = $realtime;
        faults++;
        for (int i = 0; i < 4; i++) if (oh[i]) pos_count[i]++;
      end
      if (!fa && fo == dq) clean_cycles++;
      @(negedge clk);
    end
    check(faults == 100, $sformatf("100 faults injected, got %0d", faults));
    check(t_last - t_first + 10.0 == 1000.0,
          $sformatf("100 faults take 1000 ns, took %0.1f ns", t_last - t_first + 10.0));
    check(clean_cycles == 60, $sformatf("60 clean cycles, got %0d", clean_cycles));
    foreach (pos_count[i]) check(pos_count[i] > 0, $sformatf("bit %0d faulted", i));
    $display("faults=%0d per bit=%0d/%0d/%0d/%0d", faults, pos_count[0], pos_count[1],
             pos_count[2], pos_count[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
