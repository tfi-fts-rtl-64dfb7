// End-to-end testbench for tfi_fts_top at its default parameters.
// All four TFI-FTS instances run together on a 10 ns clock. The stimulus
// goes through phases: injection off; the evaluation run of 100 clocks with
// injection on for every circuit; injection toggled at random per circuit;
// a reset in mid-run; injection on again. Every cycle and every circuit, the
// voted result is compared with the reference model of the registered inputs,
// the faulted operand must carry exactly one flipped bit when a fault is
// active and none otherwise, and disagree must show whether the fault reached
// copy 1's output. Counted and required at least once per circuit: a fault
// injected, a fault outvoted, a clean cycle with injection off, each of the
// four bit positions faulted, and the reset. Required in the evaluation run:
// 100 faults per circuit, all tolerated, in 1000 ns.
`timescale 1ns / 1ps
module tb_tfi_fts_top;
  import tfi_fts_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0]  en;
  logic [3:0]  ud [4];
  logic [15:0] oth[4];
  logic [15:0] res[4];
  logic [3:0]  fd [4];
  logic [3:0]  dis, fa;

  int checks = 0, failures = 0;
  int n_fault[4], n_outvoted[4], n_clean[4], n_bit[4][4], n_reset = 0;
  int eval_faults[4], eval_tolerated[4];

  tfi_fts_top dut (
    .clk, .rst_n,
    .a283_inject_en(en[0]), .a283_user_data(ud[0]), .a283_other_in(oth[0][4:0]),
    .a283_result(res[0][4:0]), .a283_disagree(dis[0]), .a283_fault_data(fd[0]),
    .a283_fault_active(fa[0]),
    .c182_inject_en(en[1]), .c182_user_data(ud[1]), .c182_other_in(oth[1][4:0]),
    .c182_result(res[1][4:0]), .c182_disagree(dis[1]), .c182_fault_data(fd[1]),
    .c182_fault_active(fa[1]),
    .alu181_inject_en(en[2]), .alu181_user_data(ud[2]), .alu181_other_in(oth[2][9:0]),
    .alu181_result(res[2][7:0]), .alu181_disagree(dis[2]), .alu181_fault_data(fd[2]),
    .alu181_fault_active(fa[2]),
    .cmp85_inject_en(en[3]), .cmp85_user_data(ud[3]), .cmp85_other_in(oth[3][6:0]),
    .cmp85_result(res[3][2:0]), .cmp85_disagree(dis[3]), .cmp85_fault_data(fd[3]),
    .cmp85_fault_active(fa[3])
  );

  // unused upper result bits are tied low so whole words can be compared
  assign res[0][15:5] = '0;
  assign res[1][15:5] = '0;
  assign res[2][15:8] = '0;
  assign res[3][15:3] = '0;

  always #5 clk = ~clk;

  function automatic logic [15:0] mask_of(int g);
    return 16'((1 << result_width(circuit_e'(g))) - 1);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // one clock: apply inputs, then check the outputs they produce
  task automatic step(input logic [3:0] en_v, input bit eval);
    logic [3:0]  s_ud[4];
    logic [15:0] s_oth[4];
    logic [15:0] e_clean, e_fault;
    @(negedge clk);
    en = en_v;
    for (int g = 0; g < 4; g++) begin
      ud[g]  = 4'($urandom);
      oth[g] = 16'($urandom) & 16'((1 << other_width(circuit_e'(g))) - 1);
      s_ud[g] = ud[g]; s_oth[g] = oth[g];
    end
    @(posedge clk); #1;
    // new inputs right after the edge must not reach the outputs yet
    for (int g = 0; g < 4; g++) begin
      ud[g]  = 4'($urandom);
      oth[g] = 16'($urandom) & 16'((1 << other_width(circuit_e'(g))) - 1);
    end
    #1;
    for (int g = 0; g < 4; g++) begin
      e_clean = ref_circuit(circuit_e'(g), s_ud[g], s_oth[g]) & mask_of(g);
      e_fault = ref_circuit(circuit_e'(g), fd[g], s_oth[g]) & mask_of(g);
      check(res[g] == e_clean, $sformatf("circuit %0d result %h expected %h", g, res[g], e_clean));
      check(fa[g] == en_v[g], $sformatf("circuit %0d fault_active", g));
      check($countones(fd[g] ^ s_ud[g]) == (en_v[g] ? 1 : 0),
            $sformatf("circuit %0d fault data %h from %h", g, fd[g], s_ud[g]));
      check(dis[g] == (e_clean != e_fault), $sformatf("circuit %0d disagree", g));
      if (fa[g]) begin
        n_fault[g]++;
        for (int i = 0; i < 4; i++) if (fd[g][i] != s_ud[g][i]) n_bit[g][i]++;
        if (dis[g]) n_outvoted[g]++;
        if (eval) begin
          eval_faults[g]++;
          if (res[g] == e_clean) eval_tolerated[g]++;
        end
      end else if (fd[g] == s_ud[g]) n_clean[g]++;
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1;
    en = '0;
    for (int g = 0; g < 4; g++) begin
      ud[g] = '0; oth[g] = '0; n_fault[g] = 0; n_outvoted[g] = 0; n_clean[g] = 0;
      eval_faults[g] = 0; eval_tolerated[g] = 0;
      for (int i = 0; i < 4; i++) n_bit[g][i] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // injection off
    repeat (10) step(4'b0000, 1'b0);
    // evaluation run: 100 faults per circuit
    t0 = $realtime;
    repeat (100) step(4'b1111, 1'b1);
    t1 = $realtime;
    check(t1 - t0 == 1000.0, $sformatf("evaluation run took %0.1f ns", t1 - t0));
    // injection switched per circuit at random
    repeat (60) step(4'($urandom), 1'b0);
    // reset in mid-run: outputs return to the reset state
    @(negedge clk) rst_n = 1'b0;
    #1;
    for (int g = 0; g < 4; g++)
      check(fa[g] == 1'b0 && fd[g] == 4'd0, $sformatf("circuit %0d reset", g));
    n_reset++;
    @(negedge clk) rst_n = 1'b1;
    repeat (30) step(4'b1111, 1'b0);

    for (int g = 0; g < 4; g++) begin
      $display("circuit %s: faults=%0d outvoted=%0d clean=%0d bits=%0d/%0d/%0d/%0d eval %0d/%0d",
               circuit_e'(g), n_fault[g], n_outvoted[g], n_clean[g], n_bit[g][0], n_bit[g][1],
               n_bit[g][2], n_bit[g][3], eval_tolerated[g], eval_faults[g]);
      check(eval_faults[g] == 100 && eval_tolerated[g] == 100,
            $sformatf("circuit %0d: 100 faults all tolerated", g));
      check(n_fault[g] > 0, $sformatf("circuit %0d: fault injected", g));
      check(n_outvoted[g] > 0, $sformatf("circuit %0d: fault outvoted", g));
      check(n_clean[g] > 0, $sformatf("circuit %0d: clean cycle", g));
      for (int i = 0; i < 4; i++)
        check(n_bit[g][i] > 0, $sformatf("circuit %0d: bit %0d faulted", g, i));
    end
    check(n_reset == 1, "reset in mid-run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
