// Self-checking testbench for tfi_fts, built once for each of the four
// 74-series circuits. Runs the evaluation workload: a 10 ns clock, injection
// enabled for 100 clocks with random operands, so 100 transient faults enter
// copy 1 of each circuit. Every cycle the voted result is compared with the
// reference model for the registered inputs, the faulted operand must differ
// from the user data in exactly one bit, and disagree must match the
// reference's view of whether the fault reached copy 1's output. At the end:
// 100 faults per circuit, all tolerated (100 % coverage), injected in 1000 ns.
`timescale 1ns / 1ps
module tb_tfi_fts;
  import tfi_fts_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  int injected[4], tolerated[4];
  realtime t_first[4], t_last[4];
  bit done[4];

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
  end

  for (genvar g = 0; g < 4; g++) begin : g_c
    localparam circuit_e C = circuit_e'(g);
    localparam int OW = other_width(C);
    localparam int RW = result_width(C);
    logic en = 1'b0;
    logic [3:0] ud = '0, fd;
    logic [OW-1:0] oth = '0;
    logic [RW-1:0] res;
    logic dis, fa;

    tfi_fts #(.CIRCUIT(C)) dut (
      .clk, .rst_n, .inject_en(en), .user_data(ud), .other_in(oth),
      .result(res), .disagree(dis), .fault_data(fd), .fault_active(fa)
    );

    initial begin
      logic [3:0] s_ud;
      logic [OW-1:0] s_oth;
      logic s_en;
      logic [RW-1:0] e_clean, e_fault;
      bit ok;
      injected[g] = 0; tolerated[g] = 0; done[g] = 1'b0;
      wait (rst_n);
      for (int k = 0; k < 120; k++) begin
        @(negedge clk);
        en  = (k >= 10 && k < 110);
        ud  = 4'($urandom);
        oth = OW'($urandom);
        s_ud = ud; s_oth = oth; s_en = en;
        @(posedge clk); #1;
        // new inputs right after the edge must not reach the outputs yet
        ud  = 4'($urandom);
        oth = OW'($urandom);
        #1;
        e_clean = RW'(ref_circuit(C, s_ud, 16'(s_oth)));
        e_fault = RW'(ref_circuit(C, fd, 16'(s_oth)));
        ok = (res === e_clean) && (fa === s_en) && (dis === (e_clean != e_fault))
             && ($countones(fd ^ s_ud) == (s_en ? 1 : 0));
        checks++;
        if (!ok) begin
          failures++;
          if (failures < 20)
            $display("FAIL %s k=%0d ud=%h fd=%h res=%b exp=%b dis=%b", C.name(), k, s_ud, fd,
                     res, e_clean, dis);
        end
        if (fa) begin
          if (injected[g] == 0) t_first[g] = $realtime;
          t_last[g] = $realtime;
          injected[g]++;
          if (res === e_clean) tolerated[g]++;
        end
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int g = 0; g < 4; g++) begin
      $display("circuit %s: faults injected=%0d tolerated=%0d coverage=%0d%% window=%0.0f ns",
               circuit_e'(g), injected[g], tolerated[g],
               injected[g] ? 100 * tolerated[g] / injected[g] : 0,
               t_last[g] - t_first[g] + 10.0);
      checks++;
      if (injected[g] != 100 || tolerated[g] != 100) begin
        failures++; $display("FAIL: expected 100 faults, all tolerated");
      end
      checks++;
      if (t_last[g] - t_first[g] + 10.0 != 1000.0) begin
        failures++; $display("FAIL: 100 faults should take 1000 ns");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
