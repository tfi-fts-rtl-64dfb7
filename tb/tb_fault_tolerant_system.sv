// Self-checking testbench for fault_tolerant_system, built once for each of
// the four 74-series circuits. Random operands and other inputs are applied;
// copy 1 gets the operand with one random bit flipped (or none, one time in
// five). Checks against the reference models: copy 1 shows the faulted
// circuit's output, copies 2 and 3 and the voted result the fault-free one,
// and disagree is high exactly when the fault changed copy 1's output.
`timescale 1ns / 1ps
module tb_fault_tolerant_system;
  import tfi_fts_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  int masked[4], silent[4];
  bit done[4];

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 4; g++) begin : g_c
    localparam circuit_e C = circuit_e'(g);
    localparam int OW = other_width(C);
    localparam int RW = result_width(C);
    logic [3:0] fop, cop;
    logic [OW-1:0] oth;
    logic [RW-1:0] c1, c2, c3, res;
    logic dis;

    fault_tolerant_system #(.CIRCUIT(C)) dut (
      .fault_op(fop), .clean_op(cop), .other(oth),
      .c1, .c2, .c3, .result(res), .disagree(dis)
    );

    initial begin
      logic [RW-1:0] e_clean, e_fault;
      masked[g] = 0; silent[g] = 0; done[g] = 1'b0;
      for (int k = 0; k < 1000; k++) begin
        cop = 4'($urandom);
        fop = (k % 5 == 0) ? cop : cop ^ 4'(1 << ($urandom % 4));
        oth = OW'($urandom);
        #1;
        e_clean = RW'(ref_circuit(C, cop, 16'(oth)));
        e_fault = RW'(ref_circuit(C, fop, 16'(oth)));
        checks++;
        if (res !== e_clean || c2 !== e_clean || c3 !== e_clean || c1 !== e_fault
            || dis !== (e_clean != e_fault)) begin
          failures++;
          if (failures < 20)
            $display("FAIL %s: op=%h fop=%h oth=%h res=%b c1=%b exp=%b/%b dis=%b", C.name(),
                     cop, fop, oth, res, c1, e_clean, e_fault, dis);
        end
        if (fop != cop) begin
          if (e_clean != e_fault) masked[g]++;
          else silent[g]++;
        end
        #1;
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int g = 0; g < 4; g++) begin
      $display("circuit %0d: faults outvoted=%0d, faults with no output effect=%0d",
               g, masked[g], silent[g]);
      checks++;
      if (masked[g] == 0) begin failures++; $display("FAIL: no fault reached copy 1 output"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
