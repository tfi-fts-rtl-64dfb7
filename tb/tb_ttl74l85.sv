// Self-checking testbench for ttl74l85: all 2^11 input combinations are applied
// and every output is compared with the reference model of the part's
// published function table (tb_ref_pkg).
`timescale 1ns / 1ps
module tb_ttl74l85;
  import tb_ref_pkg::*;
  logic [10:0] v;
  logic [2:0] r, e;
  int checks = 0, failures = 0;

  ttl74l85 dut (.a(v[10:7]), .b(v[6:3]), .i_gt(v[2]), .i_lt(v[1]), .i_eq(v[0]), .a_gt_b(r[2]), .a_lt_b(r[1]), .a_eq_b(r[0]));

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 11); i++) begin
      v = 11'(i);
      #1;
      e = ref_74l85(v[10:7], v[6:3], v[2], v[1], v[0]);
      checks++;
      if (r !== e) begin
        failures++;
        if (failures < 20) $display("FAIL inputs=%b got=%b expected=%b", v, r, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
