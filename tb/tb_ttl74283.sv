// Self-checking testbench for ttl74283: all 2^9 input combinations are applied
// and every output is compared with the reference model of the part's
// published function table (tb_ref_pkg).
`timescale 1ns / 1ps
module tb_ttl74283;
  import tb_ref_pkg::*;
  logic [8:0] v;
  logic [4:0] r, e;
  int checks = 0, failures = 0;

  ttl74283 dut (.a(v[8:5]), .b(v[4:1]), .c0(v[0]), .s(r[3:0]), .c4(r[4]));

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 9); i++) begin
      v = 9'(i);
      #1;
      e = ref_74283(v[8:5], v[4:1], v[0]);
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
