// Self-checking testbench for ttl74181: all 2^14 input combinations are applied
// and every output is compared with the reference model of the part's
// published function table (tb_ref_pkg).
`timescale 1ns / 1ps
module tb_ttl74181;
  import tb_ref_pkg::*;
  logic [13:0] v;
  logic [7:0] r, e;
  int checks = 0, failures = 0;

  ttl74181 dut (.a(v[13:10]), .b(v[9:6]), .s(v[5:2]), .m(v[1]), .cn(v[0]), .f(r[3:0]), .cn4(r[4]), .gn(r[5]), .pn(r[6]), .aeqb(r[7]));

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 14); i++) begin
      v = 14'(i);
      #1;
      e = ref_74181(v[13:10], v[9:6], v[5:2], v[1], v[0]);
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
