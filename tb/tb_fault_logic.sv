// Self-checking testbench for fault_logic: all 512 combinations of the two
// random words and the user control are applied and compared with the
// expected XOR word and path selection.
`timescale 1ns / 1ps
module tb_fault_logic;
  logic [3:0] l1, l2, rw;
  logic en, sel;
  int checks = 0, failures = 0;

  fault_logic #(.W(4)) dut (.lfsr1(l1), .lfsr2(l2), .inject_en(en), .fault_sel(sel), .rand_word(rw));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {en, l1, l2} = 9'(i);
      #1;
      checks++;
      if (sel !== en || rw !== (en ? (l1 ^ l2) : 4'd0)) begin
        failures++;
        $display("FAIL en=%b l1=%h l2=%h sel=%b rw=%h", en, l1, l2, sel, rw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
