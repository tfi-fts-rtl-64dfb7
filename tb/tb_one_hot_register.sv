// Self-checking testbench for one_hot_register: after reset the register is
// zero; every clock with fault_sel high must load a word with exactly one bit
// set at position rand_word mod 4; every clock with fault_sel low clears it.
`timescale 1ns / 1ps
module tb_one_hot_register;
  logic clk = 1'b0, rst_n = 1'b0, sel = 1'b0;
  logic [3:0] rw = '0, oh;
  logic [3:0] expect_oh;
  int checks = 0, failures = 0;
  int pos_seen[4];

  one_hot_register #(.W(4)) dut (.clk, .rst_n, .fault_sel(sel), .rand_word(rw), .onehot(oh));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (pos_seen[i]) pos_seen[i] = 0;
    repeat (2) @(posedge clk);
    checks++; if (oh !== 4'd0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      sel = ($urandom % 4) != 0;
      rw  = 4'($urandom);
      expect_oh = 4'd0;
      if (sel) begin
        case (rw[1:0])
          2'd0: expect_oh = 4'b0001;
          2'd1: expect_oh = 4'b0010;
          2'd2: expect_oh = 4'b0100;
          default: expect_oh = 4'b1000;
        endcase
        pos_seen[rw[1:0]]++;
      end
      @(posedge clk); #1;
      checks++;
      if (oh !== expect_oh) begin
        failures++;
        $display("FAIL sel=%b rw=%h oh=%b exp=%b", sel, rw, oh, expect_oh);
      end
    end
    foreach (pos_seen[i]) begin
      checks++;
      if (pos_seen[i] == 0) begin failures++; $display("FAIL position %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
