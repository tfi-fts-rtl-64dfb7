// Self-checking testbench for fault_data_register: the registered user data
// must appear one clock after it is applied, and fault_out must be that data
// with exactly the bits set in onehot flipped.
`timescale 1ns / 1ps
module tb_fault_data_register;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] ud = '0, oh = '0, dq, fo;
  logic [3:0] sampled;
  int checks = 0, failures = 0;

  fault_data_register #(.W(4)) dut (.clk, .rst_n, .user_data(ud), .onehot(oh), .data_q(dq), .fault_out(fo));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++; if (dq !== 4'd0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      ud = 4'($urandom);
      sampled = ud;
      @(posedge clk); #1;
      ud = 4'($urandom);          // must not reach the register before the next edge
      oh = (k % 5 == 0) ? 4'd0 : 4'(1 << ($urandom % 4));
      #1;
      checks++;
      if (dq !== sampled || fo !== (sampled ^ oh)) begin
        failures++;
        $display("FAIL sampled=%h oh=%b dq=%h fo=%h", sampled, oh, dq, fo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
