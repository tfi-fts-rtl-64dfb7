// Self-checking testbench for majority_voter: every combination of three
// 2-bit words (exhaustive), then random 8-bit words; each result bit is
// compared with a count of ones among the three inputs, and disagree with a
// direct equality test.
`timescale 1ns / 1ps
module tb_majority_voter;
  logic [1:0] a2, b2, c2, v2;
  logic d2;
  logic [7:0] a8, b8, c8, v8;
  logic d8;
  int checks = 0, failures = 0;

  majority_voter #(.W(2)) dut2 (.c1(a2), .c2(b2), .c3(c2), .voted(v2), .disagree(d2));
  majority_voter #(.W(8)) dut8 (.c1(a8), .c2(b8), .c3(c8), .voted(v8), .disagree(d8));

  function automatic logic [7:0] vote_ref(input logic [7:0] x, y, z);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = (int'(x[i]) + int'(y[i]) + int'(z[i])) >= 2;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      {a2, b2, c2} = 6'(i);
      #1;
      checks++;
      if (v2 !== vote_ref({6'd0, a2}, {6'd0, b2}, {6'd0, c2})
          || d2 !== !(a2 == b2 && b2 == c2)) begin
        failures++; $display("FAIL %b %b %b -> %b %b", a2, b2, c2, v2, d2);
      end
    end
    for (int i = 0; i < 500; i++) begin
      a8 = 8'($urandom);
      b8 = (i % 3 == 0) ? a8 : 8'($urandom);
      c8 = (i % 4 == 0) ? a8 ^ 8'(1 << (i % 8)) : 8'($urandom);
      #1;
      checks++;
      if (v8 !== vote_ref(a8, b8, c8) || d8 !== !(a8 == b8 && b8 == c8)) begin
        failures++; $display("FAIL %h %h %h -> %h %b", a8, b8, c8, v8, d8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
