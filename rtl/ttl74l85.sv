// 74L85: 4-bit magnitude comparator with cascade inputs, one of the four
// benchmark circuits protected by the fault tolerant system.
//
// If A > B or A < B the matching output is high and the others low. If A == B
// the cascade inputs decide, as in the standard part's function table:
// i_eq high gives A=B only; otherwise a_gt_b = ~i_lt and a_lt_b = ~i_gt, and
// a_eq_b is low. Written from the function of the standard part. Purely
// combinational.
`timescale 1ns / 1ps
module ttl74l85 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       i_gt,
  input  logic       i_lt,
  input  logic       i_eq,
  output logic       a_gt_b,
  output logic       a_lt_b,
  output logic       a_eq_b
);

  always_comb begin
    if (a > b) begin
      a_gt_b = 1'b1; a_lt_b = 1'b0; a_eq_b = 1'b0;
    end else if (a < b) begin
      a_gt_b = 1'b0; a_lt_b = 1'b1; a_eq_b = 1'b0;
    end else begin
      a_eq_b = i_eq;
      a_gt_b = ~i_eq & ~i_lt;
      a_lt_b = ~i_eq & ~i_gt;
    end
  end

endmodule
