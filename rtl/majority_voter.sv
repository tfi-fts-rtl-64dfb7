// Bitwise two-out-of-three majority voter of the fault tolerant system.
//
// Each output bit is c1c2 + c2c3 + c1c3 (three AND terms and an OR), as the
// design description gives it, so a wrong value on any one input is masked.
// This design adds a disagree flag, high when the three inputs are not all
// equal: it shows that a fault reached one copy and was outvoted.
// Purely combinational.
`timescale 1ns / 1ps
module majority_voter #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] c1,
  input  logic [W-1:0] c2,
  input  logic [W-1:0] c3,
  output logic [W-1:0] voted,
  output logic         disagree
);

  always_comb begin
    voted    = (c1 & c2) | (c2 & c3) | (c1 & c3);
    disagree = (c1 != c2) || (c2 != c3);
  end

endmodule
