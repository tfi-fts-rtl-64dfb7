// One copy of a protected 74-series circuit, seen through the generic bus
// shape of tfi_fts_pkg: op is the 4-bit input the fault injector may corrupt,
// other the remaining inputs, result all outputs (packing orders are listed in
// the package). CIRCUIT selects which part is built. Which input is the
// faulted one is this design's choice: operand A for the 74283, 74181 and
// 74L85, the four active-low propagate inputs for the 74182.
// Purely combinational.
`timescale 1ns / 1ps
module circuit_74x
  import tfi_fts_pkg::*;
#(
  parameter circuit_e    CIRCUIT = C74283,
  parameter int unsigned OW      = other_width(CIRCUIT),
  parameter int unsigned RW      = result_width(CIRCUIT)
) (
  input  logic [FAULT_W-1:0] op,
  input  logic [OW-1:0]      other,
  output logic [RW-1:0]      result
);

  generate
    case (CIRCUIT)
      C74283: begin : g_74283
        ttl74283 u_chip (
          .a(op), .b(other[4:1]), .c0(other[0]),
          .s(result[3:0]), .c4(result[4])
        );
      end
      C74182: begin : g_74182
        ttl74182 u_chip (
          .pn(op), .gn(other[4:1]), .cn(other[0]),
          .cnx(result[4]), .cny(result[3]), .cnz(result[2]),
          .gn_out(result[1]), .pn_out(result[0])
        );
      end
      C74181: begin : g_74181
        ttl74181 u_chip (
          .a(op), .b(other[9:6]), .s(other[5:2]), .m(other[1]), .cn(other[0]),
          .f(result[3:0]), .cn4(result[4]), .gn(result[5]), .pn(result[6]),
          .aeqb(result[7])
        );
      end
      default: begin : g_74l85
        ttl74l85 u_chip (
          .a(op), .b(other[6:3]), .i_gt(other[2]), .i_lt(other[1]), .i_eq(other[0]),
          .a_gt_b(result[2]), .a_lt_b(result[1]), .a_eq_b(result[0])
        );
      end
    endcase
  endgenerate

endmodule
