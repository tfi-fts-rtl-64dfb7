// Shared types and sizes for the transient fault injection / fault tolerance
// (TFI-FTS) design.
//
// Every protected circuit is seen through one generic bus shape: a 4-bit
// operand that the fault injector can corrupt (FAULT_W), the remaining inputs
// packed into one vector (other_width), and all outputs packed into one vector
// (result_width). The four 74-series circuits the design is evaluated with are
// listed in circuit_e; the packing order of each is given next to the widths.
`timescale 1ns / 1ps
package tfi_fts_pkg;

  // Width of the fault injector's random words, one-hot word and faulted data.
  localparam int unsigned FAULT_W = 4;

  typedef enum logic [1:0] {
    C74283 = 2'd0,  // 4-bit binary full adder
    C74182 = 2'd1,  // look-ahead carry generator
    C74181 = 2'd2,  // 4-bit ALU
    C74L85 = 2'd3   // 4-bit magnitude comparator
  } circuit_e;

  // Remaining (never faulted) inputs of each circuit:
  //   74283: {B[3:0], C0}
  //   74182: {Gn[3:0], Cn}
  //   74181: {B[3:0], S[3:0], M, Cn}
  //   74L85: {B[3:0], I_gt, I_lt, I_eq}
  function automatic int unsigned other_width(circuit_e c);
    case (c)
      C74283:  return 5;
      C74182:  return 5;
      C74181:  return 10;
      default: return 7;
    endcase
  endfunction

  // Outputs of each circuit:
  //   74283: {C4, S[3:0]}
  //   74182: {Cnx, Cny, Cnz, Gn, Pn}
  //   74181: {AeqB, Pn, Gn, Cn4, F[3:0]}
  //   74L85: {A_gt_B, A_lt_B, A_eq_B}
  function automatic int unsigned result_width(circuit_e c);
    case (c)
      C74283:  return 5;
      C74182:  return 5;
      C74181:  return 8;
      default: return 3;
    endcase
  endfunction

endpackage
