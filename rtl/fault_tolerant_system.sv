// Fault tolerant system (FTS): triple modular redundancy around one 74-series
// circuit.
//
// Three copies of the circuit selected by CIRCUIT share the other inputs.
// Copy 1 takes its operand from the fault injector (fault_op), copies 2 and 3
// take the clean operand (clean_op). A bitwise 2-of-3 majority voter forms the
// result, so any fault confined to copy 1 is masked. disagree is high when the
// copies' outputs differ, i.e. when an injected fault reached an output of
// copy 1 and was outvoted. The copies c1..c3 are brought out for observation.
// Structure follows the design description (faults into circuit-1 only,
// circuits 2 and 3 fault free, majority voter c1c2 + c2c3 + c1c3); the
// disagree flag is this design's addition. Purely combinational.
`timescale 1ns / 1ps
module fault_tolerant_system
  import tfi_fts_pkg::*;
#(
  parameter circuit_e    CIRCUIT = C74283,
  parameter int unsigned OW      = other_width(CIRCUIT),
  parameter int unsigned RW      = result_width(CIRCUIT)
) (
  input  logic [FAULT_W-1:0] fault_op,
  input  logic [FAULT_W-1:0] clean_op,
  input  logic [OW-1:0]      other,
  output logic [RW-1:0]      c1,
  output logic [RW-1:0]      c2,
  output logic [RW-1:0]      c3,
  output logic [RW-1:0]      result,
  output logic               disagree
);

  circuit_74x #(.CIRCUIT(CIRCUIT), .OW(OW), .RW(RW)) u_circuit1 (
    .op(fault_op), .other, .result(c1)
  );
  circuit_74x #(.CIRCUIT(CIRCUIT), .OW(OW), .RW(RW)) u_circuit2 (
    .op(clean_op), .other, .result(c2)
  );
  circuit_74x #(.CIRCUIT(CIRCUIT), .OW(OW), .RW(RW)) u_circuit3 (
    .op(clean_op), .other, .result(c3)
  );

  majority_voter #(.W(RW)) u_voter (
    .c1, .c2, .c3, .voted(result), .disagree
  );

endmodule
