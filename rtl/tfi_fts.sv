// TFI-FTS for one 74-series circuit: the transient fault injector feeding the
// triple modular redundant circuit.
//
// user_data is the 4-bit operand that the injector may corrupt; other_in are
// the circuit's remaining inputs. Both are registered on the same clock edge
// (user_data in the injector's data register, other_in in an input register
// here), so all three circuit copies see inputs of the same cycle. Copy 1 gets
// the injector's fault output, copies 2 and 3 the clean registered operand;
// the voter's result is the circuit's fault-tolerant output.
// Following the design description: injector and FTS joined into one top
// per circuit, faults only into circuit-1. This design's choice: the other
// inputs pass through an input register to stay aligned with the data
// register; reset is asynchronous and active low.
// Timing: inputs sampled at a clock edge give result, disagree, fault_data and
// fault_active right after that edge; one fault per clock while inject_en is
// high.
`timescale 1ns / 1ps
module tfi_fts
  import tfi_fts_pkg::*;
#(
  parameter circuit_e    CIRCUIT = C74283,
  parameter int unsigned OW      = other_width(CIRCUIT),
  parameter int unsigned RW      = result_width(CIRCUIT)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               inject_en,
  input  logic [FAULT_W-1:0] user_data,
  input  logic [OW-1:0]      other_in,
  output logic [RW-1:0]      result,
  output logic               disagree,
  output logic [FAULT_W-1:0] fault_data,
  output logic               fault_active
);

  logic [FAULT_W-1:0] clean_op;
  logic [OW-1:0]      other_q;
  logic [RW-1:0]      c2, c3;

  tfi_system u_tfi (
    .clk, .rst_n, .inject_en, .user_data,
    .data_q(clean_op), .fault_out(fault_data), .onehot(), .fault_active
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) other_q <= '0;
    else        other_q <= other_in;
  end

  fault_tolerant_system #(.CIRCUIT(CIRCUIT), .OW(OW), .RW(RW)) u_fts (
    .fault_op(fault_data), .clean_op, .other(other_q),
    .c1(), .c2, .c3, .result, .disagree
  );

  // Copies 2 and 3 are fault free, so they agree and a fault confined to
  // copy 1 can never change the voted result.
  assert property (@(posedge clk) disable iff (!rst_n) result == c2 && c2 == c3);

endmodule
