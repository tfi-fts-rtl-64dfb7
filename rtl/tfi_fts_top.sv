// Top level: the TFI-FTS built for each of the four 74-series circuits the
// design is evaluated with (74283 adder, 74182 carry look-ahead generator,
// 74181 ALU, 74L85 comparator), side by side on one clock and reset.
// Each instance has its own fault-injection enable, operand, other inputs,
// result and status ports (prefixes a283_, c182_, alu181_, cmp85_); the
// packing of other_in and result is given in tfi_fts_pkg.
// The design description synthesizes one TFI-FTS per circuit; placing all
// four in one top is this design's choice, so that a single build covers them.
// Timing: each instance has a latency of one clock from inputs to result.
`timescale 1ns / 1ps
module tfi_fts_top
  import tfi_fts_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst_n,
  // 74283 adder
  input  logic                               a283_inject_en,
  input  logic [FAULT_W-1:0]                 a283_user_data,
  input  logic [other_width(C74283)-1:0]     a283_other_in,
  output logic [result_width(C74283)-1:0]    a283_result,
  output logic                               a283_disagree,
  output logic [FAULT_W-1:0]                 a283_fault_data,
  output logic                               a283_fault_active,
  // 74182 carry look-ahead generator
  input  logic                               c182_inject_en,
  input  logic [FAULT_W-1:0]                 c182_user_data,
  input  logic [other_width(C74182)-1:0]     c182_other_in,
  output logic [result_width(C74182)-1:0]    c182_result,
  output logic                               c182_disagree,
  output logic [FAULT_W-1:0]                 c182_fault_data,
  output logic                               c182_fault_active,
  // 74181 ALU
  input  logic                               alu181_inject_en,
  input  logic [FAULT_W-1:0]                 alu181_user_data,
  input  logic [other_width(C74181)-1:0]     alu181_other_in,
  output logic [result_width(C74181)-1:0]    alu181_result,
  output logic                               alu181_disagree,
  output logic [FAULT_W-1:0]                 alu181_fault_data,
  output logic                               alu181_fault_active,
  // 74L85 comparator
  input  logic                               cmp85_inject_en,
  input  logic [FAULT_W-1:0]                 cmp85_user_data,
  input  logic [other_width(C74L85)-1:0]     cmp85_other_in,
  output logic [result_width(C74L85)-1:0]    cmp85_result,
  output logic                               cmp85_disagree,
  output logic [FAULT_W-1:0]                 cmp85_fault_data,
  output logic                               cmp85_fault_active
);

  tfi_fts #(.CIRCUIT(C74283)) u_74283 (
    .clk, .rst_n, .inject_en(a283_inject_en), .user_data(a283_user_data),
    .other_in(a283_other_in), .result(a283_result), .disagree(a283_disagree),
    .fault_data(a283_fault_data), .fault_active(a283_fault_active)
  );

  tfi_fts #(.CIRCUIT(C74182)) u_74182 (
    .clk, .rst_n, .inject_en(c182_inject_en), .user_data(c182_user_data),
    .other_in(c182_other_in), .result(c182_result), .disagree(c182_disagree),
    .fault_data(c182_fault_data), .fault_active(c182_fault_active)
  );

  tfi_fts #(.CIRCUIT(C74181)) u_74181 (
    .clk, .rst_n, .inject_en(alu181_inject_en), .user_data(alu181_user_data),
    .other_in(alu181_other_in), .result(alu181_result), .disagree(alu181_disagree),
    .fault_data(alu181_fault_data), .fault_active(alu181_fault_active)
  );

  tfi_fts #(.CIRCUIT(C74L85)) u_74l85 (
    .clk, .rst_n, .inject_en(cmp85_inject_en), .user_data(cmp85_user_data),
    .other_in(cmp85_other_in), .result(cmp85_result), .disagree(cmp85_disagree),
    .fault_data(cmp85_fault_data), .fault_active(cmp85_fault_active)
  );

endmodule
