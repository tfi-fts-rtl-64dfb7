// Transient fault injection (TFI) system.
//
// Two free-running 4-bit LFSRs produce random words; the fault logic XORs them
// and, when the user sets inject_en, selects the fault path. The one-hot
// register then holds a single set bit at a random position, and the data
// register XORs it into the registered user data: fault_out is user_data with
// exactly one bit flipped for one clock. With inject_en low, fault_out is the
// registered user data unchanged. One fault is thus injected in every clock
// cycle that inject_en is high (100 faults take 100 cycles).
// The block structure (LFSR-1, LFSR-2, XOR module, control unit, one-hot
// encoder, user data, data register, all 4 bits wide) follows the design
// description. The two connection polynomials (1 + x + x^4 and 1 + x^3 + x^4,
// the two primitive ones of degree 4) and their seeds are this design's choice.
// Timing: user_data and inject_en sampled at a clock edge appear on data_q,
// fault_out and fault_active right after that edge (latency one clock).
`timescale 1ns / 1ps
module tfi_system
  import tfi_fts_pkg::*;
#(
  parameter logic [FAULT_W-1:0] TAPS1 = 4'b1001,
  parameter logic [FAULT_W-1:0] SEED1 = 4'b0001,
  parameter logic [FAULT_W-1:0] TAPS2 = 4'b1100,
  parameter logic [FAULT_W-1:0] SEED2 = 4'b1010
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               inject_en,
  input  logic [FAULT_W-1:0] user_data,
  output logic [FAULT_W-1:0] data_q,
  output logic [FAULT_W-1:0] fault_out,
  output logic [FAULT_W-1:0] onehot,
  output logic               fault_active
);

  logic [FAULT_W-1:0] lfsr1, lfsr2, rand_word;
  logic               fault_sel;

  bma_lfsr #(.WIDTH(FAULT_W), .TAPS(TAPS1), .SEED(SEED1)) u_lfsr1 (
    .clk, .rst_n, .en(1'b1), .state(lfsr1)
  );

  bma_lfsr #(.WIDTH(FAULT_W), .TAPS(TAPS2), .SEED(SEED2)) u_lfsr2 (
    .clk, .rst_n, .en(1'b1), .state(lfsr2)
  );

  fault_logic #(.W(FAULT_W)) u_fault_logic (
    .lfsr1, .lfsr2, .inject_en, .fault_sel, .rand_word
  );

  one_hot_register #(.W(FAULT_W)) u_one_hot (
    .clk, .rst_n, .fault_sel, .rand_word, .onehot
  );

  fault_data_register #(.W(FAULT_W)) u_data_reg (
    .clk, .rst_n, .user_data, .onehot, .data_q, .fault_out
  );

  always_comb fault_active = |onehot;

endmodule
