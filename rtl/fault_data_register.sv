// Data register of the fault injector.
//
// The user data word is captured in D flip-flops every clock. The fault output
// is the register output XORed with the one-hot word, so a bit set in onehot
// flips the matching data bit; an all-zero onehot passes the user data
// unchanged. The clean register output is also brought out, so the circuits
// that receive no fault see the same data in the same cycle.
// Following the design description: the one-hot output is XORed with the data
// register output. This design's choice: reset (asynchronous, active low)
// clears the register.
// Timing: data_q and fault_out show user_data one clock after it is sampled;
// onehot is expected to come from a register loaded on the same edge.
`timescale 1ns / 1ps
module fault_data_register #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] user_data,
  input  logic [W-1:0] onehot,
  output logic [W-1:0] data_q,
  output logic [W-1:0] fault_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) data_q <= '0;
    else        data_q <= user_data;
  end

  always_comb fault_out = data_q ^ onehot;

endmodule
