// One-hot encoder and register of the fault injector.
//
// On a clock edge with fault_sel high, the random word is encoded into a word
// with exactly one bit set, at position rand_word mod W, and stored in D
// flip-flops; with fault_sel low the register is cleared, so no bit can be
// flipped. The stored word is XORed with the data register downstream, so each
// cycle with fault_sel high injects one single-bit transient fault that lasts
// one clock.
// Following the design description: a D-FF register holding one active bit,
// driven from the control unit's logic-1 path. This design's choice: the
// position is taken from the low log2(W) bits of the random word, and the
// register is cleared (all zero) when no fault is selected and at reset
// (asynchronous, active low).
`timescale 1ns / 1ps
module one_hot_register #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         fault_sel,
  input  logic [W-1:0] rand_word,
  output logic [W-1:0] onehot
);

  localparam int unsigned PW = (W > 1) ? $clog2(W) : 1;

  logic [PW-1:0] pos;
  logic [W-1:0]  encoded;

  always_comb begin
    pos     = PW'(rand_word % W);
    encoded = W'(1) << pos;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         onehot <= '0;
    else if (fault_sel) onehot <= encoded;
    else                onehot <= '0;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(onehot));

endmodule
