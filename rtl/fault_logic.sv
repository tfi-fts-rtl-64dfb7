// Fault logic of the fault injector: XOR module plus control unit.
//
// The XOR module combines the two LFSR words into one random word. The
// control unit applies the user's choice: with inject_en high it takes the
// logic-1 path, raising fault_sel and passing the random word on to the
// one-hot encoder; with inject_en low it takes the logic-0 path, fault_sel is
// low, the random word is forced to zero and only user data reaches the data
// register. Purely combinational.
// The structure (XOR of two 4-bit words, then a user-set control) follows the
// design description; the zeroing of the word on the logic-0 path is this
// design's choice.
`timescale 1ns / 1ps
module fault_logic #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] lfsr1,
  input  logic [W-1:0] lfsr2,
  input  logic         inject_en,
  output logic         fault_sel,
  output logic [W-1:0] rand_word
);

  logic [W-1:0] xor_word;

  always_comb begin
    xor_word  = lfsr1 ^ lfsr2;
    fault_sel = inject_en;
    rand_word = inject_en ? xor_word : '0;
  end

endmodule
