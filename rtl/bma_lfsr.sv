// 4-bit linear feedback shift register used as a random pattern source of the
// fault injector.
//
// Fibonacci form: every clock the register shifts up by one and the new bit
// y[n] enters at bit 0, computed from the connection polynomial
//   C(x) = 1 + c1 x + c2 x^2 + ... + cW x^W,   y[n] = c1 y[n-1] ^ ... ^ cW y[n-W]
// with TAPS[i] = c(i+1), so state[i] holds y[n-1-i]. This is the polynomial
// form a Berlekamp-Massey run yields: the length W equals the linear
// complexity of the sequence and TAPS is its connection polynomial.
// The 4-bit width follows the design description; the polynomials and seeds
// are this design's choice (the default 1 + x + x^4 is primitive, period 15).
// Reset (asynchronous, active low) loads SEED, which must be non-zero.
// Interface: state is the full W-bit register; it changes one cycle after
// each clock edge with en high.
`timescale 1ns / 1ps
module bma_lfsr #(
  parameter int unsigned     WIDTH = 4,
  parameter logic [WIDTH-1:0] TAPS = 4'b1001,
  parameter logic [WIDTH-1:0] SEED = 4'b0001
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] state
);

  logic feedback;

  always_comb feedback = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[WIDTH-2:0], feedback};
  end

  initial assert (SEED != '0) else $error("bma_lfsr: SEED must be non-zero");

endmodule
