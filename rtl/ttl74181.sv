// 74181: 4-bit arithmetic logic unit, one of the four benchmark circuits
// protected by the fault tolerant system.
//
// Active-high data convention of the standard part. Each bit forms
//   x = A | (B & S0) | (~B & S1)      y = (A & B & S3) | (A & ~B & S2)
// (y implies x, so x is the bit propagate and y the bit generate).
// Logic mode (m = 1): F = ~(x ^ y), which gives the 16 logic functions of the
// part (S = 0000: ~A ... S = 1111: A). Arithmetic mode (m = 0):
// F = x + y + carry, with the carry in active low (cn = 0 adds one), which
// gives the 16 arithmetic functions, with look-ahead carries (S = 1001: A plus B, S = 0110: A minus B
// minus 1, ...). cn4 is the active-low carry out, pn/gn the active-low group
// propagate and generate for a 74182, and aeqb is high when all F bits are 1.
// Written from the function of the standard part; its internal gates are not
// reproduced. Purely combinational.
`timescale 1ns / 1ps
module ttl74181 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic [3:0] s,
  input  logic       m,
  input  logic       cn,
  output logic [3:0] f,
  output logic       cn4,
  output logic       pn,
  output logic       gn,
  output logic       aeqb
);

  logic [3:0] x, y;
  logic [4:0] c;

  always_comb begin
    x = a | (b & {4{s[0]}}) | (~b & {4{s[1]}});
    y = (a & b & {4{s[3]}}) | (a & ~b & {4{s[2]}});
    c[0] = ~cn;
    c[1] = y[0] | (x[0] & c[0]);
    c[2] = y[1] | (x[1] & y[0]) | (x[1] & x[0] & c[0]);
    c[3] = y[2] | (x[2] & y[1]) | (x[2] & x[1] & y[0]) | (x[2] & x[1] & x[0] & c[0]);
    c[4] = y[3] | (x[3] & y[2]) | (x[3] & x[2] & y[1]) | (x[3] & x[2] & x[1] & y[0])
         | (x[3] & x[2] & x[1] & x[0] & c[0]);
    f    = m ? ~(x ^ y) : (x ^ y ^ c[3:0]);
    cn4  = ~c[4];
    pn   = ~(&x);
    gn   = ~(y[3] | (x[3] & y[2]) | (x[3] & x[2] & y[1]) | (x[3] & x[2] & x[1] & y[0]));
    aeqb = &f;
  end

endmodule
