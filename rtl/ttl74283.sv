// 74283: 4-bit binary full adder with fast carry, one of the four benchmark
// circuits protected by the fault tolerant system.
//
// S = A + B + C0 (4 bits), C4 is the carry out. Written from the function of
// the standard 74-series part (active-high data and carry); the internal gate
// structure of the real part is not reproduced, the carries are computed with
// generate/propagate look-ahead. Purely combinational.
`timescale 1ns / 1ps
module ttl74283 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       c0,
  output logic [3:0] s,
  output logic       c4
);

  logic [3:0] g, p;
  logic [4:0] c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    c[0] = c0;
    c[1] = g[0] | (p[0] & c0);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c0);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c0);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
         | (p[3] & p[2] & p[1] & p[0] & c0);
    s  = p ^ c[3:0];
    c4 = c[4];
  end

endmodule
