// 74182: look-ahead carry generator, one of the four benchmark circuits
// protected by the fault tolerant system.
//
// Takes four active-low propagate (pn) and generate (gn) signals of 4-bit ALU
// slices and an active-high carry in cn. Produces the active-high carries into
// slices 1..3 (cnx, cny, cnz) and the active-low group propagate (pn_out) and
// group generate (gn_out). Written from the function of the standard
// 74-series part. Purely combinational.
`timescale 1ns / 1ps
module ttl74182 (
  input  logic [3:0] pn,
  input  logic [3:0] gn,
  input  logic       cn,
  output logic       cnx,
  output logic       cny,
  output logic       cnz,
  output logic       pn_out,
  output logic       gn_out
);

  logic [3:0] p, g;

  always_comb begin
    p = ~pn;
    g = ~gn;
    cnx = g[0] | (p[0] & cn);
    cny = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cn);
    cnz = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cn);
    gn_out = ~(g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]));
    pn_out = ~(&p);
  end

endmodule
