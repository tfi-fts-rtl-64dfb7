// Reference models of the four protected 74-series circuits for the
// testbenches, written from the parts' published function tables rather than
// from the RTL's equations: the 74181 from its list of 16 logic and 16
// arithmetic functions, the 74182 as a ripple of carries, the 74L85 from its
// cascade truth table. Results use the packing of tfi_fts_pkg.
`timescale 1ns / 1ps
package tb_ref_pkg;
  import tfi_fts_pkg::*;

  function automatic logic [4:0] ref_74283(logic [3:0] a, logic [3:0] b, logic c0);
    return 5'(int'(a) + int'(b) + int'(c0));
  endfunction

  // {cnx, cny, cnz, gn_out, pn_out}
  function automatic logic [4:0] ref_74182(logic [3:0] pn, logic [3:0] gn, logic cn);
    logic [4:0] c;
    logic       g_all;
    c[0] = cn;
    for (int i = 0; i < 4; i++) c[i+1] = !gn[i] || (!pn[i] && c[i]);
    // group generate: carry out of the block when the carry in is 0
    g_all = 1'b0;
    for (int i = 0; i < 4; i++) g_all = !gn[i] || (!pn[i] && g_all);
    return {c[1], c[2], c[3], !g_all, !(pn == 4'b0000)};
  endfunction

  // {aeqb, pn, gn, cn4, f}
  function automatic logic [7:0] ref_74181(logic [3:0] a, logic [3:0] b, logic [3:0] s,
                                            logic m, logic cn);
    logic [3:0] f, op1, op2;
    int         sum;
    logic       cn4, p, g;
    // arithmetic function table: F = op1 plus op2 (plus 1 when cn is low)
    case (s)
      4'd0:  begin op1 = a;        op2 = 4'd0;    end // A
      4'd1:  begin op1 = a | b;    op2 = 4'd0;    end // A + B (OR)
      4'd2:  begin op1 = a | ~b;   op2 = 4'd0;    end // A + ~B (OR)
      4'd3:  begin op1 = 4'hF;     op2 = 4'd0;    end // minus 1
      4'd4:  begin op1 = a;        op2 = a & ~b;  end // A plus A~B
      4'd5:  begin op1 = a | b;    op2 = a & ~b;  end // (A+B) plus A~B
      4'd6:  begin op1 = a;        op2 = ~b;      end // A minus B minus 1
      4'd7:  begin op1 = a & ~b;   op2 = 4'hF;    end // A~B minus 1
      4'd8:  begin op1 = a;        op2 = a & b;   end // A plus AB
      4'd9:  begin op1 = a;        op2 = b;       end // A plus B
      4'd10: begin op1 = a | ~b;   op2 = a & b;   end // (A+~B) plus AB
      4'd11: begin op1 = a & b;    op2 = 4'hF;    end // AB minus 1
      4'd12: begin op1 = a;        op2 = a;       end // A plus A
      4'd13: begin op1 = a | b;    op2 = a;       end // (A+B) plus A
      4'd14: begin op1 = a | ~b;   op2 = a;       end // (A+~B) plus A
      default: begin op1 = a;      op2 = 4'hF;    end // A minus 1
    endcase
    sum = int'(op1) + int'(op2) + int'(!cn);
    cn4 = !(sum >= 16);
    g   = (int'(op1) + int'(op2)) >= 16;
    p   = (op1 | op2) == 4'hF;
    if (m) begin
      case (s)
        4'd0:  f = ~a;
        4'd1:  f = ~(a | b);
        4'd2:  f = ~a & b;
        4'd3:  f = 4'h0;
        4'd4:  f = ~(a & b);
        4'd5:  f = ~b;
        4'd6:  f = a ^ b;
        4'd7:  f = a & ~b;
        4'd8:  f = ~a | b;
        4'd9:  f = ~(a ^ b);
        4'd10: f = b;
        4'd11: f = a & b;
        4'd12: f = 4'hF;
        4'd13: f = a | ~b;
        4'd14: f = a | b;
        default: f = a;
      endcase
    end else begin
      f = 4'(sum);
    end
    return {f == 4'hF, !p, !g, cn4, f};
  endfunction

  // {a_gt_b, a_lt_b, a_eq_b}
  function automatic logic [2:0] ref_74l85(logic [3:0] a, logic [3:0] b,
                                           logic igt, logic ilt, logic ieq);
    if (a > b) return 3'b100;
    if (a < b) return 3'b010;
    if (ieq)   return 3'b001;
    case ({igt, ilt})
      2'b10:   return 3'b100;
      2'b01:   return 3'b010;
      2'b11:   return 3'b000;
      default: return 3'b110;
    endcase
  endfunction

  // Any circuit, generic packing (result right-aligned in 16 bits).
  function automatic logic [15:0] ref_circuit(circuit_e c, logic [3:0] op, logic [15:0] other);
    case (c)
      C74283:  return 16'(ref_74283(op, other[4:1], other[0]));
      C74182:  return 16'(ref_74182(op, other[4:1], other[0]));
      C74181:  return 16'(ref_74181(op, other[9:6], other[5:2], other[1], other[0]));
      default: return 16'(ref_74l85(op, other[6:3], other[2], other[1], other[0]));
    endcase
  endfunction
endpackage
