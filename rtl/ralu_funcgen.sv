// ralu_funcgen: function generator of the 1-bit reversible ALU, 7 lines in, 7 lines out.
//
// It computes, in parallel and from the same inputs, the four functions the selector chooses
// from. With Y' = Y ^ AS:
//   and_o = X&Y' ^ Cpn            (AND, NAND, X&~Y, X->Y)
//   or_o  = X ^ Y' ^ X&Y' ^ Cpn   (OR, NOR, X|~Y)
//   sum_o = X ^ Y' ^ Cin, cout_o = X&Y' ^ Cin&(X^Y')   (add, or subtract with Cin = 1)
//   xor_o = X ^ Y'                (XOR, XNOR)
// Gates: CNOT(AS->Y), Peres(X, Y', 0), CNOT(carry line -> Cpn line), CNOT(Y line -> XOR ancilla),
// Peres(Y line, Cin, carry line), CNOT(Cpn line -> Y line). Six gates, quantum cost 12. The
// first CNOT and the two Peres gates are the RCAS cell; the three CNOTs reuse its intermediate
// AND and XOR terms. The per-line output equations follow the published generator; the exact
// placement of the three inner CNOTs is this design's reading of it and gives the same outputs.
// zc_i and zx_i are ancillas (0 in use); cpn_i is a constant control line. Combinational.
module ralu_funcgen (
  input  logic as_i,
  input  logic x_i,
  input  logic y_i,
  input  logic cin_i,
  input  logic zc_i,
  input  logic cpn_i,
  input  logic zx_i,
  output logic as_o,
  output logic gx_o,
  output logic or_o,
  output logic sum_o,
  output logic cout_o,
  output logic and_o,
  output logic xor_o
);
  logic y_a;          // Y ^ AS
  logic l_y1, l_c1;   // after Peres 1: X^Y' on the Y line, X&Y' on the carry line
  logic l_c2;         // carry line after the AND copy
  logic l_y2;         // Y line after the XOR copy
  logic l_y3;         // Y line after Peres 2
  logic l_and;        // Cpn line holding AND ^ Cpn

  rev_cnot  u_cnot_as  (.a(as_i), .b(y_i), .x(as_o), .y(y_a));
  rev_peres u_peres1   (.a(x_i), .b(y_a), .c(zc_i), .x(gx_o), .y(l_y1), .z(l_c1));
  rev_cnot  u_cnot_and (.a(l_c1), .b(cpn_i), .x(l_c2), .y(l_and));
  rev_cnot  u_cnot_xor (.a(l_y1), .b(zx_i),  .x(l_y2), .y(xor_o));
  rev_peres u_peres2   (.a(l_y2), .b(cin_i), .c(l_c2), .x(l_y3), .y(sum_o), .z(cout_o));
  rev_cnot  u_cnot_or  (.a(l_and), .b(l_y3), .x(and_o), .y(or_o));
endmodule
