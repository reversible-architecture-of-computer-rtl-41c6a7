// ralu_vs_bit: 1-bit reversible ALU cell with modular add/subtract, XOR and no-op.
//
// A reduced variant of the RALU that keeps the RCAS cell and drops AND/OR. Eight lines:
//   RCAS(A/S, X, Y, Ccarry, 0)  -> Y line = A/S^Y^X, S/D line = A/S^Y^X^Ccarry, carry line = Cout
//   Toffoli(Cnop, X -> Y line)  -> Y line = Y^A/S ^ X&~Cnop   (Cnop cancels X: Y or ~Y)
//   CNOT(Csns -> S/D line)      -> inverts the sum, which turns X + ~Y into Y - X
//   Fredkin(Cres; Y line, S/D)  -> result_o = Cres ? S/D : Y line, the other on g_o
// The operations are listed in ralu_pkg::vs_op_e (ADD Y+X, SUB Y-X, NSUB X-Y, XOR, NOP, NOT Y,
// Y^~X and the +1/-1 forms). Cres, Csns, Cnop, A/S and X leave as copies for the next cell;
// Ccarry is the carry in and cout_o the carry out. Six gates, quantum cost 20. zero_i is an
// ancilla (0 in use). Follows the published cell; combinational.
module ralu_vs_bit (
  input  logic cres_i,
  input  logic csns_i,
  input  logic cnop_i,
  input  logic as_i,
  input  logic x_i,
  input  logic y_i,
  input  logic ccarry_i,
  input  logic zero_i,
  output logic cres_o,
  output logic csns_o,
  output logic cnop_o,
  output logic as_o,
  output logic x_o,
  output logic result_o,
  output logic g_o,
  output logic cout_o
);
  logic x_a, y_l, sd_l, y_l2, sd_l2;

  rcas        u_rcas (.as_i(as_i), .x_i(x_i), .y_i(y_i), .cin_i(ccarry_i), .zero_i(zero_i),
                      .as_g_o(as_o), .g1_o(x_a), .g2_o(y_l), .sd_o(sd_l), .cout_o(cout_o));
  rev_toffoli u_nop  (.a(cnop_i), .b(x_a), .c(y_l), .x(cnop_o), .y(x_o), .z(y_l2));
  rev_cnot    u_sns  (.a(csns_i), .b(sd_l), .x(csns_o), .y(sd_l2));
  rev_fredkin u_sel  (.a(cres_i), .b(y_l2), .c(sd_l2), .x(cres_o), .y(result_o), .z(g_o));
endmodule
