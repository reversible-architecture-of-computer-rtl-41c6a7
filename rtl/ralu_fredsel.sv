// ralu_fredsel: function selector of the 1-bit reversible ALU built from three Fredkin gates.
//
// A Fredkin gate is a reversible 2:1 multiplexer that keeps the input it did not select.
//   Fred1 (Ctl1; F1, F2): selected M12 = Ctl1 ? F2 : F1, the other one on gao_o
//   Fred2 (Ctl1 copy from Fred1; F3, F4): selected M34 = Ctl1 ? F4 : F3, the other on gsx_o
//   Fred3 (Ctl2; M12, M34): result_o = Ctl2 ? M34 : M12, the other pair's choice on gr_o
// {Ctl2,Ctl1} = 00 selects F1, 01 F2, 10 F3, 11 F4; every function stays readable on some output.
// Three gates, quantum cost 15, no ancilla. Follows the published selector. Combinational.
module ralu_fredsel (
  input  logic ctl1_i,
  input  logic ctl2_i,
  input  logic f1_i,
  input  logic f2_i,
  input  logic f3_i,
  input  logic f4_i,
  output logic result_o,
  output logic gao_o,
  output logic gsx_o,
  output logic gr_o,
  output logic ctl1_o,
  output logic ctl2_o
);
  logic ctl1_a, m12, m34;

  rev_fredkin u_fred1 (.a(ctl1_i), .b(f1_i), .c(f2_i), .x(ctl1_a), .y(m12), .z(gao_o));
  rev_fredkin u_fred2 (.a(ctl1_a), .b(f3_i), .c(f4_i), .x(ctl1_o), .y(m34), .z(gsx_o));
  rev_fredkin u_fred3 (.a(ctl2_i), .b(m12),  .c(m34),  .x(ctl2_o), .y(result_o), .z(gr_o));
endmodule
