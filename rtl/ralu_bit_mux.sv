// ralu_bit_mux: 1-bit reversible ALU, design I (function generator + 4:1 Davio multiplexer).
//
// Nine lines in and out. The function generator makes AND, OR, SUM (with carry) and XOR of X
// and Y^AS; ralu_mux4 then puts F1=AND, F2=OR, F3=SUM or F4=XOR on the Result line according to
// {Ctl2,Ctl1}. The operation table is the one in ralu_pkg::ralu_op_e. Cout carries to the next
// cell; AS, Ctl1 and Ctl2 leave the cell as copies for the next cell. g1/g2/g3 are the
// multiplexer's garbage lines (AND^OR, M12^M34, SUM^XOR). 12 gates (2 Peres, 3 Toffoli,
// 7 CNOT), quantum cost 30.
// zc_i and zx_i are ancillas that must be 0. cpn_i is drawn as a constant 0 line in the
// published cell; here it is an input so that NAND and NOR can be selected. Combinational.
module ralu_bit_mux (
  input  logic as_i,
  input  logic x_i,
  input  logic y_i,
  input  logic cin_i,
  input  logic zc_i,
  input  logic cpn_i,
  input  logic zx_i,
  input  logic ctl1_i,
  input  logic ctl2_i,
  output logic as_o,
  output logic gx_o,
  output logic g1_o,
  output logic g2_o,
  output logic cout_o,
  output logic result_o,
  output logic g3_o,
  output logic ctl1_o,
  output logic ctl2_o
);
  logic f_and, f_or, f_sum, f_xor;

  ralu_funcgen u_gen (
    .as_i  (as_i),  .x_i (x_i),  .y_i (y_i),  .cin_i(cin_i),
    .zc_i  (zc_i),  .cpn_i(cpn_i), .zx_i(zx_i),
    .as_o  (as_o),  .gx_o(gx_o), .or_o(f_or), .sum_o(f_sum),
    .cout_o(cout_o), .and_o(f_and), .xor_o(f_xor)
  );

  ralu_mux4 u_sel (
    .f1_i(f_and), .f2_i(f_or), .f3_i(f_sum), .f4_i(f_xor),
    .ctl1_i(ctl1_i), .ctl2_i(ctl2_i),
    .result_o(result_o), .g1_o(g1_o), .g2_o(g2_o), .g3_o(g3_o),
    .ctl1_o(ctl1_o), .ctl2_o(ctl2_o)
  );
endmodule
