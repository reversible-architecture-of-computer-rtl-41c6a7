// ralu_bit_fred: 1-bit reversible ALU, design II (function generator + Fredkin selector).
//
// Nine lines in and out. The function generator makes AND, OR, SUM (with carry) and XOR of X
// and Y^AS; ralu_fredsel puts one of them on Result according to {Ctl2,Ctl1} (00 AND, 01 OR,
// 10 SUM, 11 XOR) and keeps the three others readable: gao_o holds the AND/OR not chosen by
// Ctl1, gsx_o the SUM/XOR not chosen by Ctl1, gr_o the pair result not chosen by Ctl2.
// Cout carries to the next cell; AS, Ctl1 and Ctl2 leave as copies for the next cell.
// 9 gates (2 Peres, 4 CNOT, 3 Fredkin), quantum cost 27. This is the cell used for the n-bit
// ALU by default. zc_i and zx_i are ancillas that must be 0; cpn_i is drawn as a constant 0
// line in the published cell and is an input here so that NAND and NOR can be selected.
// Combinational.
module ralu_bit_fred (
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
  output logic cout_o,
  output logic result_o,
  output logic gao_o,
  output logic gsx_o,
  output logic gr_o,
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

  ralu_fredsel u_sel (
    .ctl1_i(ctl1_i), .ctl2_i(ctl2_i),
    .f1_i(f_and), .f2_i(f_or), .f3_i(f_sum), .f4_i(f_xor),
    .result_o(result_o), .gao_o(gao_o), .gsx_o(gsx_o), .gr_o(gr_o),
    .ctl1_o(ctl1_o), .ctl2_o(ctl2_o)
  );
endmodule
