// ralu_nbit: N-bit reversible arithmetic logic unit, a ripple cascade of 1-bit RALU cells.
//
// Cell i takes X[i], Y[i], the carry out of cell i-1 and the AS, Ctl1, Ctl2 copies that cell
// i-1 passes on, so no control signal fans out. The operation is chosen by {Cpn, AS, Ctl2, Ctl1}
// (ralu_pkg::ralu_op_e): bitwise AND/NAND/OR/NOR/XOR/XNOR, AND or OR with Y inverted, and
// N-bit add or subtract. For SUB the carry-in cin_i must be 1 (X + ~Y + 1); for ADD it is
// normally 0. cout_o is the carry out of the top cell (unsigned overflow of an add, no-borrow
// of a subtract).
// FREDKIN_SEL = 1 (default) uses the Fredkin-selector cell (9 gates/bit, quantum cost 27N);
// FREDKIN_SEL = 0 uses the Davio-multiplexer cell (12 gates/bit, quantum cost 30N), whose
// garbage lines G1, G2, G3 then appear on gao_o, gsx_o, gr_o. The ancilla lines of every cell are
// tied to 0 and its Cpn line is driven from cpn_i. N = 32 is the published comparison size.
// Combinational ripple: the delay grows linearly with N.
module ralu_nbit #(
  parameter int unsigned N           = 32,
  parameter bit          FREDKIN_SEL = 1'b1
) (
  input  logic [N-1:0] x_i,
  input  logic [N-1:0] y_i,
  input  logic         cin_i,
  input  logic         as_i,
  input  logic         cpn_i,
  input  logic         ctl1_i,
  input  logic         ctl2_i,
  output logic [N-1:0] result_o,
  output logic         cout_o,
  output logic         as_o,
  output logic         ctl1_o,
  output logic         ctl2_o,
  output logic [N-1:0] gx_o,
  output logic [N-1:0] gao_o,
  output logic [N-1:0] gsx_o,
  output logic [N-1:0] gr_o
);
  logic [N:0] c, as_c, c1_c, c2_c;

  assign c[0]    = cin_i;
  assign as_c[0] = as_i;
  assign c1_c[0] = ctl1_i;
  assign c2_c[0] = ctl2_i;

  for (genvar i = 0; i < N; i++) begin : g_bit
    if (FREDKIN_SEL) begin : g_fred
      ralu_bit_fred u_cell (
        .as_i(as_c[i]), .x_i(x_i[i]), .y_i(y_i[i]), .cin_i(c[i]),
        .zc_i(1'b0), .cpn_i(cpn_i), .zx_i(1'b0), .ctl1_i(c1_c[i]), .ctl2_i(c2_c[i]),
        .as_o(as_c[i+1]), .gx_o(gx_o[i]), .cout_o(c[i+1]), .result_o(result_o[i]),
        .gao_o(gao_o[i]), .gsx_o(gsx_o[i]), .gr_o(gr_o[i]),
        .ctl1_o(c1_c[i+1]), .ctl2_o(c2_c[i+1])
      );
    end else begin : g_mux
      ralu_bit_mux u_cell (
        .as_i(as_c[i]), .x_i(x_i[i]), .y_i(y_i[i]), .cin_i(c[i]),
        .zc_i(1'b0), .cpn_i(cpn_i), .zx_i(1'b0), .ctl1_i(c1_c[i]), .ctl2_i(c2_c[i]),
        .as_o(as_c[i+1]), .gx_o(gx_o[i]), .g1_o(gao_o[i]), .g2_o(gsx_o[i]),
        .cout_o(c[i+1]), .result_o(result_o[i]), .g3_o(gr_o[i]),
        .ctl1_o(c1_c[i+1]), .ctl2_o(c2_c[i+1])
      );
    end
  end

  assign cout_o = c[N];
  assign as_o   = as_c[N];
  assign ctl1_o = c1_c[N];
  assign ctl2_o = c2_c[N];
endmodule
