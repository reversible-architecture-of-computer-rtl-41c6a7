// ralu_vs_nbit: N-bit cascade of ralu_vs_bit cells (modular add/subtract, XOR, no-op).
//
// The carry out of cell i is the Ccarry of cell i+1 and the Cres, Csns, Cnop and A/S copies of
// cell i control cell i+1, so nothing fans out. ccarry_i is the carry into bit 0 and selects the
// +1 forms of ralu_pkg::vs_op_e. Arithmetic is modulo 2^N; cout_o is still brought out.
// Quantum cost 20N (640 for the published N = 32). Combinational ripple.
module ralu_vs_nbit #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] x_i,
  input  logic [N-1:0] y_i,
  input  logic         cres_i,
  input  logic         csns_i,
  input  logic         cnop_i,
  input  logic         as_i,
  input  logic         ccarry_i,
  output logic [N-1:0] result_o,
  output logic         cout_o,
  output logic [N-1:0] g_o,
  output logic [N-1:0] x_o,
  output logic         cres_o,
  output logic         csns_o,
  output logic         cnop_o,
  output logic         as_o
);
  logic [N:0] c, cres_c, csns_c, cnop_c, as_c;

  assign c[0]      = ccarry_i;
  assign cres_c[0] = cres_i;
  assign csns_c[0] = csns_i;
  assign cnop_c[0] = cnop_i;
  assign as_c[0]   = as_i;

  for (genvar i = 0; i < N; i++) begin : g_bit
    ralu_vs_bit u_cell (
      .cres_i(cres_c[i]), .csns_i(csns_c[i]), .cnop_i(cnop_c[i]), .as_i(as_c[i]),
      .x_i(x_i[i]), .y_i(y_i[i]), .ccarry_i(c[i]), .zero_i(1'b0),
      .cres_o(cres_c[i+1]), .csns_o(csns_c[i+1]), .cnop_o(cnop_c[i+1]), .as_o(as_c[i+1]),
      .x_o(x_o[i]), .result_o(result_o[i]), .g_o(g_o[i]), .cout_o(c[i+1])
    );
  end

  assign cout_o = c[N];
  assign cres_o = cres_c[N];
  assign csns_o = csns_c[N];
  assign cnop_o = cnop_c[N];
  assign as_o   = as_c[N];
endmodule
