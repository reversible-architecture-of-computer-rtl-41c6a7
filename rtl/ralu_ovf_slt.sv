// ralu_ovf_slt: N-bit reversible ALU extended with a signed-overflow detector and set-less-than.
//
// The lower N-1 cells form a ralu_nbit; the top cell is instantiated separately so that the carry
// into it, C(N-1), can be tapped. Four CNOT gates on two extra constant-0 lines add the flags:
//   CNOT_in   copies C(N-1) onto the overflow line
//   CNOT_ovf  XORs the top carry out C(N) into it:      ovf_o = C(N-1) ^ C(N)
//   CNOT_sign copies Result[N-1] onto the slt line
//   CNOT_slt  XORs the overflow line into it:           slt_o = Result[N-1] ^ ovf_o
// ovf_o is the two's-complement overflow of ADD (cin 0) and SUB (cin 1). slt_o is 1 when X < Y as
// signed numbers, and is meaningful only while SUB is selected (it is then the true sign of
// X - Y). The flags add quantum cost 4. All other ports behave as in ralu_nbit.
// N must be at least 2. Follows the published extension; combinational.
module ralu_ovf_slt #(
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
  output logic         ovf_o,
  output logic         slt_o,
  output logic         as_o,
  output logic         ctl1_o,
  output logic         ctl2_o,
  output logic [N-1:0] gx_o,
  output logic [N-1:0] gao_o,
  output logic [N-1:0] gsx_o,
  output logic [N-1:0] gr_o
);
  logic c_msb, as_m, c1_m, c2_m;   // signals from the lower N-1 cells into the top cell
  logic c_msb_fwd, ovf_copy, c_n, c_n_fwd, res_msb, sign_copy, ovf_fwd;

  ralu_nbit #(.N(N - 1), .FREDKIN_SEL(FREDKIN_SEL)) u_low (
    .x_i   (x_i[N-2:0]),   .y_i (y_i[N-2:0]), .cin_i(cin_i), .as_i(as_i), .cpn_i(cpn_i),
    .ctl1_i(ctl1_i),       .ctl2_i(ctl2_i),
    .result_o(result_o[N-2:0]), .cout_o(c_msb), .as_o(as_m), .ctl1_o(c1_m), .ctl2_o(c2_m),
    .gx_o  (gx_o[N-2:0]),  .gao_o(gao_o[N-2:0]), .gsx_o(gsx_o[N-2:0]), .gr_o(gr_o[N-2:0])
  );

  // CNOT_in: copy of the carry into the top cell
  rev_cnot u_cnot_in (.a(c_msb), .b(1'b0), .x(c_msb_fwd), .y(ovf_copy));

  if (FREDKIN_SEL) begin : g_fred
    ralu_bit_fred u_msb (
      .as_i(as_m), .x_i(x_i[N-1]), .y_i(y_i[N-1]), .cin_i(c_msb_fwd),
      .zc_i(1'b0), .cpn_i(cpn_i), .zx_i(1'b0), .ctl1_i(c1_m), .ctl2_i(c2_m),
      .as_o(as_o), .gx_o(gx_o[N-1]), .cout_o(c_n), .result_o(res_msb),
      .gao_o(gao_o[N-1]), .gsx_o(gsx_o[N-1]), .gr_o(gr_o[N-1]),
      .ctl1_o(ctl1_o), .ctl2_o(ctl2_o)
    );
  end else begin : g_mux
    ralu_bit_mux u_msb (
      .as_i(as_m), .x_i(x_i[N-1]), .y_i(y_i[N-1]), .cin_i(c_msb_fwd),
      .zc_i(1'b0), .cpn_i(cpn_i), .zx_i(1'b0), .ctl1_i(c1_m), .ctl2_i(c2_m),
      .as_o(as_o), .gx_o(gx_o[N-1]), .g1_o(gao_o[N-1]), .g2_o(gsx_o[N-1]),
      .cout_o(c_n), .result_o(res_msb), .g3_o(gr_o[N-1]),
      .ctl1_o(ctl1_o), .ctl2_o(ctl2_o)
    );
  end

  // CNOT_ovf: overflow = C(N-1) ^ C(N)
  rev_cnot u_cnot_ovf  (.a(c_n), .b(ovf_copy), .x(c_n_fwd), .y(ovf_fwd));
  // CNOT_sign: copy of the sign of the result; CNOT_slt: sign ^ overflow
  rev_cnot u_cnot_sign (.a(res_msb), .b(1'b0), .x(result_o[N-1]), .y(sign_copy));
  rev_cnot u_cnot_slt  (.a(ovf_fwd), .b(sign_copy), .x(ovf_o), .y(slt_o));

  assign cout_o = c_n_fwd;
endmodule
