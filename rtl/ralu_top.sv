// ralu_top: the reversible arithmetic circuits side by side.
//
//   f_*      N-bit reversible ALU with Fredkin-selector cells (design II), overflow and
//            set-less-than flags (ralu_ovf_slt, FREDKIN_SEL = 1)
//   m_*      the same ALU with Davio-multiplexer cells (design I) (ralu_ovf_slt, FREDKIN_SEL = 0)
//   addsub_* N-bit reversible adder/subtractor with signed-overflow detector (rcas_addsub)
//   vs_*     N-bit reduced ALU with modular add/subtract, XOR and no-op (ralu_vs_nbit)
// The four circuits share no signal; each has its own inputs and brings out every output line,
// garbage included, so that each remains an observable reversible mapping. The ALU control
// words are ralu_pkg::ralu_ctrl_t {Cpn, AS, Ctl2, Ctl1} and ralu_pkg::vs_ctrl_t
// {Cres, Csns, Cnop, AS, Ccarry}; the ALU carry-in must be 1 for SUB.
// All paths are combinational; there is no clock or reset. Default sizes are the published
// ones: 32-bit ALUs and a 16-bit adder/subtractor.
module ralu_top
  import ralu_pkg::*;
#(
  parameter int unsigned RALU_N   = 32,
  parameter int unsigned ADDSUB_N = 16,
  parameter int unsigned VS_N     = 32
) (
  // RALU, design II (Fredkin selector)
  input  logic [RALU_N-1:0]   f_x,
  input  logic [RALU_N-1:0]   f_y,
  input  logic                f_cin,
  input  ralu_ctrl_t          f_ctrl,
  output logic [RALU_N-1:0]   f_result,
  output logic                f_cout,
  output logic                f_ovf,
  output logic                f_slt,
  output ralu_ctrl_t          f_ctrl_o,
  output logic [RALU_N-1:0]   f_gx,
  output logic [RALU_N-1:0]   f_gao,
  output logic [RALU_N-1:0]   f_gsx,
  output logic [RALU_N-1:0]   f_gr,
  // RALU, design I (Davio 4:1 multiplexer)
  input  logic [RALU_N-1:0]   m_x,
  input  logic [RALU_N-1:0]   m_y,
  input  logic                m_cin,
  input  ralu_ctrl_t          m_ctrl,
  output logic [RALU_N-1:0]   m_result,
  output logic                m_cout,
  output logic                m_ovf,
  output logic                m_slt,
  output ralu_ctrl_t          m_ctrl_o,
  output logic [RALU_N-1:0]   m_gx,
  output logic [RALU_N-1:0]   m_g1,
  output logic [RALU_N-1:0]   m_g2,
  output logic [RALU_N-1:0]   m_g3,
  // adder/subtractor with overflow detector
  input  logic                addsub_sub,
  input  logic [ADDSUB_N-1:0] addsub_x,
  input  logic [ADDSUB_N-1:0] addsub_y,
  output logic [ADDSUB_N-1:0] addsub_sd,
  output logic                addsub_cout,
  output logic                addsub_ovf,
  output logic                addsub_sub_o,
  output logic [ADDSUB_N-1:0] addsub_g1,
  output logic [ADDSUB_N-1:0] addsub_g2,
  // reduced ALU (modular arithmetic, XOR, no-op)
  input  logic [VS_N-1:0]     vs_x,
  input  logic [VS_N-1:0]     vs_y,
  input  vs_ctrl_t            vs_ctrl,
  output logic [VS_N-1:0]     vs_result,
  output logic                vs_cout,
  output logic [VS_N-1:0]     vs_g,
  output logic [VS_N-1:0]     vs_x_o,
  output vs_ctrl_t            vs_ctrl_o
);

  ralu_ovf_slt #(.N(RALU_N), .FREDKIN_SEL(1'b1)) u_ralu_fred (
    .x_i(f_x), .y_i(f_y), .cin_i(f_cin),
    .as_i(f_ctrl.as_sub), .cpn_i(f_ctrl.cpn), .ctl1_i(f_ctrl.ctl1), .ctl2_i(f_ctrl.ctl2),
    .result_o(f_result), .cout_o(f_cout), .ovf_o(f_ovf), .slt_o(f_slt),
    .as_o(f_ctrl_o.as_sub), .ctl1_o(f_ctrl_o.ctl1), .ctl2_o(f_ctrl_o.ctl2),
    .gx_o(f_gx), .gao_o(f_gao), .gsx_o(f_gsx), .gr_o(f_gr)
  );
  // Cpn has no copy line in the cell; the output field reports the constant line's input
  assign f_ctrl_o.cpn = f_ctrl.cpn;

  ralu_ovf_slt #(.N(RALU_N), .FREDKIN_SEL(1'b0)) u_ralu_mux (
    .x_i(m_x), .y_i(m_y), .cin_i(m_cin),
    .as_i(m_ctrl.as_sub), .cpn_i(m_ctrl.cpn), .ctl1_i(m_ctrl.ctl1), .ctl2_i(m_ctrl.ctl2),
    .result_o(m_result), .cout_o(m_cout), .ovf_o(m_ovf), .slt_o(m_slt),
    .as_o(m_ctrl_o.as_sub), .ctl1_o(m_ctrl_o.ctl1), .ctl2_o(m_ctrl_o.ctl2),
    .gx_o(m_gx), .gao_o(m_g1), .gsx_o(m_g2), .gr_o(m_g3)
  );
  assign m_ctrl_o.cpn = m_ctrl.cpn;

  rcas_addsub #(.N(ADDSUB_N)) u_addsub (
    .as_i(addsub_sub), .x_i(addsub_x), .y_i(addsub_y),
    .sd_o(addsub_sd), .cout_o(addsub_cout), .ovf_o(addsub_ovf), .as_g_o(addsub_sub_o),
    .g1_o(addsub_g1), .g2_o(addsub_g2)
  );

  ralu_vs_nbit #(.N(VS_N)) u_vs (
    .x_i(vs_x), .y_i(vs_y),
    .cres_i(vs_ctrl.cres), .csns_i(vs_ctrl.csns), .cnop_i(vs_ctrl.cnop),
    .as_i(vs_ctrl.as_sub), .ccarry_i(vs_ctrl.ccarry),
    .result_o(vs_result), .cout_o(vs_cout), .g_o(vs_g), .x_o(vs_x_o),
    .cres_o(vs_ctrl_o.cres), .csns_o(vs_ctrl_o.csns), .cnop_o(vs_ctrl_o.cnop),
    .as_o(vs_ctrl_o.as_sub)
  );
  // the carry-in line leaves the cascade as the carry out; report the input on the copy field
  assign vs_ctrl_o.ccarry = vs_ctrl.ccarry;
endmodule
