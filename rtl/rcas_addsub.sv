// rcas_addsub: N-bit reversible two's-complement adder/subtractor with signed-overflow detector.
//
// N RCAS cells are chained: the carry out and the A/S copy of cell i feed the carry in and the
// control of cell i+1. A CNOT from A/S onto a constant-0 ancilla forms the carry into cell 0, so
// a subtraction (A/S = 1) computes X + ~Y + 1 = X - Y with no separate carry input, and an
// addition (A/S = 0) starts with carry 0. Signed overflow is C(N-1) ^ C(N): one CNOT copies the
// carry into the top cell onto an ancilla line and a second CNOT XORs the final carry into it.
//
// The circuit has 3N+1 gates (+2 for the overflow detector), 2N+1 garbage outputs and quantum
// cost 9N+1 (+2). Every ancilla input is tied to 0 inside; the garbage lines are brought out so
// the full reversible mapping stays observable. Unsigned overflow (add) is cout_o; for a
// subtraction cout_o = 1 means no borrow.
// Purely combinational, no clock. Structure and N = 16 follow the published design.
module rcas_addsub #(
  parameter int unsigned N = 16
) (
  input  logic         as_i,
  input  logic [N-1:0] x_i,
  input  logic [N-1:0] y_i,
  output logic [N-1:0] sd_o,
  output logic         cout_o,
  output logic         ovf_o,
  output logic         as_g_o,
  output logic [N-1:0] g1_o,
  output logic [N-1:0] g2_o
);
  logic [N:0] c;    // carry chain, c[0] formed from A/S
  logic [N:0] ctl;  // A/S copy passed from cell to cell
  logic       as_lsb;
  logic       cmsb_copy, cmsb_fwd, cn_fwd;

  // LSB: CNOT(A/S -> 0) gives the +1 of the two's complement
  rev_cnot u_lsb (.a(as_i), .b(1'b0), .x(as_lsb), .y(c[0]));
  assign ctl[0] = as_lsb;

  for (genvar i = 0; i < N; i++) begin : g_cell
    logic cin_i;
    if (i == N - 1) begin : g_tap
      assign cin_i = cmsb_fwd;
    end else begin : g_notap
      assign cin_i = c[i];
    end
    rcas u_rcas (
      .as_i  (ctl[i]),
      .x_i   (x_i[i]),
      .y_i   (y_i[i]),
      .cin_i (cin_i),
      .zero_i(1'b0),
      .as_g_o(ctl[i+1]),
      .g1_o  (g1_o[i]),
      .g2_o  (g2_o[i]),
      .sd_o  (sd_o[i]),
      .cout_o(c[i+1])
    );
  end

  // Overflow detector: copy C(N-1) onto an ancilla, then XOR C(N) into it
  rev_cnot u_cnot_in  (.a(c[N-1]), .b(1'b0),      .x(cmsb_fwd), .y(cmsb_copy));
  rev_cnot u_cnot_ovf (.a(c[N]),   .b(cmsb_copy), .x(cn_fwd),   .y(ovf_o));

  assign cout_o = cn_fwd;
  assign as_g_o = ctl[N];
endmodule
