// tb_ralu_ovf_slt: self-checking test of the reversible ALU with overflow and set-less-than.
// The default 32-bit instance (Fredkin-selector cells) and a 4-bit instance with
// Davio-multiplexer cells are driven together. ADD and SUB are run on corner and random signed
// operands; Result, carry out, ovf (two's-complement overflow) and, for SUB, slt (X < Y signed)
// are compared with integer arithmetic done here. For logic operations only Result is checked.
// The test counts overflows, slt = 1 cases and subtractions and fails if any never occurred.
// Finally all 8192 input settings of the 4-bit instance are applied and no two may give the same
// output vector (the flag lines keep the circuit one-to-one).
module tb_ralu_ovf_slt;
  import ralu_pkg::*;
  localparam int N = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_slt = 0, n_sub = 0, n_add = 0;

  logic [N-1:0] x, y;
  logic         cin;
  ralu_ctrl_t   ctrl;

  logic [N-1:0] r, gx, gao, gsx, gr;
  logic         cout, ovf, slt, as_o, c1_o, c2_o;
  logic [3:0]   r4, gx4, gao4, gsx4, gr4;
  logic         cout4, ovf4, slt4, as4, c14, c24;

  ralu_ovf_slt dut (
    .x_i(x), .y_i(y), .cin_i(cin), .as_i(ctrl.as_sub), .cpn_i(ctrl.cpn),
    .ctl1_i(ctrl.ctl1), .ctl2_i(ctrl.ctl2),
    .result_o(r), .cout_o(cout), .ovf_o(ovf), .slt_o(slt), .as_o(as_o), .ctl1_o(c1_o),
    .ctl2_o(c2_o), .gx_o(gx), .gao_o(gao), .gsx_o(gsx), .gr_o(gr)
  );
  ralu_ovf_slt #(.N(4), .FREDKIN_SEL(1'b0)) dut4 (
    .x_i(x[3:0]), .y_i(y[3:0]), .cin_i(cin), .as_i(ctrl.as_sub), .cpn_i(ctrl.cpn),
    .ctl1_i(ctrl.ctl1), .ctl2_i(ctrl.ctl2),
    .result_o(r4), .cout_o(cout4), .ovf_o(ovf4), .slt_o(slt4), .as_o(as4), .ctl1_o(c14),
    .ctl2_o(c24), .gx_o(gx4), .gao_o(gao4), .gsx_o(gsx4), .gr_o(gr4)
  );

  // checks one width: w-bit operands a, b (already truncated), observed outputs
  task automatic check_arith(string tag, int w, logic sub, logic [N-1:0] a, logic [N-1:0] b,
                             logic [N-1:0] res, logic co, logic ov, logic lt);
    longint sa, sb, sr, ua, ub, ur, lim;
    logic   e_ovf, e_cout;
    logic [N-1:0] e_res;
    lim = longint'(1) << (w - 1);
    ua  = longint'(a);
    ub  = longint'(b);
    sa  = (ua >= lim) ? ua - 2 * lim : ua;
    sb  = (ub >= lim) ? ub - 2 * lim : ub;
    sr  = sub ? sa - sb : sa + sb;
    ur  = sub ? ua + (2 * lim - 1 - ub) + 1 : ua + ub;
    e_cout = ur[w];
    e_res  = N'(ur & (2 * lim - 1));
    e_ovf  = (sr >= lim) || (sr < -lim);
    checks++;
    if (res !== e_res || co !== e_cout || ov !== e_ovf) begin
      failures++;
      $display("FAIL %s sub=%b x=%h y=%h got r=%h c=%b v=%b exp r=%h c=%b v=%b", tag, sub, a, b,
               res, co, ov, e_res, e_cout, e_ovf);
    end
    if (sub) begin
      checks++;
      if (lt !== (sa < sb)) begin
        failures++;
        $display("FAIL %s slt x=%0d y=%0d got %b", tag, sa, sb, lt);
      end
    end
  endtask

  task automatic run(ralu_op_e op, logic [N-1:0] a, logic [N-1:0] b);
    ctrl = ralu_ctrl_t'(op); x = a; y = b; cin = (op == OP_SUB);
    @(posedge clk);
    if (op == OP_ADD || op == OP_SUB) begin
      check_arith("n32", N, op == OP_SUB, a, b, r, cout, ovf, slt);
      check_arith("n4",  4, op == OP_SUB, N'(a[3:0]), N'(b[3:0]), N'(r4), cout4, ovf4, slt4);
      n_ovf += int'(ovf) + int'(ovf4);
      if (op == OP_SUB) begin
        n_sub++;
        n_slt += int'(slt) + int'(slt4);
      end else n_add++;
    end else begin
      checks++;
      if (op == OP_XOR && (r !== (a ^ b) || r4 !== (a[3:0] ^ b[3:0]))) begin
        failures++;
        $display("FAIL xor x=%h y=%h", a, b);
      end
      if (op == OP_AND && (r !== (a & b) || r4 !== (a[3:0] & b[3:0]))) begin
        failures++;
        $display("FAIL and x=%h y=%h", a, b);
      end
    end
  endtask

  initial begin
    logic [N-1:0] corners [7];
    corners = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'h0000_0007,
                32'hffff_fff8};
    foreach (corners[i])
      foreach (corners[j]) begin
        run(OP_ADD, corners[i], corners[j]);
        run(OP_SUB, corners[i], corners[j]);
      end
    repeat (3000) begin
      ralu_op_e op;
      case ($urandom_range(3))
        0: op = OP_ADD;
        1, 2: op = OP_SUB;
        default: op = ($urandom_range(1) != 0) ? OP_XOR : OP_AND;
      endcase
      run(op, N'($urandom), N'($urandom));
    end
    begin
      bit seen [logic [25:0]];
      int dups = 0;
      for (int k = 0; k < 8192; k++) begin
        logic [25:0] key;
        {ctrl, cin, x[3:0], y[3:0]} = k[12:0];
        @(posedge clk);
        key = {r4, cout4, ovf4, slt4, as4, c14, c24, gx4, gao4, gsx4, gr4};
        if (seen.exists(key)) dups++;
        seen[key] = 1'b1;
      end
      checks++;
      if (dups != 0) begin
        failures++;
        $display("FAIL 4-bit circuit not one-to-one: %0d repeated outputs", dups);
      end
    end
    checks++;
    if (n_ovf == 0 || n_slt == 0 || n_sub == 0 || n_add == 0) begin
      failures++;
      $display("FAIL a mechanism never happened: ovf=%0d slt=%0d sub=%0d add=%0d",
               n_ovf, n_slt, n_sub, n_add);
    end
    $display("overflows=%0d slt=%0d subtractions=%0d additions=%0d", n_ovf, n_slt, n_sub, n_add);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
