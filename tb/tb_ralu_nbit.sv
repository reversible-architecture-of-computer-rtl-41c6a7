// tb_ralu_nbit: self-checking test of the N-bit reversible ALU cascade.
// Three instances are driven with the same stimulus where widths allow: the default 32-bit ALU
// with Fredkin-selector cells, a 32-bit ALU with Davio-multiplexer cells, and a 4-bit
// Fredkin-selector ALU. Every named operation of ralu_pkg::ralu_op_e is run on random operands
// (and on corner values); Result and carry out are compared with word-level arithmetic done here.
// The 4-bit instance is also run through the sixteen operand pairs of the published 4-bit
// simulation (two per operation, AND through XNOR, carry-in 1 from the subtraction part on),
// with the garbage lines of its first two vectors.
// The count of each operation run is checked so that no operation is skipped. Finally every
// one of the 8192 settings of the 4-bit instance's inputs (X, Y, Cin, AS, Cpn, Ctl1, Ctl2) is
// applied and no two may give the same output vector: the cascade, with its ancillas at 0,
// must stay one-to-one.
module tb_ralu_nbit;
  import ralu_pkg::*;
  localparam int N = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int op_count [16];

  logic [N-1:0] x, y;
  logic         cin;
  ralu_ctrl_t   ctrl;

  logic [N-1:0] rf, rm, gxf, gaof, gsxf, grf, gxm, g1m, g2m, g3m;
  logic         coutf, coutm, asf, c1f, c2f, asm_, c1m, c2m;
  logic [3:0]   r4, gx4, gao4, gsx4, gr4;
  logic         cout4, as4, c14, c24;

  ralu_nbit dut_f (
    .x_i(x), .y_i(y), .cin_i(cin), .as_i(ctrl.as_sub), .cpn_i(ctrl.cpn),
    .ctl1_i(ctrl.ctl1), .ctl2_i(ctrl.ctl2),
    .result_o(rf), .cout_o(coutf), .as_o(asf), .ctl1_o(c1f), .ctl2_o(c2f),
    .gx_o(gxf), .gao_o(gaof), .gsx_o(gsxf), .gr_o(grf)
  );
  ralu_nbit #(.N(N), .FREDKIN_SEL(1'b0)) dut_m (
    .x_i(x), .y_i(y), .cin_i(cin), .as_i(ctrl.as_sub), .cpn_i(ctrl.cpn),
    .ctl1_i(ctrl.ctl1), .ctl2_i(ctrl.ctl2),
    .result_o(rm), .cout_o(coutm), .as_o(asm_), .ctl1_o(c1m), .ctl2_o(c2m),
    .gx_o(gxm), .gao_o(g1m), .gsx_o(g2m), .gr_o(g3m)
  );
  ralu_nbit #(.N(4)) dut_4 (
    .x_i(x[3:0]), .y_i(y[3:0]), .cin_i(cin), .as_i(ctrl.as_sub), .cpn_i(ctrl.cpn),
    .ctl1_i(ctrl.ctl1), .ctl2_i(ctrl.ctl2),
    .result_o(r4), .cout_o(cout4), .as_o(as4), .ctl1_o(c14), .ctl2_o(c24),
    .gx_o(gx4), .gao_o(gao4), .gsx_o(gsx4), .gr_o(gr4)
  );

  // word-level reference of a named operation on w-bit operands: result in bits w-1..0,
  // carry out in bit N
  function automatic logic [N:0] ref_op(ralu_op_e op, logic [N-1:0] a, logic [N-1:0] b,
                                        logic c, int w);
    logic [N:0]   r;
    logic [N-1:0] mask;
    mask = (w == N) ? '1 : N'((64'd1 << w) - 1);
    a &= mask;
    b &= mask;
    case (op)
      OP_AND:   r = {1'b0, a & b};
      OP_OR:    r = {1'b0, a | b};
      OP_XOR:   r = {1'b0, a ^ b};
      OP_NAND:  r = {1'b0, ~(a & b) & mask};
      OP_NOR:   r = {1'b0, ~(a | b) & mask};
      OP_XNY:   r = {1'b0, a & ~b & mask};
      OP_YIMPX: r = {1'b0, (a | ~b) & mask};
      OP_XIMPY: r = {1'b0, (~a | b) & mask};
      OP_XNOR:  r = {1'b0, ~(a ^ b) & mask};
      OP_ADD:   r = {1'b0, a} + {1'b0, b} + (N+1)'(c);
      OP_SUB:   r = {1'b0, a} + {1'b0, ~b & mask} + (N+1)'(c);
      default:  r = '0;
    endcase
    // the carry out of a w-bit operation sits in bit w; move it to bit N
    if (w < N) r = {r[w], r[N-1:0] & mask};
    return r;
  endfunction

  function automatic bit is_arith(ralu_op_e op);
    return op == OP_ADD || op == OP_SUB;
  endfunction

  task automatic run32(ralu_op_e op, logic [N-1:0] a, logic [N-1:0] b, logic c);
    logic [N:0] e;
    ctrl = ralu_ctrl_t'(op); x = a; y = b; cin = c;
    @(posedge clk);
    e = ref_op(op, a, b, c, N);
    op_count[op]++;
    checks++;
    if (rf !== e[N-1:0] || (is_arith(op) && coutf !== e[N])) begin
      failures++;
      $display("FAIL fredkin %s x=%h y=%h cin=%b got=%h/%b exp=%h/%b", op.name(), a, b, c,
               rf, coutf, e[N-1:0], e[N]);
    end
    checks++;
    if (rm !== e[N-1:0] || (is_arith(op) && coutm !== e[N])) begin
      failures++;
      $display("FAIL mux %s x=%h y=%h cin=%b got=%h/%b exp=%h/%b", op.name(), a, b, c,
               rm, coutm, e[N-1:0], e[N]);
    end
    checks++;
    if (gxf !== a || gxm !== a || {asf, c2f, c1f} !== {op[2], op[1], op[0]} ||
        {asm_, c2m, c1m} !== {op[2], op[1], op[0]}) begin
      failures++;
      $display("FAIL copies %s", op.name());
    end
  endtask

  task automatic run4(ralu_op_e op, logic [3:0] a, logic [3:0] b, logic c, logic [3:0] exp_r);
    ctrl = ralu_ctrl_t'(op); x = N'(a); y = N'(b); cin = c;
    @(posedge clk);
    checks++;
    if (r4 !== exp_r) begin
      failures++;
      $display("FAIL 4-bit %s x=%b y=%b got=%b exp=%b", op.name(), a, b, r4, exp_r);
    end
  endtask

  localparam ralu_op_e OPS [11] = '{OP_AND, OP_OR, OP_ADD, OP_XOR, OP_NAND, OP_NOR, OP_XNY,
                                    OP_YIMPX, OP_XIMPY, OP_SUB, OP_XNOR};

  initial begin
    foreach (op_count[i]) op_count[i] = 0;
    // published 4-bit simulation: operand pairs and results
    run4(OP_AND,   4'b0111, 4'b0100, 1'b0, 4'b0100);
    checks++;
    if ({gao4, gsx4, gr4} !== {4'b0111, 4'b0011, 4'b1011}) begin
      failures++;
      $display("FAIL 4-bit garbage lines %b %b %b", gao4, gsx4, gr4);
    end
    run4(OP_AND,   4'b1110, 4'b0000, 1'b0, 4'b0000);
    // garbage lines of the same simulation: the unselected OR, XOR and SUM
    checks++;
    if ({gao4, gsx4, gr4} !== {4'b1110, 4'b1110, 4'b1110}) begin
      failures++;
      $display("FAIL 4-bit garbage lines %b %b %b", gao4, gsx4, gr4);
    end
    run4(OP_OR,    4'b1100, 4'b0010, 1'b0, 4'b1110);
    run4(OP_OR,    4'b1010, 4'b0010, 1'b0, 4'b1010);
    run4(OP_ADD,   4'b0010, 4'b0000, 1'b0, 4'b0010);
    run4(OP_ADD,   4'b1100, 4'b1000, 1'b0, 4'b0100);
    checks++;
    if (cout4 !== 1'b1) begin
      failures++;
      $display("FAIL 4-bit carry out of 1100+1000");
    end
    run4(OP_XOR,   4'b0000, 4'b0011, 1'b0, 4'b0011);
    run4(OP_XOR,   4'b1110, 4'b1100, 1'b0, 4'b0010);
    run4(OP_XNY,   4'b1001, 4'b0001, 1'b1, 4'b1000);
    run4(OP_XNY,   4'b0100, 4'b1100, 1'b1, 4'b0000);
    run4(OP_YIMPX, 4'b0010, 4'b0100, 1'b1, 4'b1011);
    run4(OP_YIMPX, 4'b1010, 4'b1001, 1'b1, 4'b1110);
    run4(OP_SUB,   4'b1111, 4'b1001, 1'b1, 4'b0110);
    run4(OP_SUB,   4'b1101, 4'b0111, 1'b1, 4'b0110);
    run4(OP_XNOR,  4'b0001, 4'b1001, 1'b1, 4'b0111);
    run4(OP_XNOR,  4'b1100, 4'b0011, 1'b1, 4'b0000);
    // corner operands for every operation
    foreach (OPS[i]) begin
      run32(OPS[i], '0, '0, OPS[i] == OP_SUB);
      run32(OPS[i], '1, '1, OPS[i] == OP_SUB);
      run32(OPS[i], '1, 32'h1, 1'b0);
      run32(OPS[i], 32'h8000_0000, 32'h7fff_ffff, 1'b1);
    end
    // random operands; SUB mostly with carry-in 1, sometimes 0 (X - Y - 1)
    repeat (3000) begin
      ralu_op_e op;
      op = OPS[$urandom_range(10)];
      run32(op, N'($urandom), N'($urandom), (op == OP_SUB) ? ($urandom_range(7) != 0) : 1'($urandom));
    end
    // 4-bit instance against the reference as well
    repeat (500) begin
      ralu_op_e   op;
      logic [N:0] e;
      logic [3:0] a, b;
      logic       c;
      op = OPS[$urandom_range(10)];
      a = 4'($urandom); b = 4'($urandom); c = 1'($urandom);
      e = ref_op(op, N'(a), N'(b), c, 4);
      run4(op, a, b, c, e[3:0]);
      if (is_arith(op)) begin
        checks++;
        if (cout4 !== e[N]) begin
          failures++;
          $display("FAIL 4-bit carry %s a=%b b=%b c=%b", op.name(), a, b, c);
        end
      end
    end
    // reversibility of the 4-bit cascade
    begin
      bit seen [logic [23:0]];
      int dups = 0;
      for (int k = 0; k < 8192; k++) begin
        logic [23:0] key;
        {ctrl, cin, x[3:0], y[3:0]} = k[12:0];
        @(posedge clk);
        key = {r4, cout4, as4, c14, c24, gx4, gao4, gsx4, gr4};
        if (seen.exists(key)) dups++;
        seen[key] = 1'b1;
      end
      checks++;
      if (dups != 0) begin
        failures++;
        $display("FAIL 4-bit cascade not one-to-one: %0d repeated outputs", dups);
      end
    end
    foreach (OPS[i]) begin
      checks++;
      if (op_count[OPS[i]] == 0) begin
        failures++;
        $display("FAIL operation %s never run", OPS[i].name());
      end
    end
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
