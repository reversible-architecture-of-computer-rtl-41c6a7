// tb_ralu_vs_nbit: self-checking test of the 32-bit modular-arithmetic ALU cascade.
// Every named operation of ralu_pkg::vs_op_e is run on corner and random operands, and Result is
// compared with the word-level operation modulo 2^32 computed here (Y+X, Y-X, X-Y, Y^X, Y, ~Y,
// Y^~X, Y+X+1, X-Y-1). For the add forms the carry out is checked too. Each operation must occur.
// A 4-bit instance is then run through all 8192 settings of its inputs, and no two may give the
// same output vector (the cascade must stay one-to-one).
module tb_ralu_vs_nbit;
  import ralu_pkg::*;
  localparam int N = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int op_count [32];

  logic [N-1:0] x, y, r, g, x_o;
  vs_ctrl_t     ctrl;
  logic         cout, cres_o, csns_o, cnop_o, as_o;

  ralu_vs_nbit dut (
    .x_i(x), .y_i(y), .cres_i(ctrl.cres), .csns_i(ctrl.csns), .cnop_i(ctrl.cnop),
    .as_i(ctrl.as_sub), .ccarry_i(ctrl.ccarry),
    .result_o(r), .cout_o(cout), .g_o(g), .x_o(x_o),
    .cres_o(cres_o), .csns_o(csns_o), .cnop_o(cnop_o), .as_o(as_o)
  );

  logic [3:0] r4, g4, x4_o;
  logic       cout4, cres4, csns4, cnop4, as4;
  ralu_vs_nbit #(.N(4)) dut4 (
    .x_i(x[3:0]), .y_i(y[3:0]), .cres_i(ctrl.cres), .csns_i(ctrl.csns), .cnop_i(ctrl.cnop),
    .as_i(ctrl.as_sub), .ccarry_i(ctrl.ccarry),
    .result_o(r4), .cout_o(cout4), .g_o(g4), .x_o(x4_o),
    .cres_o(cres4), .csns_o(csns4), .cnop_o(cnop4), .as_o(as4)
  );

  localparam vs_op_e OPS [9] = '{VS_ADD, VS_SUB, VS_NSUB, VS_XOR, VS_NOP, VS_NOTY, VS_XNX,
                                 VS_ADD1, VS_SUB1};

  task automatic run(vs_op_e op, logic [N-1:0] a, logic [N-1:0] b);
    logic [N:0] e;
    ctrl = vs_ctrl_t'(op); x = a; y = b;
    @(posedge clk);
    case (op)
      VS_ADD:  e = {1'b0, b} + {1'b0, a};
      VS_ADD1: e = {1'b0, b} + {1'b0, a} + 1;
      VS_SUB:  e = {1'b0, b - a};
      VS_NSUB: e = {1'b0, a - b};
      VS_SUB1: e = {1'b0, a - b - 1};
      VS_XOR:  e = {1'b0, b ^ a};
      VS_NOP:  e = {1'b0, b};
      VS_NOTY: e = {1'b0, ~b};
      VS_XNX:  e = {1'b0, b ^ ~a};
      default: e = '0;
    endcase
    op_count[op]++;
    checks++;
    if (r !== e[N-1:0]) begin
      failures++;
      $display("FAIL %s x=%h y=%h got=%h exp=%h", op.name(), a, b, r, e[N-1:0]);
    end
    if (op == VS_ADD || op == VS_ADD1) begin
      checks++;
      if (cout !== e[N]) begin
        failures++;
        $display("FAIL carry %s x=%h y=%h", op.name(), a, b);
      end
    end
    checks++;
    if (x_o !== a || {cres_o, csns_o, cnop_o, as_o} !== op[4:1]) begin
      failures++;
      $display("FAIL copies %s", op.name());
    end
  endtask

  initial begin
    foreach (op_count[i]) op_count[i] = 0;
    foreach (OPS[i]) begin
      run(OPS[i], '0, '0);
      run(OPS[i], '1, '1);
      run(OPS[i], '1, 32'h1);
      run(OPS[i], 32'h8000_0000, 32'h7fff_ffff);
    end
    repeat (3000) run(OPS[$urandom_range(8)], N'($urandom), N'($urandom));
    begin
      bit seen [logic [16:0]];
      int dups = 0;
      for (int k = 0; k < 8192; k++) begin
        logic [16:0] key;
        {ctrl, x[3:0], y[3:0]} = k[12:0];
        @(posedge clk);
        key = {r4, g4, x4_o, cout4, cres4, csns4, cnop4, as4};
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
