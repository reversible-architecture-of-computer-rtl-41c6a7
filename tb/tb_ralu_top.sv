// tb_ralu_top: end-to-end self-checking test of ralu_top at its default sizes.
// The four circuits are driven at once with independent random stimulus:
//  - both 32-bit ALUs (Fredkin-selector and Davio-multiplexer cells) run every named operation;
//    Result, carry out, overflow and (for SUB) set-less-than are compared with word arithmetic
//    done here, and the two ALUs must agree with each other;
//  - the 16-bit adder/subtractor adds and subtracts; sum, carry and overflow are checked;
//  - the 32-bit modular ALU runs every operation of its table.
// Each mechanism (every operation, carry out, signed overflow on each circuit, slt = 1) is
// counted, and one that never happened is a failure.
module tb_ralu_top;
  import ralu_pkg::*;
  localparam int RN = 32, AN = 16, VN = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_fop [16], n_vop [32];
  int n_f_ovf = 0, n_m_ovf = 0, n_slt = 0, n_cout = 0, n_a_ovf = 0, n_a_sub = 0, n_a_cout = 0;

  logic [RN-1:0] f_x, f_y, f_result, f_gx, f_gao, f_gsx, f_gr;
  logic [RN-1:0] m_x, m_y, m_result, m_gx, m_g1, m_g2, m_g3;
  logic          f_cin, f_cout, f_ovf, f_slt, m_cin, m_cout, m_ovf, m_slt;
  ralu_ctrl_t    f_ctrl, f_ctrl_o, m_ctrl, m_ctrl_o;
  logic          addsub_sub, addsub_cout, addsub_ovf, addsub_sub_o;
  logic [AN-1:0] addsub_x, addsub_y, addsub_sd, addsub_g1, addsub_g2;
  logic [VN-1:0] vs_x, vs_y, vs_result, vs_g, vs_x_o;
  logic          vs_cout;
  vs_ctrl_t      vs_ctrl, vs_ctrl_o;

  ralu_top dut (.*);

  localparam ralu_op_e OPS [11] = '{OP_AND, OP_OR, OP_ADD, OP_XOR, OP_NAND, OP_NOR, OP_XNY,
                                    OP_YIMPX, OP_XIMPY, OP_SUB, OP_XNOR};
  localparam vs_op_e VOPS [9] = '{VS_ADD, VS_SUB, VS_NSUB, VS_XOR, VS_NOP, VS_NOTY, VS_XNX,
                                  VS_ADD1, VS_SUB1};

  function automatic logic [RN-1:0] ralu_ref(ralu_op_e op, logic [RN-1:0] a, logic [RN-1:0] b,
                                             logic c);
    case (op)
      OP_AND:   return a & b;
      OP_OR:    return a | b;
      OP_XOR:   return a ^ b;
      OP_NAND:  return ~(a & b);
      OP_NOR:   return ~(a | b);
      OP_XNY:   return a & ~b;
      OP_YIMPX: return a | ~b;
      OP_XIMPY: return ~a | b;
      OP_XNOR:  return ~(a ^ b);
      OP_ADD:   return a + b + RN'(c);
      OP_SUB:   return a - b;
      default:  return '0;
    endcase
  endfunction

  function automatic logic [VN-1:0] vs_ref(vs_op_e op, logic [VN-1:0] a, logic [VN-1:0] b);
    case (op)
      VS_ADD:  return b + a;
      VS_ADD1: return b + a + 1;
      VS_SUB:  return b - a;
      VS_NSUB: return a - b;
      VS_SUB1: return a - b - 1;
      VS_XOR:  return b ^ a;
      VS_NOP:  return b;
      VS_NOTY: return ~b;
      VS_XNX:  return b ^ ~a;
      default: return '0;
    endcase
  endfunction

  task automatic step(ralu_op_e op, logic [RN-1:0] a, logic [RN-1:0] b, logic c,
                      logic sub, logic [AN-1:0] p, logic [AN-1:0] q,
                      vs_op_e vop, logic [VN-1:0] u, logic [VN-1:0] v);
    longint sa, sb, sr, sp, sq, sx;
    logic   e_cout, e_ovf;
    logic [AN:0] af;
    // ALU inputs; SUB always uses carry-in 1, ADD carries c in
    f_ctrl = ralu_ctrl_t'(op); m_ctrl = ralu_ctrl_t'(op);
    f_x = a; f_y = b; m_x = a; m_y = b;
    f_cin = (op == OP_SUB) ? 1'b1 : c;
    m_cin = f_cin;
    addsub_sub = sub; addsub_x = p; addsub_y = q;
    vs_ctrl = vs_ctrl_t'(vop); vs_x = u; vs_y = v;
    @(posedge clk);

    n_fop[op]++;
    checks++;
    if (f_result !== ralu_ref(op, a, b, f_cin) || m_result !== f_result) begin
      failures++;
      $display("FAIL alu %s x=%h y=%h got f=%h m=%h exp=%h", op.name(), a, b, f_result,
               m_result, ralu_ref(op, a, b, f_cin));
    end
    checks++;
    if (f_gx !== a || m_gx !== a || f_ctrl_o !== f_ctrl || m_ctrl_o !== m_ctrl) begin
      failures++;
      $display("FAIL alu copies %s", op.name());
    end
    if (op == OP_ADD || op == OP_SUB) begin
      sa = longint'($signed(a));
      sb = longint'($signed(b));
      sr = (op == OP_SUB) ? sa - sb : sa + sb + longint'(f_cin);
      e_ovf  = (sr > 64'sd2147483647) || (sr < -64'sd2147483648);
      e_cout = (op == OP_SUB) ? (a >= b)
                              : ((longint'(a) + longint'(b) + longint'(f_cin)) >> RN) != 0;
      checks++;
      if (f_ovf !== e_ovf || m_ovf !== e_ovf || f_cout !== e_cout || m_cout !== e_cout) begin
        failures++;
        $display("FAIL alu flags %s x=%h y=%h ovf=%b/%b cout=%b/%b exp ovf=%b cout=%b",
                 op.name(), a, b, f_ovf, m_ovf, f_cout, m_cout, e_ovf, e_cout);
      end
      if (op == OP_SUB) begin
        checks++;
        if (f_slt !== (sa < sb) || m_slt !== (sa < sb)) begin
          failures++;
          $display("FAIL slt x=%0d y=%0d", sa, sb);
        end
        n_slt += int'(f_slt);
      end
      n_f_ovf += int'(f_ovf);
      n_m_ovf += int'(m_ovf);
      n_cout  += int'(f_cout);
    end

    // adder/subtractor
    af = sub ? {1'b0, p} + {1'b0, ~q} + 1 : {1'b0, p} + {1'b0, q};
    sp = longint'($signed(p));
    sq = longint'($signed(q));
    sx = sub ? sp - sq : sp + sq;
    checks++;
    if (addsub_sd !== af[AN-1:0] || addsub_cout !== af[AN] ||
        addsub_ovf !== ((sx > 32767) || (sx < -32768)) || addsub_sub_o !== sub) begin
      failures++;
      $display("FAIL addsub sub=%b x=%h y=%h got %h c=%b v=%b", sub, p, q, addsub_sd,
               addsub_cout, addsub_ovf);
    end
    n_a_ovf  += int'(addsub_ovf);
    n_a_sub  += int'(sub);
    n_a_cout += int'(addsub_cout);

    // modular ALU
    n_vop[vop]++;
    checks++;
    if (vs_result !== vs_ref(vop, u, v) || vs_x_o !== u) begin
      failures++;
      $display("FAIL vs %s x=%h y=%h got %h exp %h", vop.name(), u, v, vs_result,
               vs_ref(vop, u, v));
    end
  endtask

  initial begin
    foreach (n_fop[i]) n_fop[i] = 0;
    foreach (n_vop[i]) n_vop[i] = 0;
    // one pass over every operation with values that force carry and overflow
    foreach (OPS[i])
      step(OPS[i], 32'h7fff_ffff, (OPS[i] == OP_SUB) ? 32'hffff_fff0 : 32'h0000_0010, 1'b0,
           1'(i), 16'h7ff0, 16'h8010, VOPS[i % 9], 32'h1234_5678, 32'h8765_4321);
    repeat (4000)
      step(OPS[$urandom_range(10)], RN'($urandom), RN'($urandom), 1'($urandom),
           1'($urandom), AN'($urandom), AN'($urandom),
           VOPS[$urandom_range(8)], VN'($urandom), VN'($urandom));

    foreach (OPS[i]) begin
      checks++;
      if (n_fop[OPS[i]] == 0) begin
        failures++;
        $display("FAIL ALU operation %s never run", OPS[i].name());
      end
    end
    foreach (VOPS[i]) begin
      checks++;
      if (n_vop[VOPS[i]] == 0) begin
        failures++;
        $display("FAIL modular ALU operation %s never run", VOPS[i].name());
      end
    end
    checks++;
    if (n_f_ovf == 0 || n_m_ovf == 0 || n_slt == 0 || n_cout == 0 ||
        n_a_ovf == 0 || n_a_sub == 0 || n_a_cout == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("alu overflow=%0d/%0d slt=%0d carry=%0d; addsub overflow=%0d sub=%0d carry=%0d",
             n_f_ovf, n_m_ovf, n_slt, n_cout, n_a_ovf, n_a_sub, n_a_cout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
