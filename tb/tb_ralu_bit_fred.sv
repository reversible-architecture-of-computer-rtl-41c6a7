// tb_ralu_bit_fred: exhaustive self-checking test of the 1-bit reversible ALU, design II (Fredkin selector).
// All 512 vectors of the nine input lines are applied. With the ancillas at 0 and a named
// control code, the Result line is compared with the operation the code names (AND, OR, ADD,
// XOR, NAND, NOR, X&~Y, Y->X, X->Y, SUB, XNOR), worked out here from X, Y and Cin; the carry out
// is compared for ADD and SUB, and the control copies are checked. For every vector the 9-bit
// output must be unique (reversibility). The number of vectors per named operation is counted.
module tb_ralu_bit_fred;
  import ralu_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_named = 0;

  logic as_i, x_i, y_i, cin_i, zc_i, cpn_i, zx_i, ctl1_i, ctl2_i;
  logic as_o, gx_o, cout_o, result_o, gao_o, gsx_o, gr_o, ctl1_o, ctl2_o;
  logic [511:0] seen = '0;

  ralu_bit_fred dut (.*);

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s ctrl=%b%b%b%b x=%b y=%b cin=%b got=%b exp=%b", what, cpn_i, as_i,
               ctl2_i, ctl1_i, x_i, y_i, cin_i, got, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < 512; k++) begin
      ralu_op_e   op;
      logic       e_res, e_cout, named;
      logic [1:0] total;
      {cpn_i, as_i, ctl2_i, ctl1_i, x_i, y_i, cin_i, zc_i, zx_i} = k[8:0];
      @(posedge clk);
      op     = ralu_op_e'({cpn_i, as_i, ctl2_i, ctl1_i});
      named  = 1'b1;
      e_cout = 1'b0;
      case (op)
        OP_AND:   e_res = x_i & y_i;
        OP_OR:    e_res = x_i | y_i;
        OP_XOR:   e_res = x_i ^ y_i;
        OP_NAND:  e_res = !(x_i & y_i);
        OP_NOR:   e_res = !(x_i | y_i);
        OP_XNY:   e_res = x_i & !y_i;
        OP_YIMPX: e_res = !y_i | x_i;
        OP_XIMPY: e_res = !x_i | y_i;
        OP_XNOR:  e_res = !(x_i ^ y_i);
        OP_ADD: begin
          total  = 2'(x_i) + 2'(y_i) + 2'(cin_i);
          e_res  = total[0];
          e_cout = total[1];
        end
        OP_SUB: begin  // one bit of X - Y with carry (not-borrow) in Cin
          total  = 2'(x_i) + 2'(!y_i) + 2'(cin_i);
          e_res  = total[0];
          e_cout = total[1];
        end
        default: begin
          named = 1'b0;
          e_res = 1'b0;
        end
      endcase
      if (named && !zc_i && !zx_i) begin
        n_named++;
        check("result", result_o, e_res);
        if (op == OP_ADD || op == OP_SUB) check("cout", cout_o, e_cout);
        check("copies", {as_o, gx_o, ctl1_o, ctl2_o} == {as_i, x_i, ctl1_i, ctl2_i}, 1'b1);
        // the three functions not selected stay on the garbage lines
        begin
          logic [3:0] fn;
          logic yy;
          yy = as_i ? !y_i : y_i;
          fn = {x_i ^ yy, x_i ^ yy ^ cin_i, (x_i | yy) ^ cpn_i, (x_i & yy) ^ cpn_i};
          check("gao", gao_o, ctl1_i ? fn[0] : fn[1]);
          check("gsx", gsx_o, ctl1_i ? fn[2] : fn[3]);
          check("gr",  gr_o,  ctl2_i ? (ctl1_i ? fn[1] : fn[0]) : (ctl1_i ? fn[3] : fn[2]));
        end
      end
      checks++;
      if (seen[{as_o, gx_o, cout_o, result_o, gao_o, gsx_o, gr_o, ctl1_o, ctl2_o}]) begin
        failures++;
        $display("FAIL output vector repeated for input %b", k[8:0]);
      end
      seen[{as_o, gx_o, cout_o, result_o, gao_o, gsx_o, gr_o, ctl1_o, ctl2_o}] = 1'b1;
    end
    checks++;
    if (n_named != 11 * 8) begin
      failures++;
      $display("FAIL expected 88 named-operation vectors, saw %0d", n_named);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
