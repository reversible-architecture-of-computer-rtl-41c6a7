// tb_ralu_vs_bit: exhaustive self-checking test of the 1-bit modular-arithmetic ALU cell.
// All 256 vectors of the eight input lines are applied. With the ancilla at 0 and a named
// control code (ralu_pkg::vs_op_e), Result is compared with that operation taken modulo 2
// (Y+X, Y-X, X-Y, Y^X, Y, ~Y, Y^~X, Y+X+1, X-Y-1), and the control and X copies are checked.
// For every vector the 8-bit output must be unique (reversibility).
module tb_ralu_vs_bit;
  import ralu_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_named = 0;

  logic cres_i, csns_i, cnop_i, as_i, x_i, y_i, ccarry_i, zero_i;
  logic cres_o, csns_o, cnop_o, as_o, x_o, result_o, g_o, cout_o;
  logic [255:0] seen = '0;

  ralu_vs_bit dut (.*);

  initial begin
    for (int k = 0; k < 256; k++) begin
      vs_op_e op;
      int     e;
      logic   named;
      {cres_i, csns_i, cnop_i, as_i, ccarry_i, x_i, y_i, zero_i} = k[7:0];
      @(posedge clk);
      op    = vs_op_e'({cres_i, csns_i, cnop_i, as_i, ccarry_i});
      named = 1'b1;
      case (op)
        VS_ADD:  e = int'(y_i) + int'(x_i);
        VS_SUB:  e = int'(y_i) - int'(x_i);
        VS_NSUB: e = int'(x_i) - int'(y_i);
        VS_XOR:  e = int'(y_i ^ x_i);
        VS_NOP:  e = int'(y_i);
        VS_NOTY: e = int'(!y_i);
        VS_XNX:  e = int'(y_i ^ !x_i);
        VS_ADD1: e = int'(y_i) + int'(x_i) + 1;
        VS_SUB1: e = int'(x_i) - int'(y_i) - 1;
        default: begin e = 0; named = 1'b0; end
      endcase
      if (named && !zero_i) begin
        n_named++;
        checks++;
        if (result_o !== e[0]) begin
          failures++;
          $display("FAIL %s x=%b y=%b got=%b exp=%b", op.name(), x_i, y_i, result_o, e[0]);
        end
        checks++;
        if ({cres_o, csns_o, cnop_o, as_o, x_o} !== {cres_i, csns_i, cnop_i, as_i, x_i}) begin
          failures++;
          $display("FAIL copies %s", op.name());
        end
      end
      checks++;
      if (seen[{cres_o, csns_o, cnop_o, as_o, x_o, result_o, g_o, cout_o}]) begin
        failures++;
        $display("FAIL output vector repeated for input %b", k[7:0]);
      end
      seen[{cres_o, csns_o, cnop_o, as_o, x_o, result_o, g_o, cout_o}] = 1'b1;
    end
    checks++;
    if (n_named != 9 * 4) begin
      failures++;
      $display("FAIL expected 36 named vectors, saw %0d", n_named);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
