// tb_ralu_funcgen: exhaustive self-checking test of the RALU function generator.
// All 128 input vectors are applied. With both ancillas at 0, each function line is compared
// with the operation it must carry for the given AS and Cpn (AND/NAND/X&~Y/X->Y on the AND line,
// OR/NOR/X|~Y on the OR line, add/subtract sum and carry, XOR/XNOR), computed here from X and Y
// directly. For every vector the 7-bit output must be unique (reversibility).
module tb_ralu_funcgen;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic as_i, x_i, y_i, cin_i, zc_i, cpn_i, zx_i;
  logic as_o, gx_o, or_o, sum_o, cout_o, and_o, xor_o;
  logic [127:0] seen = '0;

  ralu_funcgen dut (.*);

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s as=%b x=%b y=%b cin=%b cpn=%b got=%b exp=%b",
               what, as_i, x_i, y_i, cin_i, cpn_i, got, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < 128; k++) begin
      logic e_and, e_or, e_xor;
      logic [1:0] total;
      {as_i, x_i, y_i, cin_i, zc_i, cpn_i, zx_i} = k[6:0];
      @(posedge clk);
      if (!zc_i && !zx_i) begin
        unique case ({cpn_i, as_i})
          2'b00: begin e_and = x_i & y_i;     e_or = x_i | y_i;       end
          2'b10: begin e_and = ~(x_i & y_i);  e_or = ~(x_i | y_i);    end
          2'b01: begin e_and = x_i & ~y_i;    e_or = x_i | ~y_i;      end  // Y -> X
          2'b11: begin e_and = ~x_i | y_i;    e_or = ~(x_i | ~y_i);   end  // X -> Y
        endcase
        e_xor = as_i ? ~(x_i ^ y_i) : (x_i ^ y_i);
        total = as_i ? 2'(x_i) + 2'(!y_i) + 2'(cin_i) : 2'(x_i) + 2'(y_i) + 2'(cin_i);
        check("and",  and_o,  e_and);
        check("or",   or_o,   e_or);
        check("xor",  xor_o,  e_xor);
        check("sum",  sum_o,  total[0]);
        check("cout", cout_o, total[1]);
        check("gx",   gx_o,   x_i);
        check("as",   as_o,   as_i);
      end
      checks++;
      if (seen[{as_o, gx_o, or_o, sum_o, cout_o, and_o, xor_o}]) begin
        failures++;
        $display("FAIL output vector repeated for input %b", k[6:0]);
      end
      seen[{as_o, gx_o, or_o, sum_o, cout_o, and_o, xor_o}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
