// tb_rcas: exhaustive self-checking test of the reversible controlled adder/subtractor cell.
// All 32 input vectors are applied. With the ancilla at 0 the cell must produce the full-adder
// sum and carry of X, Y^A/S and Cin, pass X and A/S through, and leave A/S^Y^X on the garbage
// line. For every vector, ancilla included, the 5-bit output must be unique (reversibility).
module tb_rcas;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic as_i, x_i, y_i, cin_i, zero_i;
  logic as_g_o, g1_o, g2_o, sd_o, cout_o;
  logic [31:0] seen = '0;

  rcas dut (.*);

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s as=%b x=%b y=%b cin=%b zero=%b got=%b exp=%b",
               what, as_i, x_i, y_i, cin_i, zero_i, got, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < 32; k++) begin
      logic [1:0] total;
      {as_i, x_i, y_i, cin_i, zero_i} = k[4:0];
      @(posedge clk);
      if (!zero_i) begin
        // subtraction with borrow-in form X + ~Y + Cin
        total = 2'(x_i) + 2'(as_i ? !y_i : y_i) + 2'(cin_i);
        check("sd",   sd_o,   total[0]);
        check("cout", cout_o, total[1]);
        check("g1",   g1_o,   x_i);
        check("g2",   g2_o,   as_i ^ y_i ^ x_i);
        check("as_g", as_g_o, as_i);
      end
      checks++;
      if (seen[{as_g_o, g1_o, g2_o, sd_o, cout_o}]) begin
        failures++;
        $display("FAIL output vector repeated for input %b", k[4:0]);
      end
      seen[{as_g_o, g1_o, g2_o, sd_o, cout_o}] = 1'b1;
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
