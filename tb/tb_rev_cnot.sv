// tb_rev_cnot: exhaustive self-checking test of the rev_cnot reversible gate.
// Every input combination is applied once per clock; the outputs are compared with the gate's
// mapping (x=a, y=a^b) worked out here, and the test also checks that no two inputs give the same
// output vector, i.e. that the gate is reversible. A watchdog ends a run that hangs.
module tb_rev_cnot;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic a;
  logic b;
  logic x;
  logic y;
  logic [1:0] exp_v;
  logic [3:0] seen = '0;

  rev_cnot dut (.a(a), .b(b), .x(x), .y(y));

  initial begin
    for (int k = 0; k < 4; k++) begin
      logic [1:0] v;
      v = k[1:0];
      a = v[1]; b = v[0];
      @(posedge clk);
      exp_v = {a, a ^ b};
      checks++;
      if ({x, y} !== exp_v) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", v, {x, y}, exp_v);
      end
      checks++;
      if (seen[{x, y}]) begin
        failures++;
        $display("FAIL output %b repeated, mapping not reversible", {x, y});
      end
      seen[{x, y}] = 1'b1;
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
