// tb_rev_peres: exhaustive self-checking test of the rev_peres reversible gate.
// Every input combination is applied once per clock; the outputs are compared with the gate's
// mapping (x=a, y=a^b, z=(a&b)^c) worked out here, and the test also checks that no two inputs give the same
// output vector, i.e. that the gate is reversible. A watchdog ends a run that hangs.
module tb_rev_peres;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic a;
  logic b;
  logic c;
  logic x;
  logic y;
  logic z;
  logic [2:0] exp_v;
  logic [7:0] seen = '0;

  rev_peres dut (.a(a), .b(b), .c(c), .x(x), .y(y), .z(z));

  initial begin
    for (int k = 0; k < 8; k++) begin
      logic [2:0] v;
      v = k[2:0];
      a = v[2]; b = v[1]; c = v[0];
      @(posedge clk);
      exp_v = {a, a ^ b, (a & b) ^ c};
      checks++;
      if ({x, y, z} !== exp_v) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", v, {x, y, z}, exp_v);
      end
      checks++;
      if (seen[{x, y, z}]) begin
        failures++;
        $display("FAIL output %b repeated, mapping not reversible", {x, y, z});
      end
      seen[{x, y, z}] = 1'b1;
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
