// tb_ralu_mux4: exhaustive self-checking test of the reversible Davio 4:1 multiplexer.
// All 64 input vectors are applied. The result must be F1, F2, F3 or F4 for {Ctl2,Ctl1} = 00,
// 01, 10, 11, the controls must pass through, and the garbage lines must hold F1^F2, M12^M34 and
// F3^F4. For every vector the 6-bit output must be unique (reversibility, no ancilla).
module tb_ralu_mux4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic f1_i, f2_i, f3_i, f4_i, ctl1_i, ctl2_i;
  logic result_o, g1_o, g2_o, g3_o, ctl1_o, ctl2_o;
  logic [63:0] seen = '0;

  ralu_mux4 dut (.*);

  initial begin
    for (int k = 0; k < 64; k++) begin
      logic [3:0] f;
      logic e_res, m12, m34;
      {ctl2_i, ctl1_i, f4_i, f3_i, f2_i, f1_i} = k[5:0];
      @(posedge clk);
      f = {f4_i, f3_i, f2_i, f1_i};
      e_res = f[{ctl2_i, ctl1_i}];
      m12 = ctl1_i ? f2_i : f1_i;
      m34 = ctl1_i ? f4_i : f3_i;
      checks++;
      if (result_o !== e_res) begin
        failures++;
        $display("FAIL result ctl=%b%b f=%b got=%b exp=%b", ctl2_i, ctl1_i, f, result_o, e_res);
      end
      checks++;
      if ({g1_o, g2_o, g3_o, ctl1_o, ctl2_o} !== {f1_i ^ f2_i, m12 ^ m34, f3_i ^ f4_i, ctl1_i, ctl2_i}) begin
        failures++;
        $display("FAIL garbage ctl=%b%b f=%b", ctl2_i, ctl1_i, f);
      end
      checks++;
      if (seen[{result_o, g1_o, g2_o, g3_o, ctl1_o, ctl2_o}]) begin
        failures++;
        $display("FAIL output vector repeated for input %b", k[5:0]);
      end
      seen[{result_o, g1_o, g2_o, g3_o, ctl1_o, ctl2_o}] = 1'b1;
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
