// tb_ralu_fredsel: exhaustive self-checking test of the three-Fredkin function selector.
// All 64 input vectors are applied. The result must be F1..F4 for {Ctl2,Ctl1} = 00..11; gao must
// hold the one of F1/F2 and gsx the one of F3/F4 that Ctl1 did not pick, and gr the pair result
// that Ctl2 did not pick. Includes the worked case Ctl1 = 0, Ctl2 = 1: result F3, gr F1.
// For every vector the 6-bit output must be unique (reversibility).
module tb_ralu_fredsel;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ctl1_i, ctl2_i, f1_i, f2_i, f3_i, f4_i;
  logic result_o, gao_o, gsx_o, gr_o, ctl1_o, ctl2_o;
  logic [63:0] seen = '0;

  ralu_fredsel dut (.*);

  initial begin
    for (int k = 0; k < 64; k++) begin
      logic [3:0] f;
      logic m12, m34, o12, o34;
      {ctl2_i, ctl1_i, f4_i, f3_i, f2_i, f1_i} = k[5:0];
      @(posedge clk);
      f   = {f4_i, f3_i, f2_i, f1_i};
      m12 = ctl1_i ? f2_i : f1_i;
      o12 = ctl1_i ? f1_i : f2_i;
      m34 = ctl1_i ? f4_i : f3_i;
      o34 = ctl1_i ? f3_i : f4_i;
      checks++;
      if (result_o !== f[{ctl2_i, ctl1_i}]) begin
        failures++;
        $display("FAIL result ctl=%b%b f=%b got=%b", ctl2_i, ctl1_i, f, result_o);
      end
      checks++;
      if ({gao_o, gsx_o, gr_o, ctl1_o, ctl2_o} !== {o12, o34, ctl2_i ? m12 : m34, ctl1_i, ctl2_i}) begin
        failures++;
        $display("FAIL garbage ctl=%b%b f=%b got gao=%b gsx=%b gr=%b", ctl2_i, ctl1_i, f,
                 gao_o, gsx_o, gr_o);
      end
      if (!ctl1_i && ctl2_i) begin
        checks++;
        if (result_o !== f3_i || gr_o !== f1_i) begin
          failures++;
          $display("FAIL worked example f=%b", f);
        end
      end
      checks++;
      if (seen[{result_o, gao_o, gsx_o, gr_o, ctl1_o, ctl2_o}]) begin
        failures++;
        $display("FAIL output vector repeated for input %b", k[5:0]);
      end
      seen[{result_o, gao_o, gsx_o, gr_o, ctl1_o, ctl2_o}] = 1'b1;
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
