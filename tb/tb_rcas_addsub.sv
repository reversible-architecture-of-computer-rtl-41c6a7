// tb_rcas_addsub: self-checking test of the 16-bit reversible adder/subtractor with overflow.
// Directed corner cases (largest and smallest signed values, zero, all ones) and random
// operands are added and subtracted; sum/difference, carry out and signed overflow are compared
// with integer arithmetic done here, and the garbage lines with their defining equations.
// The test also counts that overflow and carry out each occurred at least once. A 4-bit
// instance is run through all 512 input settings: its results are checked the same way and no
// two settings may give the same output vector (the circuit must stay one-to-one).
module tb_rcas_addsub;
  localparam int N = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_cout = 0, n_sub = 0;

  logic         as_i;
  logic [N-1:0] x_i, y_i;
  logic [N-1:0] sd_o, g1_o, g2_o;
  logic         cout_o, ovf_o, as_g_o;

  rcas_addsub #(.N(N)) dut (.*);

  logic [3:0] sd4, g14, g24;
  logic       cout4, ovf4, asg4;
  rcas_addsub #(.N(4)) dut4 (
    .as_i(as_i), .x_i(x_i[3:0]), .y_i(y_i[3:0]), .sd_o(sd4), .cout_o(cout4), .ovf_o(ovf4),
    .as_g_o(asg4), .g1_o(g14), .g2_o(g24)
  );

  task automatic apply(input logic sub, input logic [N-1:0] x, input logic [N-1:0] y);
    logic [N:0]    full;
    logic [N-1:0]  yy;
    longint        sx, sy, sr;
    logic          exp_ovf;
    as_i = sub; x_i = x; y_i = y;
    @(posedge clk);
    yy   = sub ? ~y : y;
    full = {1'b0, x} + {1'b0, yy} + (N+1)'(sub);
    sx   = longint'($signed(x));
    sy   = longint'($signed(y));
    sr   = sub ? sx - sy : sx + sy;
    exp_ovf = (sr > longint'(2**(N-1) - 1)) || (sr < -longint'(2**(N-1)));
    checks++;
    if (sd_o !== full[N-1:0] || cout_o !== full[N] || ovf_o !== exp_ovf) begin
      failures++;
      $display("FAIL sub=%b x=%h y=%h -> sd=%h cout=%b ovf=%b, exp sd=%h cout=%b ovf=%b",
               sub, x, y, sd_o, cout_o, ovf_o, full[N-1:0], full[N], exp_ovf);
    end
    checks++;
    if (g1_o !== x || g2_o !== (x ^ yy) || as_g_o !== sub) begin
      failures++;
      $display("FAIL garbage lines sub=%b x=%h y=%h", sub, x, y);
    end
    n_ovf  += int'(ovf_o);
    n_cout += int'(cout_o);
    n_sub  += int'(sub);
  endtask

  initial begin
    logic [N-1:0] corners [6];
    corners = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h5555};
    foreach (corners[i])
      foreach (corners[j]) begin
        apply(1'b0, corners[i], corners[j]);
        apply(1'b1, corners[i], corners[j]);
      end
    repeat (2000) apply(1'($urandom), N'($urandom), N'($urandom));
    begin
      bit seen [logic [14:0]];
      int dups = 0;
      for (int k = 0; k < 512; k++) begin
        logic [4:0] full;
        logic [3:0] ny;
        int         sr;
        logic [14:0] key;
        {as_i, x_i[3:0], y_i[3:0]} = k[8:0];
        x_i[N-1:4] = '0;
        y_i[N-1:4] = '0;
        @(posedge clk);
        ny   = ~y_i[3:0];
        full = as_i ? 5'(x_i[3:0]) + 5'(ny) + 5'd1 : 5'(x_i[3:0]) + 5'(y_i[3:0]);
        sr   = as_i ? int'($signed(x_i[3:0])) - int'($signed(y_i[3:0]))
                    : int'($signed(x_i[3:0])) + int'($signed(y_i[3:0]));
        checks++;
        if ({cout4, sd4} !== full || ovf4 !== (sr > 7 || sr < -8)) begin
          failures++;
          $display("FAIL 4-bit sub=%b x=%h y=%h got %b%h v=%b", as_i, x_i[3:0], y_i[3:0],
                   cout4, sd4, ovf4);
        end
        key = {sd4, g14, g24, cout4, ovf4, asg4};
        if (seen.exists(key)) dups++;
        seen[key] = 1'b1;
      end
      checks++;
      if (dups != 0) begin
        failures++;
        $display("FAIL 4-bit circuit not one-to-one: %0d repeated outputs", dups);
      end
    end
    checks++;
    if (n_ovf == 0 || n_cout == 0 || n_sub == 0) begin
      failures++;
      $display("FAIL a mechanism never happened: ovf=%0d cout=%0d sub=%0d", n_ovf, n_cout, n_sub);
    end
    $display("overflows=%0d carries=%0d subtractions=%0d", n_ovf, n_cout, n_sub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
