// tb_cordic_atan: checks the arc-tangent against $atan2.
// Random vectors of every quadrant and magnitude (including the axes and
// full-scale corners) are fed one per clock; each result must be within
// 3 LSB of round(atan2(Q,I)/pi * 2^13) for vectors of magnitude 2^9 and above (angles near +/-pi may come out with
// either sign), and must appear NITER+2 = 18 clocks after its input.
module tb_cordic_atan;
  localparam real PI = 3.14159265358979323846;
  localparam int LAT = 18;
  logic clk = 1'b0, rst = 1'b1;
  logic v, ov;
  logic signed [15:0] ii, qq, ang;
  int checks = 0, failures = 0;
  int exp_q [$];
  int n_out = 0, n_in = 0, cyc = 0;
  int in_cyc [$];

  cordic_atan dut (.clk, .rst, .in_valid(v), .i_in(ii), .q_in(qq), .angle(ang), .out_valid(ov));
  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;   // clock edges so far

  always @(negedge clk) begin
    if (!rst && ov) begin
      int e, d, c0;
      e = exp_q.pop_front();
      c0 = in_cyc.pop_front();
      d = int'(ang) - e;
      // +pi and -pi are the same angle: accept either sign right at the cut
      if ((e > 8185 || e < -8185) && (d > 8192)) d -= 16384;
      if ((e > 8185 || e < -8185) && (d < -8192)) d += 16384;
      checks++;
      if (d > 3 || d < -3 || cyc - c0 != LAT) begin
        failures++;
        if (failures < 10) $display("FAIL angle %0d expected %0d latency %0d", ang, e, cyc - c0);
      end
      n_out++;
    end
  end

  initial begin
    int mag;
    real a;
    v = 1'b0; ii = '0; qq = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      mag = 1 << (9 + ($urandom % 6));
      ii = 16'(int'($urandom % (2 * mag)) - mag);
      qq = 16'(int'($urandom % (2 * mag)) - mag);
      if (n == 0) begin ii = 16'sd16384; qq = 0; end
      if (n == 1) begin ii = 0; qq = 16'sd16384; end
      if (n == 2) begin ii = -16'sd16384; qq = 16'sd1; end
      if (n == 3) begin ii = 0; qq = -16'sd16384; end
      if (n == 4) begin ii = -16'sd32768; qq = -16'sd32768; end
      // keep the vector length at 256 or more (the stated accuracy range)
      while (int'(ii) * int'(ii) + int'(qq) * int'(qq) < 65536) ii = 16'(int'(ii) * 2 + 300);
      a = $atan2($itor(qq), $itor(ii)) / PI * 8192.0;
      exp_q.push_back($rtoi($floor(a + 0.5)));
      in_cyc.push_back(cyc);
      v = 1'b1;
      n_in++;
      @(negedge clk);
    end
    v = 1'b0;
    repeat (40) @(negedge clk);
    checks++;
    if (n_out != n_in) begin failures++; $display("FAIL %0d results for %0d inputs", n_out, n_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
