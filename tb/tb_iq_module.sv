// tb_iq_module: checks the amplitude output against floor(sqrt(I^2+Q^2))
// computed here with a real square root (corrected to the exact integer
// floor), for random and extreme vectors fed one per clock, and the latency
// of IN_W+2 = 18 clocks.
module tb_iq_module;
  logic clk = 1'b0, rst = 1'b1;
  logic v, ov;
  logic signed [15:0] ii, qq;
  logic [16:0] amp;
  int checks = 0, failures = 0;
  longint exp_q [$];
  int in_cyc [$];
  int cyc = 0, n_out = 0;

  iq_module dut (.clk, .rst, .in_valid(v), .i_in(ii), .q_in(qq), .amp, .out_valid(ov));
  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint isqrt(input longint s);
    longint r;
    r = longint'($floor($sqrt($itor(s))));
    while (r * r > s) r--;
    while ((r + 1) * (r + 1) <= s) r++;
    return r;
  endfunction

  always @(posedge clk) cyc++;   // clock edges so far

  always @(negedge clk) begin
    if (!rst && ov) begin
      longint e; int c0;
      e = exp_q.pop_front();
      c0 = in_cyc.pop_front();
      checks++;
      if (longint'(amp) != e || cyc - c0 != 18) begin
        failures++;
        if (failures < 10) $display("FAIL amp %0d expected %0d latency %0d", amp, e, cyc - c0);
      end
      n_out++;
    end
  end

  initial begin
    v = 1'b0; ii = '0; qq = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      ii = 16'($urandom); qq = 16'($urandom);
      if (n == 0) begin ii = -16'sd32768; qq = -16'sd32768; end
      if (n == 1) begin ii = 0; qq = 0; end
      if (n == 2) begin ii = 16'sd32767; qq = 0; end
      exp_q.push_back(isqrt(longint'(ii) * longint'(ii) + longint'(qq) * longint'(qq)));
      in_cyc.push_back(cyc);
      v = 1'b1;
      @(negedge clk);
    end
    v = 1'b0;
    repeat (30) @(negedge clk);
    checks++;
    if (n_out != 2000) begin failures++; $display("FAIL count %0d", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
