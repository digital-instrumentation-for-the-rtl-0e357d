// tb_cycle_resolution: drives the unwrapper with the wrapped angle of a known
// phase trajectory (ramps up and down through many cycles, random steps
// smaller than a quarter cycle) and checks every output against the true
// unwrapped phase in cycles (27Q13), including negative phases.
module tb_cycle_resolution;
  logic clk = 1'b0, rst = 1'b1;
  logic v, ov;
  logic signed [15:0] ang;
  logic signed [39:0] ph;
  int checks = 0, failures = 0;
  longint truth;        // true phase in units of 2^-14 cycle (one angle LSB)
  longint wrapped;
  int n_up = 0, n_dn = 0;
  longint prev_c;

  cycle_resolution dut (.clk, .rst, .in_valid(v), .angle(ang), .phase(ph), .out_valid(ov));
  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sample();
    // wrap truth into [-8192, 8191] scaled-radian units (1.0 = 8192 = half cycle)
    wrapped = truth % 16384;
    if (wrapped >= 8192) wrapped -= 16384;
    if (wrapped < -8192) wrapped += 16384;
    ang = 16'(wrapped);
    v = 1'b1;
    @(negedge clk);
    v = 1'b0;
    checks++;
    // expected: truth/2 in Q13 cycles (floor)
    if (!ov || longint'(ph) != (truth >>> 1)) begin
      failures++;
      if (failures < 10) $display("FAIL truth=%0d got=%0d exp=%0d", truth, ph, truth >>> 1);
    end
    if ((longint'(ph) >>> 13) > prev_c) n_up++;
    if ((longint'(ph) >>> 13) < prev_c) n_dn++;
    prev_c = longint'(ph) >>> 13;
    @(negedge clk);
  endtask

  initial begin
    v = 1'b0; ang = '0;
    truth = -3000; prev_c = -1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin truth += 700; sample(); end
    for (int n = 0; n < 4000; n++) begin truth -= 900; sample(); end
    for (int n = 0; n < 3000; n++) begin truth += int'($urandom % 7000) - 3500; sample(); end
    checks++;
    if (n_up < 50 || n_dn < 50) begin failures++; $display("FAIL few wraps %0d %0d", n_up, n_dn); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
