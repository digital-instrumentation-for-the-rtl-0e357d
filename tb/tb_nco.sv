// tb_nco: self-checking testbench of the NCO.
//
// A cycle model of the phase path (accumulator, offset, 2-clock latency) runs
// beside the block; the expected output is computed with $sin from the model
// phase, not from a table. It checks every output sample of sine and cosine
// to within one LSB, the 2-clock latency after a phase-offset step, and the
// output frequency of eq. f_out = freq*f_clk/2^48 by counting sine zero
// crossings.
module tb_nco;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst = 1'b1;
  logic [47:0] freq, phase;
  logic signed [13:0] sin_o, cos_o;
  int checks = 0, failures = 0;

  nco dut (.clk, .rst, .freq, .phase, .sin_o, .cos_o);
  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cycle model of the phase path.
  logic [47:0] m_acc;
  logic [11:0] m_th, m_th_d;
  function automatic int expect_sin(input logic [11:0] th);
    return $rtoi($floor(8191.0 * $sin(2.0 * PI * (real'(th) + 0.5) / 4096.0) + 0.5));
  endfunction
  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got - exp > 1 || exp - got > 1) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int   n_cross;
  logic prev_pos;
  int   step_seen;

  initial begin
    freq  = 48'd0;
    phase = 48'd0;
    m_acc = '0; m_th = '0; m_th_d = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    freq = 48'h0478_0000_0000 + 48'd12345;    // about 35 MHz at 125 MHz
    rst  = 1'b0;
    // Run, checking every sample.
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      m_th_d = m_th;
      m_th   = 12'((m_acc + phase) >> 36);
      m_acc  = m_acc + freq;
      @(negedge clk);
      if (n >= 2) begin
        check(int'(sin_o), expect_sin(m_th_d), "sin");
        check(int'(cos_o), expect_sin(m_th_d + 12'd1024), "cos");
      end
      if (n == 1500) phase = 48'h4000_0000_0000;   // quarter-cycle offset step
    end
    // Latency of a phase step with freq = 0: output moves exactly 2 clocks later.
    freq = '0; phase = '0;
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    repeat (4) @(negedge clk);
    phase = 48'h4000_0000_0000;   // sine goes from ~0 to ~+8191
    step_seen = -1;
    for (int k = 1; k <= 4; k++) begin
      @(negedge clk);
      if (step_seen < 0 && sin_o > 14'sd4000) step_seen = k;
    end
    checks++;
    if (step_seen != 2) begin failures++; $display("FAIL latency %0d", step_seen); end
    // Frequency: f = freq/2^48 * fclk -> count rising zero crossings over N clocks.
    freq = 48'h0100_0000_0000;    // 1/256 of fclk
    phase = '0;
    n_cross = 0; prev_pos = 1'b1;
    repeat (4) @(negedge clk);
    for (int k = 0; k < 256 * 20; k++) begin
      @(negedge clk);
      if (!prev_pos && sin_o >= 0) n_cross++;
      prev_pos = (sin_o >= 0);
    end
    checks++;
    if (n_cross != 20) begin failures++; $display("FAIL frequency: %0d crossings", n_cross); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
