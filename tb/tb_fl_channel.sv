// tb_fl_channel: end-to-end test of one phase-meter/compensator channel.
//
// Part A, open loop: the ADC sees a 35.1 MHz tone (amplitude 8000 LSB) and
// the detection NCO runs at 35 MHz, so the beat is -100 kHz: the detected
// phase (atan2(Q, I) = -(input phase - NCO phase)) must fall by 0.004 cycle
// per decimated sample. Checked: the unwrapped phase slope over 4000
// samples (16 cycles, so many cycle wraps), the module (~8000), the
// 25 MS/s output strobe (one in five clocks) and the DAC word, whose zero
// crossings must match the AOM NCO frequency while the servo is open.
//
// Part B, closed loop: the DAC word is fed back to the ADC (a zero-length
// "fiber") and the AOM NCO is 20 kHz off the detection NCO. With the loop
// closed the servo must pull the measured phase to zero and hold it within
// 0.01 cycle, its correction ramping to cancel the frequency offset.
module tb_fl_channel;
  import fl_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam real FS = 125.0e6;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [13:0] adc, dac;
  logic [47:0] det_freq, det_phase, aom_freq;
  logic [11:0] iir_b [3];
  servo_cmd_t cmd;
  logic [31:0] gain, igain;
  logic dec_valid, iir_valid, angle_valid, phase_valid, amp_valid, corr_valid;
  logic signed [15:0] i_dec, q_dec, i_iir, q_iir, angle;
  logic signed [39:0] phase;
  logic [16:0] amp;
  logic [47:0] corr;
  int checks = 0, failures = 0;
  bit loopback = 0;
  longint n_clk = 0;
  real f_in = 35.1e6;

  fl_channel dut (.clk, .rst, .adc, .det_freq, .det_phase, .iir_b, .srv_cmd(cmd),
    .srv_gain(gain), .srv_igain(igain), .aom_freq, .dac,
    .dec_valid, .i_dec, .q_dec, .i_iir, .q_iir, .iir_valid, .angle, .angle_valid,
    .phase, .phase_valid, .amp, .amp_valid, .corr, .corr_valid);
  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [47:0] fword(input real f);
    return 48'($rtoi(f / FS * 2.0 ** 24) * 64'd16777216);   // 2^48 * f / fs, 24-bit exact steps
  endfunction

  // ADC stimulus
  always @(negedge clk) begin
    n_clk <= n_clk + 1;
    if (loopback) adc <= dac;
    else adc <= 14'($rtoi($floor(8000.0 * $cos(2.0 * PI * f_in / FS * $itor(n_clk)) + 0.5)));
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  int nv, gap, last, ncross;
  bit prev_pos;
  real p0, p1, slope, fa, maxerr, ph;
  initial begin
    adc = '0;
    det_freq = fword(35.0e6); det_phase = '0; aom_freq = fword(40.0e6);
    iir_b[0] = 12'd512; iir_b[1] = 12'd1024; iir_b[2] = 12'd2048;
    cmd = '{rst: 1'b0, sign: 1'b0, cl: 1'b0, p_en: 1'b1, i_en: 1'b1, unused: 3'b000};
    gain = 32'($rtoi(0.05 * 2.0 ** 30)); igain = 32'($rtoi(0.005 * 2.0 ** 30));
    repeat (4) @(negedge clk);
    rst = 1'b0;
    // Part A: settle, then measure
    repeat (2000) @(negedge clk);
    nv = 0; last = -1; gap = 0;
    for (int k = 0; k < 50; k++) begin
      @(negedge clk);
      if (dec_valid) begin
        if (last >= 0 && k - last != 5) gap++;
        last = k; nv++;
      end
    end
    chk(nv == 10 && gap == 0, $sformatf("decimated strobe: %0d in 50 clocks", nv));
    while (!phase_valid) @(negedge clk);
    p0 = $itor(phase) / 8192.0;
    for (int s = 0; s < 4000; s++) begin
      @(negedge clk);
      while (!phase_valid) @(negedge clk);
    end
    p1 = $itor(phase) / 8192.0;
    slope = (p1 - p0) / 4000.0;
    chk(slope > -0.004 - 1e-5 && slope < -0.004 + 1e-5, $sformatf("phase slope %f cycles/sample", slope));
    chk(p1 - p0 < -15.9, $sformatf("unwrapped %f cycles", p1 - p0));
    fa = $itor(amp);
    chk(fa > 7800.0 && fa < 8200.0, $sformatf("module %f", fa));
    // DAC: AOM NCO at 40 MHz, servo open -> count sine rising zero crossings
    ncross = 0; prev_pos = 1;
    for (int k = 0; k < 12500; k++) begin
      @(negedge clk);
      if (!prev_pos && dac >= 0) ncross++;
      prev_pos = (dac >= 0);
    end
    chk(ncross >= 3999 && ncross <= 4001, $sformatf("DAC crossings %0d (4000 expected)", ncross));
    chk(corr == 48'd0, "servo open: no correction");
    // Part B: closed loop through a loopback
    loopback = 1;
    iir_b[0] = 12'd1024;
    aom_freq = fword(35.02e6);
    cmd.rst = 1'b1; @(negedge clk); cmd.rst = 1'b0;
    cmd.cl = 1'b1;
    for (int s = 0; s < 6000; s++) begin
      @(negedge clk);
      while (!phase_valid) @(negedge clk);
    end
    maxerr = 0.0;
    for (int s = 0; s < 2000; s++) begin
      @(negedge clk);
      while (!phase_valid) @(negedge clk);
      ph = $itor(phase) / 8192.0;
      if (ph < 0) ph = -ph;
      if (ph > maxerr) maxerr = ph;
    end
    chk(maxerr < 0.01, $sformatf("locked phase error %f cycles", maxerr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
