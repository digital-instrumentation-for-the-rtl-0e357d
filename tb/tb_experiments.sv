// tb_experiments: the instrument in the configurations of its two bench
// experiments and of its main servo design, at default parameters.
//
// Open loop, both channels at once (as in the two-channel set-up):
//  * channel 0: a 160 MHz + 100 Hz beat note, sampled at 125 MS/s, is seen
//    at 35 MHz + 100 Hz; the detection NCO runs at 35 MHz. The detected
//    phase must fall by exactly one cycle every 10 ms (sawtooth of the
//    phase-meter test).
//  * channel 1: an 80 MHz beat (two-way set-up) is seen at 45 MHz, mirrored;
//    a 37 Hz drift of the beat appears as +37 Hz, i.e. +0.37 cycle in 10 ms.
//  * the sniffer in continuous mode with DEC_N = 250000 stores one record
//    every 10 ms: {time tag, ch 0 phase, ch 1 phase}; time tags step by
//    250000 and the phase steps are checked from the stored records.
// Closed loop, channel 1: DAC fed back to ADC, AOM NCO 10 Hz off the 45 MHz
// detection NCO, servo gains of the 100 Hz main-servo design (gain =
// 1.26e-5, i_gain = 1.33e-6 in 2Q30). After 100 ms the phase error must stay
// within 0.01 cycle.
module tb_experiments;
  import fl_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam real FS = 125.0e6;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [13:0] adc [2], dac [2];
  logic [47:0] det_freq [2], det_phase [2], aom_freq [2];
  logic [11:0] iir_b [2][3];
  servo_cmd_t srv_cmd [2];
  logic [31:0] srv_gain [2], srv_igain [2];
  logic signed [39:0] phase [2];
  logic phase_valid [2];
  logic [16:0] amp [2];
  logic [47:0] corr [2];
  logic [29:0] dec_n;
  logic [16:0] snif_enable;
  logic burst_start, rd_en, rd_empty, burst_done;
  logic [63:0] rd_data;
  logic [14:0] rd_count;
  logic [31:0] overruns, drops;
  int checks = 0, failures = 0;
  longint n_clk = 0;
  bit loop1 = 0;

  fiber_link_top dut (.clk, .rst, .adc, .dac, .det_freq, .det_phase, .iir_b, .srv_cmd,
    .srv_gain, .srv_igain, .aom_freq, .phase, .phase_valid, .amp, .corr,
    .dec_n, .snif_enable, .burst_start, .rd_en, .rd_data, .rd_empty, .rd_count,
    .burst_done, .overruns, .drops);
  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [47:0] fword(input real f);
    return 48'(longint'(f / FS * 2.0 ** 48));
  endfunction

  // Beat-note sources, phase kept modulo one cycle in double precision.
  function automatic real cyc_frac(input real f, input longint n);
    real c;
    c = f / FS * $itor(n);
    return c - $floor(c);
  endfunction
  always @(negedge clk) begin
    n_clk <= n_clk + 1;
    adc[0] <= 14'($rtoi($floor(8000.0 * $cos(2.0 * PI * cyc_frac(160.0e6 + 100.0, n_clk)) + 0.5)));
    if (loop1) adc[1] <= dac[1];
    else adc[1] <= 14'($rtoi($floor(8000.0 * $cos(2.0 * PI * cyc_frac(80.0e6 + 37.0, n_clk)) + 0.5)));
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  task automatic pop(output logic [63:0] w);
    while (rd_empty) @(negedge clk);
    rd_en = 1'b1;
    @(negedge clk);
    rd_en = 1'b0;
    w = rd_data;
  endtask

  logic [63:0] tt, p0, p1, ptt, pp0, pp1;
  real d0, d1, e, maxe;
  initial begin
    det_freq[0] = fword(35.0e6); det_freq[1] = fword(45.0e6);
    aom_freq[0] = fword(40.0e6); aom_freq[1] = fword(45.0e6 + 10.0);
    for (int c = 0; c < 2; c++) begin
      det_phase[c] = '0;
      for (int s = 0; s < 3; s++) iir_b[c][s] = 12'd1024;
      srv_cmd[c] = '{rst: 1'b0, sign: 1'b0, cl: 1'b0, p_en: 1'b1, i_en: 1'b1, unused: 3'b000};
      // main servo: gain = 2*pi*100 Hz*40 ns/2, i_gain = 33.3 Hz*40 ns, 2Q30
      srv_gain[c]  = 32'($rtoi(2.0 * PI * 100.0 * 40.0e-9 / 2.0 * 2.0 ** 30 + 0.5));
      srv_igain[c] = 32'($rtoi(100.0 / 3.0 * 40.0e-9 * 2.0 ** 30 + 0.5));
    end
    chk(srv_gain[0] == 32'd13493 && srv_igain[0] == 32'd1432, $sformatf("gain words %0d %0d", srv_gain[0], srv_igain[0]));
    dec_n = 30'd250000; snif_enable = 17'h1_2020; burst_start = 1'b0; rd_en = 1'b0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    // open loop: four records, 10 ms apart
    for (int r = 0; r < 4; r++) begin
      pop(tt); pop(p0); pop(p1);
      if (r > 0) begin
        d0 = $itor($signed(p0[39:0]) - $signed(pp0[39:0])) / 8192.0;
        d1 = $itor($signed(p1[39:0]) - $signed(pp1[39:0])) / 8192.0;
        chk(tt - ptt == 64'd250000, $sformatf("time tag step %0d", tt - ptt));
        chk(d0 > -1.0 - 0.002 && d0 < -1.0 + 0.002, $sformatf("channel 0 phase step %f cycles", d0));
        chk(d1 > 0.37 - 0.002 && d1 < 0.37 + 0.002, $sformatf("channel 1 phase step %f cycles", d1));
        $display("record %0d: time tag %0d, channel 0 step %f, channel 1 step %f cycles", r, tt, d0, d1);
      end
      ptt = tt; pp0 = p0; pp1 = p1;
    end
    // closed loop on channel 1
    snif_enable = '0;
    loop1 = 1;
    srv_cmd[1].rst = 1'b1; @(negedge clk); srv_cmd[1].rst = 1'b0;
    srv_cmd[1].cl = 1'b1;
    repeat (12500000) @(negedge clk);     // 100 ms
    maxe = 0.0;
    for (int s = 0; s < 20000; s++) begin
      @(negedge clk);
      while (!phase_valid[1]) @(negedge clk);
      e = $itor(phase[1]) / 8192.0;
      if (e < 0) e = -e;
      if (e > maxe) maxe = e;
    end
    chk(maxe < 0.01, $sformatf("100 Hz servo: residual phase %f cycles", maxe));
    $display("closed loop residual %f cycles", maxe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
