// tb_fiber_link_top: end-to-end test of the two-channel instrument at its
// default parameters (two channels, decimation by 5, 2^14-word sniffer FIFO).
//
// Channel 0 runs open loop, like a phase-meter on a beat note: its ADC sees
// a 35.2 MHz tone against a 35 MHz detection NCO, so its phase falls by
// 0.008 cycle per decimated sample, wrapping through many cycles.
// Channel 1 runs closed loop: its DAC word is fed back to its ADC and its
// AOM NCO is 20 kHz off its detection NCO; the servo must lock the phase.
//
// The sniffer is used as the processor would use it:
//  * continuous mode (dec_n = 250): records {time tag, ch0 phase, ch0 module}
//    are read back; time tags step by 250 and the recorded phase falls by
//    250 * 0.008 = 2 cycles per record;
//  * burst mode (dec_n = 10): 16384 consecutive samples of channel 1's
//    phase, all within 0.01 cycle of zero (locked loop);
//  * overrun (all 17 words enabled at the full decimated rate) and FIFO
//    full (a full FIFO left unread, then continuous records) must each
//    happen and be counted.
// Finally the IIR chain of channel 0 is narrowed to about 16 kHz, which must
// attenuate its 200 kHz beat (module well below 8000), then disabled again.
// Each mechanism is counted; one that never happens is a failure.
module tb_fiber_link_top;
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

  // mechanism counters
  int m_cont_records = 0, m_burst_words = 0, m_cycle_wraps = 0, m_lock = 0;
  int m_overrun = 0, m_fifo_full = 0, m_iir_on = 0, m_iir_off = 0;

  fiber_link_top dut (.clk, .rst, .adc, .dac, .det_freq, .det_phase, .iir_b, .srv_cmd,
    .srv_gain, .srv_igain, .aom_freq, .phase, .phase_valid, .amp, .corr,
    .dec_n, .snif_enable, .burst_start, .rd_en, .rd_data, .rd_empty, .rd_count,
    .burst_done, .overruns, .drops);
  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [47:0] fword(input real f);
    return 48'($rtoi(f / FS * 2.0 ** 24) * 64'd16777216);
  endfunction

  always @(negedge clk) begin
    n_clk <= n_clk + 1;
    adc[0] <= 14'($rtoi($floor(8000.0 * $cos(2.0 * PI * 35.2e6 / FS * $itor(n_clk)) + 0.5)));
    adc[1] <= dac[1];
  end

  // cycle wraps seen on channel 0
  longint prev_cyc = 0;
  always @(negedge clk) if (!rst && phase_valid[0]) begin
    if ((longint'(phase[0]) >>> 13) != prev_cyc) m_cycle_wraps++;
    prev_cyc = longint'(phase[0]) >>> 13;
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

  task automatic drain();
    logic [63:0] w;
    while (!rd_empty) pop(w);
  endtask

  logic [63:0] tt, prev_tt, w, ph_w, prev_ph;
  real d, e, maxe;
  initial begin
    for (int c = 0; c < 2; c++) begin
      det_freq[c] = fword(35.0e6); det_phase[c] = '0;
      srv_gain[c] = 32'($rtoi(0.05 * 2.0 ** 30)); srv_igain[c] = 32'($rtoi(0.005 * 2.0 ** 30));
    end
    aom_freq[0] = fword(40.0e6);
    aom_freq[1] = fword(35.02e6);
    // channel 0: first IIR stage on (about 2 MHz), others off; channel 1: all off
    iir_b[0][0] = 12'd512;  iir_b[0][1] = 12'd1024; iir_b[0][2] = 12'd4095;
    iir_b[1][0] = 12'd1024; iir_b[1][1] = 12'd1024; iir_b[1][2] = 12'd1024;
    srv_cmd[0] = '{rst: 1'b0, sign: 1'b0, cl: 1'b0, p_en: 1'b1, i_en: 1'b1, unused: 3'b000};
    srv_cmd[1] = '{rst: 1'b0, sign: 1'b0, cl: 1'b1, p_en: 1'b1, i_en: 1'b1, unused: 3'b000};
    dec_n = 30'd250; snif_enable = '0; burst_start = 1'b0; rd_en = 1'b0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (40000) @(negedge clk);     // let channel 1 lock
    // continuous mode: {time tag, ch0 phase (input 5), ch0 module (input 6)}
    drain();
    snif_enable = 17'h1_0060;
    prev_tt = '1;
    for (int r = 0; r < 30; r++) begin
      pop(tt); pop(ph_w); pop(w);
      m_cont_records++;
      if (r > 0) begin
        chk(tt - prev_tt == 250, $sformatf("time tag step %0d", tt - prev_tt));
        d = $itor($signed(ph_w[39:0]) - $signed(prev_ph[39:0])) / 8192.0;
        chk(d > -2.0 - 0.01 && d < -2.0 + 0.01, $sformatf("recorded phase step %f cycles", d));
      end
      chk(w > 64'd7800 && w < 64'd8200, $sformatf("recorded module %0d", w));
      prev_tt = tt; prev_ph = ph_w;
    end
    snif_enable = '0;
    repeat (300 * 5) @(negedge clk);
    drain();
    // burst mode: channel 1 phase (input 13)
    dec_n = 30'd10;
    snif_enable = 17'h0_2000;
    burst_start = 1'b1; @(negedge clk); burst_start = 1'b0;
    while (!burst_done) @(negedge clk);
    chk(rd_count == 15'd16384, $sformatf("burst length %0d", rd_count));
    maxe = 0.0;
    while (!rd_empty) begin
      pop(w);
      m_burst_words++;
      e = $itor($signed(w[39:0])) / 8192.0;
      if (e < 0) e = -e;
      if (e > maxe) maxe = e;
    end
    chk(maxe < 0.01, $sformatf("locked channel phase error %f", maxe));
    if (maxe < 0.01) m_lock++;
    // overrun: 17 words per sample cannot fit in 5 clocks
    snif_enable = '1;
    burst_start = 1'b1; @(negedge clk); burst_start = 1'b0;
    repeat (100 * 5) @(negedge clk);
    if (overruns > 0) m_overrun++;
    // FIFO full: fill it with a one-channel burst and no reads, then switch
    // to continuous mode: the next records must be dropped and counted.
    drain();
    snif_enable = 17'h0_0020;
    burst_start = 1'b1; @(negedge clk); burst_start = 1'b0;
    while (!burst_done) @(negedge clk);
    dec_n = 30'd250;
    repeat (3 * 250 * 5) @(negedge clk);
    if (drops > 0 && rd_count == 15'd16384) m_fifo_full++;
    // IIR chain: a narrow first stage (b = 4, about 16 kHz) must attenuate
    // the 200 kHz beat of channel 0; disabled stages must pass it.
    iir_b[0][0] = 12'd4;
    repeat (30000) @(negedge clk);
    if (amp[0] < 17'd2000) m_iir_on++;
    chk(amp[0] < 17'd2000, $sformatf("IIR on: module %0d", amp[0]));
    iir_b[0][0] = 12'd1024;
    repeat (30000) @(negedge clk);
    if (amp[0] > 17'd7800) m_iir_off++;
    chk(amp[0] > 17'd7800, $sformatf("IIR off: module %0d", amp[0]));
    // every mechanism must have happened
    chk(m_cont_records > 0, "continuous capture never happened");
    chk(m_burst_words == 16384, "burst capture incomplete");
    chk(m_cycle_wraps > 10, "phase never crossed cycles");
    chk(m_lock > 0, "servo never locked");
    chk(m_overrun > 0, "overrun never happened");
    chk(m_fifo_full > 0, "FIFO never filled");
    chk(m_iir_on > 0 && m_iir_off > 0, "IIR modes");
    $display("mechanisms: continuous records %0d, burst words %0d, cycle wraps %0d, lock %0d, overrun %0d, fifo full %0d, iir on %0d, iir off %0d",
             m_cont_records, m_burst_words, m_cycle_wraps, m_lock, m_overrun, m_fifo_full, m_iir_on, m_iir_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
