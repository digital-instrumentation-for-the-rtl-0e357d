// tb_sniffer: exercises the sniffer's two storage modes and its loss paths.
// Channel k carries {k, sample number} so every stored word tells which
// channel and which sample it came from; the time tag counts samples, so
// channel words must match their record's time tag.
//  1. Continuous mode, dec_n = 250: records of {time tag, ch 0, ch 3, ch 15}
//     are read back while capture runs; time tags step by exactly 250 and
//     every channel word matches its time tag.
//  2. Burst mode, dec_n = 10, one channel enabled: exactly 16384 words are
//     stored, one per decimated sample (40 ns at 125 MHz / 5), then
//     burst_done rises and nothing more is stored.
//  3. Overrun: 17 words enabled in burst mode cannot be written in the five
//     clocks between samples, so captures are skipped and counted.
//  4. Full FIFO in continuous mode with no reads: words are dropped and
//     counted, and the FIFO holds exactly 16384 words.
module tb_sniffer;
  localparam int M = 5;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid;
  logic [63:0] ch [16];
  logic [16:0] enable;
  logic [29:0] dec_n;
  logic burst_start, rd_en, rd_empty, burst_done;
  logic [63:0] rd_data;
  logic [14:0] rd_count;
  logic [31:0] overruns, drops;
  int checks = 0, failures = 0;
  longint sample_no = 0;

  sniffer dut (.clk, .rst, .in_valid, .ch_data(ch), .enable, .dec_n, .burst_start,
               .rd_en, .rd_data, .rd_empty, .rd_count, .burst_done, .overruns, .drops);
  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sample stream: one in_valid every M clocks; channel data changes right
  // after each strobe, so at a strobe it carries the number of strobes so far.
  int div = 0;
  always @(posedge clk) begin
    if (rst) begin div <= 0; in_valid <= 1'b0; end
    else begin
      div <= (div == M - 1) ? 0 : div + 1;
      in_valid <= (div == M - 1);
      if (in_valid) sample_no <= sample_no + 1;
    end
  end
  always_comb for (int k = 0; k < 16; k++) ch[k] = {16'(k), 48'(sample_no)};

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

  logic [63:0] w, tt, prev_tt;
  initial begin
    enable = '0; dec_n = 30'd250; burst_start = 1'b0; rd_en = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // 1. continuous
    enable = 17'h1_8009;   // time tag, ch 15, ch 3, ch 0
    prev_tt = '1;
    for (int r = 0; r < 40; r++) begin
      pop(tt);
      if (r > 0) chk(tt - prev_tt == 250, $sformatf("time tag step %0d", tt - prev_tt));
      prev_tt = tt;
      pop(w); chk(w == {16'd0,  48'(tt)}, $sformatf("ch0 %h tt %0d", w, tt));
      pop(w); chk(w == {16'd3,  48'(tt)}, $sformatf("ch3 %h tt %0d", w, tt));
      pop(w); chk(w == {16'd15, 48'(tt)}, $sformatf("ch15 %h tt %0d", w, tt));
    end
    enable = '0;
    repeat (300 * M) @(negedge clk);
    drain();
    // 2. burst
    dec_n = 30'd10;
    enable = 17'h0_0020;   // ch 5 only
    @(negedge clk);
    burst_start = 1'b1; @(negedge clk); burst_start = 1'b0;
    while (!burst_done) @(negedge clk);
    repeat (50 * M) @(negedge clk);
    chk(rd_count == 15'd16384, $sformatf("burst stored %0d words", rd_count));
    pop(w); prev_tt = w;
    for (int n = 1; n < 16384; n++) begin
      pop(w);
      if (w - prev_tt != 1) chk(0, $sformatf("burst gap at %0d: %0d", n, w - prev_tt));
      prev_tt = w;
    end
    chk(1, "burst sequence");
    chk(rd_empty, "nothing stored after burst");
    // 3. overrun
    enable = '1;
    @(negedge clk);
    burst_start = 1'b1; @(negedge clk); burst_start = 1'b0;
    repeat (200 * M) @(negedge clk);
    chk(overruns > 0, "overruns counted");
    enable = '0;
    repeat (20) @(negedge clk);
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    // 4. full FIFO, continuous with no reads
    dec_n = 30'd250;
    enable = 17'h0_FFFF;   // 16 words per record
    while (drops == 0) @(negedge clk);
    chk(rd_count == 15'd16384, "full FIFO holds its depth");
    chk(drops > 0, "drops counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
