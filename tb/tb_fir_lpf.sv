// tb_fir_lpf: checks the 16-tap low-pass FIR.
//  1. Impulse response: an impulse of 4096 (one in 2Q14 terms is 16384;
//     4096 makes the output equal to the coefficient) must reproduce the
//     window-method coefficients, computed here independently as
//     round(4096 * h_k / sum h) with the Hamming window, starting exactly
//     16 clocks after the impulse.
//  2. Random input: every output equals the convolution of the input history
//     with those coefficients, >>> 12, 16 clocks later.
//  3. Frequency response: a 1 MHz tone passes with gain near 1 and a 40 MHz
//     tone (the sum term of a 35 MHz beat note seen as 55 MHz, above 10 MHz)
//     is attenuated by more than 30 dB.
module tb_fir_lpf;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [15:0] x, y;
  int checks = 0, failures = 0;
  int b [16];
  int hist [0:4095];
  int t;

  fir_lpf dut (.clk, .rst, .x, .y);
  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void make_b();
    real h [16]; real s, m, wc;
    wc = 10.0 / 62.5; s = 0.0;
    for (int k = 0; k < 16; k++) begin
      m = real'(k) - 7.5;
      h[k] = $sin(PI * wc * m) / (PI * m) * (0.54 - 0.46 * $cos(2.0 * PI * real'(k) / 15.0));
      s += h[k];
    end
    for (int k = 0; k < 16; k++) b[k] = $rtoi($floor(h[k] / s * 4096.0 + 0.5));
  endfunction

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  real amp_lo, amp_hi;
  initial begin
    make_b();
    chk(b[7] == 699 && b[0] == -9, $sformatf("coefficient design %0d %0d", b[7], b[0]));
    x = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (20) @(negedge clk);
    // 1. impulse at clock t = 0 (sampled at the next posedge)
    x = 16'sd4096;
    @(negedge clk);
    x = '0;
    for (int k = 1; k <= 40; k++) begin
      if (k < 16) chk(y == 0, $sformatf("early output at %0d", k));
      else if (k < 32) chk(int'(y) == b[k-16], $sformatf("impulse tap %0d: %0d vs %0d", k-16, y, b[k-16]));
      else chk(y == 0, "tail");
      @(negedge clk);
    end
    // 2. random input, history-based reference
    t = 0;
    for (int k = 0; k < 4096; k++) hist[k] = 0;
    for (int n = 0; n < 1500; n++) begin
      x = 16'(($urandom % 32768) - 16384);
      hist[t % 4096] = int'(x);
      @(negedge clk);
      t++;
      // output now corresponds to inputs issued 16..31 steps ago
      if (n > 40) begin
        longint acc; acc = 0;
        for (int k = 0; k < 16; k++) acc += longint'(b[k]) * longint'(hist[(t - 16 - k) % 4096]);
        acc = acc >>> 12;
        if (acc > 32767) acc = 32767;
        if (acc < -32768) acc = -32768;
        chk(longint'(y) == acc, $sformatf("random n=%0d y=%0d exp=%0d", n, y, acc));
      end
    end
    // 3. tones
    amp_lo = 0.0; amp_hi = 0.0;
    for (int n = 0; n < 600; n++) begin
      x = 16'($rtoi(12000.0 * $sin(2.0 * PI * 1.0 / 125.0 * n)));
      @(negedge clk);
      if (n > 100 && $itor(y) > amp_lo) amp_lo = $itor(y);
    end
    for (int n = 0; n < 600; n++) begin
      x = 16'($rtoi(12000.0 * $sin(2.0 * PI * 40.0 / 125.0 * n)));
      @(negedge clk);
      if (n > 100 && (y > 0 ? $itor(y) : -$itor(y)) > amp_hi) amp_hi = (y > 0 ? $itor(y) : -$itor(y));
    end
    chk(amp_lo > 11500.0 && amp_lo < 12500.0, $sformatf("1 MHz gain %f", amp_lo / 12000.0));
    chk(amp_hi < 12000.0 * 0.0316, $sformatf("40 MHz rejection %f", amp_hi / 12000.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
