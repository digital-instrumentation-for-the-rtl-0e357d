// fir_lpf: 15th-order (16-tap) low-pass FIR filter of one I/Q branch.
//
// y(n) = sum_k b_k x(n-k), with b_k the window-method low-pass design of
// order 15, Hamming window, cut-off FC_NUM/FC_DEN of the Nyquist frequency
// (10 MHz at 125 MS/s by default), normalised to unity gain at DC:
//   h_k = sin(pi*wc*(k-7.5)) / (pi*(k-7.5)) * (0.54 - 0.46*cos(2*pi*k/15))
//   b_k = round(2^12 * h_k / sum(h))
// The coefficients are 13-bit signed with 12 fractional bits, computed at
// elaboration. The peak coefficient is 699/4096 = 0.1707 and the smallest is
// -9/4096.
//
// Structure: systolic form (the structure a DSP-slice FIR uses). The input
// moves along a delay line with two registers per tap while the partial sum
// moves one register per tap, so every stage is one multiply-add into a
// register. The output keeps 16 bits (2Q14), saturated.
//
// Timing: one sample per clock; latency exactly TAPS clocks: an impulse at
// clock 0 gives b_0 at the output at clock TAPS, b_1 at TAPS+1, and so on.
//
// Following the design description: order 15, window method, 10 MHz cut-off,
// 12 fractional coefficient bits, 16-clock latency. This design's own choice:
// the systolic structure and the output saturation.
module fir_lpf #(
  parameter int unsigned TAPS   = 16,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned COEF_W = 13,
  parameter int unsigned COEF_F = 12,
  parameter int unsigned FC_NUM = 10,   // cut-off frequency, numerator (MHz)
  parameter int unsigned FC_DEN = 62    // Nyquist frequency (MHz), integer part
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] x,
  output logic signed [DATA_W-1:0] y
);
  localparam int unsigned ACC_W = DATA_W + COEF_W + $clog2(TAPS);
  typedef logic signed [COEF_W-1:0] coef_t [TAPS];

  function automatic coef_t make_coefs();
    coef_t c;
    real h [TAPS];
    real s, m, wc, pi;
    pi = 3.14159265358979323846;
    // FC_DEN counts the Nyquist frequency in MHz; 62 stands for 62.5.
    wc = real'(FC_NUM) / (real'(FC_DEN) + 0.5);
    s = 0.0;
    for (int k = 0; k < TAPS; k++) begin
      m = real'(k) - real'(TAPS - 1) / 2.0;
      h[k] = (m == 0.0) ? wc : $sin(pi * wc * m) / (pi * m);
      h[k] = h[k] * (0.54 - 0.46 * $cos(2.0 * pi * real'(k) / real'(TAPS - 1)));
      s = s + h[k];
    end
    for (int k = 0; k < TAPS; k++) begin
      m = h[k] / s * real'(1 << COEF_F);
      c[k] = COEF_W'($rtoi(m >= 0.0 ? m + 0.5 : m - 0.5));
    end
    return c;
  endfunction
  localparam coef_t B = make_coefs();

  logic signed [DATA_W-1:0] xd [2*TAPS-2]; // input delay line, two per tap
  logic signed [ACC_W-1:0]  ps [TAPS];     // partial sums

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 2 * TAPS - 2; k++) xd[k] <= '0;
      for (int k = 0; k < TAPS; k++)     ps[k] <= '0;
    end else begin
      xd[0] <= x;
      for (int k = 1; k < 2 * TAPS - 2; k++) xd[k] <= xd[k-1];
      ps[0] <= ACC_W'(B[0]) * ACC_W'(x);
      for (int k = 1; k < TAPS; k++)
        ps[k] <= ps[k-1] + ACC_W'(B[k]) * ACC_W'(xd[2*k-1]);
    end
  end

  // Scale back to DATA_W bits and saturate.
  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((1 << (DATA_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(1 << (DATA_W - 1));
  logic signed [ACC_W-1:0] sc;
  assign sc = ps[TAPS-1] >>> COEF_F;
  assign y  = (sc > MAXV) ? MAXV[DATA_W-1:0] : (sc < MINV) ? MINV[DATA_W-1:0] : sc[DATA_W-1:0];
endmodule
