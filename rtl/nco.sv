// nco: numerically controlled oscillator with sine and cosine outputs.
//
// A PACC_W-bit phase accumulator advances by `freq` every clock, so the output
// frequency is f_out = freq * f_clk / 2^PACC_W. A phase offset `phase` (same
// scale, 2^PACC_W = one cycle) is added after the accumulator; the servo
// drives it in the AOM oscillator. The phase sum is truncated to LUT_AW+2 bits:
// the top two bits select the quadrant and the remaining LUT_AW bits address a
// quarter-wave sine table, using the symmetry of the sine to shrink the table
// by four. Both outputs come from the same table (cosine is the sine read a
// quarter cycle ahead), as signed OUT_W-bit words of amplitude 2^(OUT_W-1)-1.
//
// Timing: two clocks of latency. The accumulator value at clock n, plus the
// offset, appears as sin/cos at clock n+2. A new `freq` is first used by the
// accumulator update at the clock where it is sampled.
//
// Following the design description: 48-bit accumulator, 48-bit offset,
// streaming increment and offset, 14-bit outputs, 2-clock latency, truncated
// phase into a sine/cosine table. This design's own choice: the table size
// (2^10 quarter-wave entries, 12-bit phase into the table) and the half-LSB
// offset of the table samples, which makes the quarter-wave folding exact.
module nco #(
  parameter int unsigned PACC_W = 48,
  parameter int unsigned OUT_W  = 14,
  parameter int unsigned LUT_AW = 10
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [PACC_W-1:0]       freq,    // phase increment per clock
  input  logic [PACC_W-1:0]       phase,   // phase offset
  output logic signed [OUT_W-1:0] sin_o,
  output logic signed [OUT_W-1:0] cos_o
);
  localparam int unsigned LUT_N = 1 << LUT_AW;
  localparam int unsigned TH_W  = LUT_AW + 2;
  typedef logic [OUT_W-2:0] rom_t [LUT_N];

  // Quarter-wave table: entry k holds round((2^(OUT_W-1)-1) * sin(pi/2 * (k+0.5)/LUT_N)).
  function automatic rom_t make_rom();
    rom_t r;
    real amp;
    amp = real'((1 << (OUT_W - 1)) - 1);
    for (int k = 0; k < LUT_N; k++)
      r[k] = (OUT_W-1)'($rtoi(amp * $sin(3.14159265358979323846 / 2.0 * (real'(k) + 0.5) / real'(LUT_N)) + 0.5));
    return r;
  endfunction
  localparam rom_t ROM = make_rom();

  logic [PACC_W-1:0] acc;
  logic [TH_W-1:0]   theta;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc   <= '0;
      theta <= '0;
    end else begin
      acc   <= acc + freq;
      theta <= TH_W'((acc + phase) >> (PACC_W - TH_W));
    end
  end

  // Fold a TH_W-bit phase onto the quarter-wave table.
  function automatic logic signed [OUT_W-1:0] sine_of(input logic [TH_W-1:0] th);
    logic [LUT_AW-1:0] addr;
    logic [OUT_W-2:0]  mag;
    addr = th[TH_W-2] ? ~th[LUT_AW-1:0] : th[LUT_AW-1:0];
    mag  = ROM[addr];
    return th[TH_W-1] ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
  endfunction

  logic [TH_W-1:0] theta_c;
  assign theta_c = theta + TH_W'(1 << LUT_AW);  // cos(x) = sin(x + pi/2)

  always_ff @(posedge clk) begin
    if (rst) begin
      sin_o <= '0;
      cos_o <= '0;
    end else begin
      sin_o <= sine_of(theta);
      cos_o <= sine_of(theta_c);
    end
  end
endmodule
