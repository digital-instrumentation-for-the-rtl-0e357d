// iir_lp1: first-order low-pass IIR filter with a single coefficient.
//
// The bilinear-transform first-order low-pass, simplified for f_c << f_s,
// reduces to b0 = b, b1 = 0, a1 = b - 1:
//   y(n) = b*x(n) + (1-b)*y(n-1) = y(n-1) + b*(x(n) - y(n-1)),
// with b = 2*pi*f_c/f_s. Only one multiplier is needed. b is an unsigned
// 2Q10 word (b = 1 is 1024); b = 1 makes y = x, and any b >= 1 is treated
// as "filter disabled": the input is passed through unchanged. At
// f_s = 25 MS/s, b = 1 (LSB) gives f_c = 3.9 kHz and b = 512 gives about
// 2 MHz.
//
// The state keeps B_F extra fractional bits below the data LSB so that small
// b values do not stall the filter on a dead band.
//
// Timing: one output per in_valid; y and out_valid follow one clock after
// in_valid.
//
// Following the design description: the single-coefficient structure, the
// 10 fractional bits of b, the disabled state at b >= 1. This design's own
// choice: the guard bits of the state and the truncation of the product.
module iir_lp1 #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned B_W    = 12,
  parameter int unsigned B_F    = 10
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x,
  input  logic [B_W-1:0]           b,
  output logic signed [DATA_W-1:0] y,
  output logic                     out_valid
);
  localparam int unsigned ST_W = DATA_W + B_F + 1;    // state with guard bits
  localparam int unsigned PR_W = ST_W + B_W + 2;

  logic signed [ST_W-1:0] st, xe, diff, nxt;
  logic signed [PR_W-1:0] prod;
  logic                   bypass;

  assign bypass = (b >= B_W'(1 << B_F));
  assign xe     = ST_W'(x) <<< B_F;
  assign diff   = xe - st;
  assign prod   = PR_W'(diff) * $signed({2'b00, b});
  assign nxt    = st + ST_W'(prod >>> B_F);

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) st <= bypass ? xe : nxt;
    end
  end

  assign y = DATA_W'(st >>> B_F);
endmodule
