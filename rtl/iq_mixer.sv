// iq_mixer: I/Q demodulation multipliers of the phase detector.
//
// The ADC sample is multiplied by the NCO cosine (in-phase branch I) and sine
// (quadrature branch Q). With both inputs in 1Q13 the 28-bit products are in
// 2Q26; the output keeps the top 16 bits as 2Q14 (product >>> 12). The sum
// frequency term is left for the low-pass filters that follow.
//
// Timing: one register; inputs at clock n give outputs at clock n+1.
//
// Following the design description: the beat note is multiplied by the sine
// and the cosine of an NCO at the beat-note frequency. This design's own
// choice: the output scaling and the single pipeline register.
module iq_mixer #(
  parameter int unsigned IN_W  = 14,
  parameter int unsigned LO_W  = 14,
  parameter int unsigned OUT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  x,       // ADC sample
  input  logic signed [LO_W-1:0]  lo_cos,  // NCO cosine
  input  logic signed [LO_W-1:0]  lo_sin,  // NCO sine
  output logic signed [OUT_W-1:0] i_o,
  output logic signed [OUT_W-1:0] q_o
);
  localparam int unsigned P_W = IN_W + LO_W;
  logic signed [P_W-1:0] pi_w, pq_w;
  assign pi_w = x * lo_cos;
  assign pq_w = x * lo_sin;

  always_ff @(posedge clk) begin
    if (rst) begin
      i_o <= '0;
      q_o <= '0;
    end else begin
      i_o <= pi_w[P_W-1 -: OUT_W];
      q_o <= pq_w[P_W-1 -: OUT_W];
    end
  end
endmodule
