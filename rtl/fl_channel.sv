// fl_channel: one channel of the fiber-link phase-meter and compensator.
//
// Signal path (all at the system clock, 125 MHz on the target):
//   ADC beat note --x--> FIR low-pass (I) --+                      +-> arc-tangent -> cycle resolution -> PI servo
//                 |                         +-> decimate by M ->  |       (phase, 27Q13 cycles)            |
//                 +--x-> FIR low-pass (Q) --+     IIR chains (I,Q)+-> module (amplitude)                   v
//   detection NCO (cos, sin)                                                 AOM NCO phase offset -> DAC word
// The detection NCO is set to the (aliased) beat-note frequency; mixing with
// its cosine and sine gives the in-phase and quadrature components, which
// the 16-tap FIR filters strip of the sum-frequency term. After decimation by
// M the I/Q pair goes through two identical chains of three first-order IIR
// low-pass filters (bandwidth limit against additive photodiode noise), then
// to the arc-tangent and, in parallel, to the amplitude computation. The
// unwrapped phase is the error input of the servo, whose output is the phase
// offset of the second NCO; that NCO's sine is the DAC word driving the
// acousto-optic modulator. The servo is left open (cmd.cl = 0) for open-loop
// measurements.
//
// Every I/Q stage after the decimator runs on the decimated strobe
// (`dec_valid`, f_clk/M). Outputs carry their own valid strobes.
//
// Following the design description: the chain of blocks and their order, two
// NCOs, two FIR filters and two three-stage IIR chains per channel, M = 5.
// This design's own choice: taking the module from the IIR-filtered I/Q and
// using the unwrapped phase directly as the servo error (no set-point).
module fl_channel
  import fl_pkg::*;
#(
  parameter int unsigned M = 5
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [ADC_W-1:0]  adc,
  // detection NCO
  input  logic [PACC_W-1:0]        det_freq,
  input  logic [PACC_W-1:0]        det_phase,
  // IIR chain coefficients, input stage first (shared by I and Q)
  input  logic [IIR_B_W-1:0]       iir_b [3],
  // servo
  input  servo_cmd_t               srv_cmd,
  input  logic [SRV_K_W-1:0]       srv_gain,
  input  logic [SRV_K_W-1:0]       srv_igain,
  // AOM NCO
  input  logic [PACC_W-1:0]        aom_freq,
  output logic signed [ADC_W-1:0]  dac,
  // monitoring
  output logic                     dec_valid,
  output logic signed [IQ_W-1:0]   i_dec,
  output logic signed [IQ_W-1:0]   q_dec,
  output logic signed [IQ_W-1:0]   i_iir,
  output logic signed [IQ_W-1:0]   q_iir,
  output logic                     iir_valid,
  output logic signed [ANG_W-1:0]  angle,
  output logic                     angle_valid,
  output logic signed [PHASE_W-1:0] phase,
  output logic                     phase_valid,
  output logic [MOD_W-1:0]         amp,
  output logic                     amp_valid,
  output logic [PACC_W-1:0]        corr,
  output logic                     corr_valid
);
  logic signed [NCO_OUT_W-1:0] lo_sin, lo_cos;
  logic signed [IQ_W-1:0]      i_mix, q_mix, i_lpf, q_lpf;
  logic                        q_iir_valid;
  logic signed [NCO_OUT_W-1:0] aom_sin, aom_cos;

  nco #(.PACC_W(PACC_W), .OUT_W(NCO_OUT_W)) u_nco_det (
    .clk, .rst, .freq(det_freq), .phase(det_phase), .sin_o(lo_sin), .cos_o(lo_cos)
  );

  iq_mixer #(.IN_W(ADC_W), .LO_W(NCO_OUT_W), .OUT_W(IQ_W)) u_mix (
    .clk, .rst, .x(adc), .lo_cos, .lo_sin, .i_o(i_mix), .q_o(q_mix)
  );

  fir_lpf #(.DATA_W(IQ_W)) u_fir_i (.clk, .rst, .x(i_mix), .y(i_lpf));
  fir_lpf #(.DATA_W(IQ_W)) u_fir_q (.clk, .rst, .x(q_mix), .y(q_lpf));

  decimator #(.M(M), .DATA_W(IQ_W)) u_dec (
    .clk, .rst, .i_in(i_lpf), .q_in(q_lpf), .i_out(i_dec), .q_out(q_dec), .out_valid(dec_valid)
  );

  iir_chain #(.DATA_W(IQ_W), .B_W(IIR_B_W)) u_iir_i (
    .clk, .rst, .in_valid(dec_valid), .x(i_dec), .b(iir_b), .y(i_iir), .out_valid(iir_valid)
  );
  iir_chain #(.DATA_W(IQ_W), .B_W(IIR_B_W)) u_iir_q (
    .clk, .rst, .in_valid(dec_valid), .x(q_dec), .b(iir_b), .y(q_iir), .out_valid(q_iir_valid)
  );

  cordic_atan #(.IN_W(IQ_W), .OUT_W(ANG_W), .OUT_F(ANG_FRAC)) u_atan (
    .clk, .rst, .in_valid(iir_valid), .i_in(i_iir), .q_in(q_iir), .angle, .out_valid(angle_valid)
  );

  cycle_resolution #(.ANG_W(ANG_W), .INT_W(CYC_INT_W), .FRAC_W(CYC_FRAC_W)) u_cyc (
    .clk, .rst, .in_valid(angle_valid), .angle, .phase, .out_valid(phase_valid)
  );

  iq_module #(.IN_W(IQ_W), .OUT_W(MOD_W)) u_mod (
    .clk, .rst, .in_valid(iir_valid), .i_in(i_iir), .q_in(q_iir), .amp, .out_valid(amp_valid)
  );

  pi_servo #(.ERR_W(PHASE_W), .ERR_F(CYC_FRAC_W), .K_W(SRV_K_W), .K_F(SRV_K_FRAC), .COR_W(PACC_W)) u_servo (
    .clk, .rst, .in_valid(phase_valid), .err(phase), .cmd(srv_cmd),
    .gain(srv_gain), .i_gain(srv_igain), .corr, .out_valid(corr_valid)
  );

  nco #(.PACC_W(PACC_W), .OUT_W(NCO_OUT_W)) u_nco_aom (
    .clk, .rst, .freq(aom_freq), .phase(corr), .sin_o(aom_sin), .cos_o(aom_cos)
  );
  assign dac = aom_sin;

  // The I and Q chains are identical and start together: their strobes match.
  a_iq_aligned: assert property (@(posedge clk) disable iff (rst) iir_valid == q_iir_valid);
endmodule
