// fiber_link_top: two-channel digital instrument for fiber-link phase noise
// detection and compensation.
//
// Two fl_channel instances, one per ADC/DAC pair, each with its own phase
// detector, IIR chains, arc-tangent, cycle resolution, module, servo and the
// two NCOs. One sniffer serves both channels: its sixteen inputs carry, for
// channel c (inputs 8c..8c+7): decimated I, decimated Q, filtered I,
// filtered Q, arc-tangent angle, unwrapped phase, module and servo
// correction, each sign- or zero-extended to 64 bits. The sniffer samples
// them on channel 0's decimated strobe.
//
// The configuration words (NCO frequencies and phases, IIR coefficients,
// servo command and gains, sniffer decimation, enable mask and burst trigger)
// are ports: on the target they come from registers written by the
// processor, and the sniffer FIFO is drained by it.
//
// The system clock is the 125 MHz sampling clock of the converters,
// produced on the target by a PLL locked to an external reference; the ADC
// words enter and the DAC words leave once per clock.
//
// Following the design description: two channels, one shared sniffer,
// the configuration parameters of each block. This design's own choice: the
// assignment of the sixteen sniffer inputs and the plain configuration ports.
module fiber_link_top
  import fl_pkg::*;
#(
  parameter int unsigned NCH = 2,
  parameter int unsigned M   = 5
) (
  input  logic                      clk,
  input  logic                      rst,
  // converters
  input  logic signed [ADC_W-1:0]   adc [NCH],
  output logic signed [ADC_W-1:0]   dac [NCH],
  // per-channel configuration
  input  logic [PACC_W-1:0]         det_freq  [NCH],
  input  logic [PACC_W-1:0]         det_phase [NCH],
  input  logic [IIR_B_W-1:0]        iir_b     [NCH][3],
  input  servo_cmd_t                srv_cmd   [NCH],
  input  logic [SRV_K_W-1:0]        srv_gain  [NCH],
  input  logic [SRV_K_W-1:0]        srv_igain [NCH],
  input  logic [PACC_W-1:0]         aom_freq  [NCH],
  // per-channel results
  output logic signed [PHASE_W-1:0] phase     [NCH],
  output logic                      phase_valid [NCH],
  output logic [MOD_W-1:0]          amp       [NCH],
  output logic [PACC_W-1:0]         corr      [NCH],
  // sniffer
  input  logic [DEC_N_W-1:0]        dec_n,
  input  logic [SNIF_CH:0]          snif_enable,
  input  logic                      burst_start,
  input  logic                      rd_en,
  output logic [SNIF_W-1:0]         rd_data,
  output logic                      rd_empty,
  output logic [14:0]               rd_count,
  output logic                      burst_done,
  output logic [31:0]               overruns,
  output logic [31:0]               drops
);
  logic                      dec_valid [NCH];
  logic signed [IQ_W-1:0]    i_dec [NCH], q_dec [NCH], i_iir [NCH], q_iir [NCH];
  logic signed [ANG_W-1:0]   angle [NCH];
  logic                      iir_valid [NCH], angle_valid [NCH], amp_valid [NCH], corr_valid [NCH];
  logic [SNIF_W-1:0]         snif_in [SNIF_CH];

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    fl_channel #(.M(M)) u_ch (
      .clk, .rst,
      .adc(adc[c]), .det_freq(det_freq[c]), .det_phase(det_phase[c]), .iir_b(iir_b[c]),
      .srv_cmd(srv_cmd[c]), .srv_gain(srv_gain[c]), .srv_igain(srv_igain[c]),
      .aom_freq(aom_freq[c]), .dac(dac[c]),
      .dec_valid(dec_valid[c]), .i_dec(i_dec[c]), .q_dec(q_dec[c]),
      .i_iir(i_iir[c]), .q_iir(q_iir[c]), .iir_valid(iir_valid[c]),
      .angle(angle[c]), .angle_valid(angle_valid[c]),
      .phase(phase[c]), .phase_valid(phase_valid[c]),
      .amp(amp[c]), .amp_valid(amp_valid[c]),
      .corr(corr[c]), .corr_valid(corr_valid[c])
    );
  end

  // Sniffer inputs: 8 per channel, as many channels as fit in 16.
  always_comb begin
    for (int k = 0; k < SNIF_CH; k++) snif_in[k] = '0;
    for (int c = 0; c < NCH && c < SNIF_CH / 8; c++) begin
      snif_in[8*c+0] = SNIF_W'(i_dec[c]);
      snif_in[8*c+1] = SNIF_W'(q_dec[c]);
      snif_in[8*c+2] = SNIF_W'(i_iir[c]);
      snif_in[8*c+3] = SNIF_W'(q_iir[c]);
      snif_in[8*c+4] = SNIF_W'(angle[c]);
      snif_in[8*c+5] = SNIF_W'(phase[c]);
      snif_in[8*c+6] = SNIF_W'(amp[c]);
      snif_in[8*c+7] = SNIF_W'(corr[c]);
    end
  end

  sniffer #(.CH(SNIF_CH), .W(SNIF_W), .AW(14), .DEC_W(DEC_N_W)) u_snif (
    .clk, .rst, .in_valid(dec_valid[0]), .ch_data(snif_in), .enable(snif_enable),
    .dec_n, .burst_start, .rd_en, .rd_data, .rd_empty, .rd_count,
    .burst_done, .overruns, .drops
  );
endmodule
