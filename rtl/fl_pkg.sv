// fl_pkg: word formats shared by the fiber-link phase-meter datapath.
//
// Every sample in the chain is a two's-complement fixed-point number. The
// package names the widths so that the blocks agree on them:
//   ADC sample, NCO output ....... 14 bits, full scale +/-1 (1Q13)
//   I/Q after the mixers ......... 16 bits, 2Q14 (also the arc-tangent input)
//   arc-tangent output ........... 16 bits, 3Q13 scaled radians (1.0 = pi)
//   unwrapped phase .............. 40 bits, 27Q13 in cycles
//   NCO phase words .............. 48 bits, 2^48 = one cycle
// The 14, 16, 13, 27 and 48 bit figures follow the design description; the
// servo command layout [rst sign cl p_en i_en 0 0 0] does too. The integer
// widths of intermediate products are this design's own choice.
package fl_pkg;
  localparam int unsigned ADC_W      = 14;  // ADC and DAC word
  localparam int unsigned NCO_OUT_W  = 14;  // NCO sine/cosine word
  localparam int unsigned PACC_W     = 48;  // NCO phase accumulator
  localparam int unsigned IQ_W       = 16;  // I/Q words, 2Q14
  localparam int unsigned IQ_FRAC    = 14;
  localparam int unsigned ANG_W      = 16;  // arc-tangent output, 3Q13 scaled radians
  localparam int unsigned ANG_FRAC   = 13;
  localparam int unsigned CYC_INT_W  = 27;  // whole cycles of the unwrapped phase
  localparam int unsigned CYC_FRAC_W = 13;  // fraction of a cycle
  localparam int unsigned PHASE_W    = CYC_INT_W + CYC_FRAC_W;
  localparam int unsigned MOD_W      = 17;  // module output, 3Q14
  localparam int unsigned IIR_B_W    = 12;  // IIR coefficient, 2Q10
  localparam int unsigned SRV_K_W    = 32;  // servo gains, 2Q30
  localparam int unsigned SRV_K_FRAC = 30;
  localparam int unsigned SNIF_W     = 64;  // sniffer FIFO word
  localparam int unsigned SNIF_CH    = 16;  // sniffer input channels
  localparam int unsigned DEC_N_W    = 30;  // sniffer decimation factor

  // 8-bit servo command, most significant bit first: [rst sign cl p_en i_en 0 0 0]
  typedef struct packed {
    logic       rst;    // 1: clear the integrator and the output accumulator
    logic       sign;   // 1: invert the loop sign
    logic       cl;     // 0: hold the PI integrator cleared (open loop)
    logic       p_en;   // proportional action enable
    logic       i_en;   // integral action enable
    logic [2:0] unused;
  } servo_cmd_t;
endpackage
