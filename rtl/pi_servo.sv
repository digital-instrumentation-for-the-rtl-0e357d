// pi_servo: proportional-integral controller followed by an accumulator.
//
// Transfer function (forward-difference form, the sample time folded into
// the gains):
//   C(z) = gain * (1 + i_gain/(z-1)) * 1/(z-1)
// The PI part acts on the phase error; the extra accumulator turns its
// output into a phase correction, sent as the phase offset of the NCO that
// drives the acousto-optic modulator. With the gains set from the loop
// bandwidth B_s and integral corner 1/tau_i:
//   gain = 2*pi*B_s*T_s/(G*H),   i_gain = T_s/tau_i.
//
// Formats: err is the unwrapped phase in cycles (ERR_W bits, ERR_F fractional);
// gain and i_gain are unsigned K_W-bit words with K_F fractional bits (2Q30).
// corr is a phase of COR_W bits where 2^COR_W is one cycle, so it wraps
// naturally. The integrator keeps ERR_F+K_F fractional bits.
//
// Command word cmd = [rst sign cl p_en i_en 0 0 0]:
//   rst  clears the integrator and the output accumulator;
//   sign negates the error (loop sign);
//   cl   0 clears the integrator and freezes the output (loop open);
//   p_en, i_en enable the proportional and integral terms.
//
// Timing: three register stages. A sample with in_valid at clock n updates
// corr at clock n+3, where out_valid pulses.
//
// Following the design description: the PI-plus-accumulator structure, the
// command bits, the 2Q30 gains of the main servo. This design's own choice:
// the widths of the integrator and of the products, wrap-around arithmetic,
// and the action of cl on the output accumulator.
module pi_servo
  import fl_pkg::*;
#(
  parameter int unsigned ERR_W = 40,
  parameter int unsigned ERR_F = 13,
  parameter int unsigned K_W   = 32,
  parameter int unsigned K_F   = 30,
  parameter int unsigned COR_W = 48
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [ERR_W-1:0] err,
  input  servo_cmd_t              cmd,
  input  logic [K_W-1:0]          gain,
  input  logic [K_W-1:0]          i_gain,
  output logic [COR_W-1:0]        corr,
  output logic                    out_valid
);
  localparam int unsigned S_W = ERR_W + K_W + 2;        // PI sum, ERR_F+K_F fraction
  localparam int unsigned U_W = S_W + K_W + 1;          // gain * PI sum
  localparam int unsigned U_SH = ERR_F + 2 * K_F - COR_W;

  logic signed [ERR_W-1:0] e1;
  logic                    v1, v2;
  logic signed [S_W-1:0]   integ, s2;
  logic signed [U_W-1:0]   u;
  logic                    clr;

  assign clr = rst | cmd.rst;
  assign u   = U_W'(s2) * $signed({1'b0, gain});

  always_ff @(posedge clk) begin
    if (clr) begin
      e1        <= '0;
      v1        <= 1'b0;
      v2        <= 1'b0;
      integ     <= '0;
      s2        <= '0;
      corr      <= '0;
      out_valid <= 1'b0;
    end else begin
      // Stage 1: loop sign.
      v1 <= in_valid;
      if (in_valid) e1 <= cmd.sign ? -err : err;
      // Stage 2: PI sum from the integrator state before this sample, then
      // integrator update (forward difference).
      v2 <= v1;
      if (v1) begin
        s2 <= (cmd.p_en ? (S_W'(e1) <<< K_F) : '0) + integ;
        if (!cmd.cl)
          integ <= '0;
        else if (cmd.i_en)
          integ <= integ + S_W'(e1) * $signed({1'b0, i_gain});
      end
      // Stage 3: output accumulator.
      out_valid <= v2;
      if (v2 && cmd.cl) corr <= corr + COR_W'(u >>> U_SH);
    end
  end
endmodule
