// cycle_resolution: phase unwrapping into whole cycles plus a cycle fraction.
//
// The arc-tangent gives the phase only modulo one cycle. This block keeps a
// signed count of whole cycles: the input angle (3Q13 scaled radians, 1.0 =
// half a cycle) is halved to a fraction of a cycle with FRAC_W bits, and when
// that fraction passes from the last quarter of a cycle to the first the
// count goes up by one; from the first quarter to the last, down by one.
// The output {cycles, fraction} is a two's-complement number of cycles in
// INT_W.FRAC_W format (27Q13 by default: about 134 million cycles of range).
// The first sample after reset sets the count so that the output equals the
// input angle (cycles = -1 for a negative angle).
//
// Timing: one output per in_valid, one clock later. A correct count needs the
// phase to move less than a quarter cycle between samples.
//
// Following the design description: unwrapping by detecting a cycle increment
// or decrement, 27 integer and 13 fractional bits. This design's own choice:
// the quarter-cycle rule and the halving of the scaled-radian input.
module cycle_resolution #(
  parameter int unsigned ANG_W  = 16,
  parameter int unsigned INT_W  = 27,
  parameter int unsigned FRAC_W = 13
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          in_valid,
  input  logic signed [ANG_W-1:0]       angle,    // scaled radians, 1.0 = 2^(FRAC_W)
  output logic signed [INT_W+FRAC_W-1:0] phase,   // unwrapped phase in cycles
  output logic                          out_valid
);
  logic [FRAC_W-1:0]       frac, frac_prev;
  logic signed [INT_W-1:0] cycles, cyc_nxt;
  logic                    first;

  // Halving: angle/2 is the phase in cycles with FRAC_W fractional bits.
  logic signed [ANG_W-1:0] half;
  assign half = angle >>> 1;
  assign frac = half[FRAC_W-1:0];

  always_comb begin
    cyc_nxt = cycles;
    if (first)
      cyc_nxt = half[ANG_W-1] ? '1 : '0;
    else if (frac_prev[FRAC_W-1 -: 2] == 2'b11 && frac[FRAC_W-1 -: 2] == 2'b00)
      cyc_nxt = cycles + 1'b1;
    else if (frac_prev[FRAC_W-1 -: 2] == 2'b00 && frac[FRAC_W-1 -: 2] == 2'b11)
      cyc_nxt = cycles - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cycles    <= '0;
      frac_prev <= '0;
      first     <= 1'b1;
      phase     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        cycles    <= cyc_nxt;
        frac_prev <= frac;
        first     <= 1'b0;
        phase     <= {cyc_nxt, frac};
      end
    end
  end
endmodule
