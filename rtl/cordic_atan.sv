// cordic_atan: four-quadrant arc-tangent by a pipelined CORDIC in vectoring mode.
//
// Computes atan2(Q, I) for 16-bit 2Q14 inputs and returns it in scaled
// radians (angle/pi, so -1..+1 covers -pi..+pi) as a 16-bit 3Q13 word.
//
// How: a first stage folds the vector into the right half-plane (if I < 0 the
// vector is negated and the angle starts at +1 or -1, i.e. +/-pi). Then
// NITER micro-rotations by +/-atan(2^-i) drive Q to zero, adding each rotation
// to the angle register. The angle steps atan(2^-i)/pi are computed at
// elaboration with Z_F fractional bits. The vector grows by the CORDIC gain
// (about 1.647), so the x/y registers carry two extra integer bits and G
// guard bits below the input LSB. The final angle is rounded to 13 bits.
//
// Timing: fully pipelined (one new vector per clock), in_valid travels with
// the data; the result appears NITER+2 clocks after the input.
//
// Following the design description: parallel (unrolled) pipelined CORDIC,
// arc-tangent function, scaled-radian output, 16-bit 2Q14 inputs and 16-bit
// 3Q13 output. This design's own choice: the iteration count, the guard bits
// and the round-half-up of the output.
module cordic_atan #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 16,
  parameter int unsigned OUT_F = 13,
  parameter int unsigned NITER = 16,
  parameter int unsigned G     = 6
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  i_in,
  input  logic signed [IN_W-1:0]  q_in,
  output logic signed [OUT_W-1:0] angle,
  output logic                    out_valid
);
  localparam int unsigned XY_W = IN_W + 2 + G;
  localparam int unsigned Z_F  = OUT_F + 3;            // internal angle fraction bits
  localparam int unsigned Z_W  = Z_F + 3;
  typedef logic signed [Z_W-1:0] ztab_t [NITER];

  function automatic ztab_t make_atan();
    ztab_t t;
    real a;
    for (int i = 0; i < NITER; i++) begin
      a = $atan(1.0 / real'(64'd1 << i)) / 3.14159265358979323846 * real'(64'd1 << Z_F);
      t[i] = Z_W'($rtoi(a + 0.5));
    end
    return t;
  endfunction
  localparam ztab_t ATAN = make_atan();
  localparam logic signed [Z_W-1:0] ONE = Z_W'(64'd1 << Z_F);   // pi

  logic signed [XY_W-1:0] xs [NITER+1];
  logic signed [XY_W-1:0] ys [NITER+1];
  logic signed [Z_W-1:0]  zs [NITER+1];
  logic                   vs [NITER+1];

  // Stage 0: fold into the right half-plane.
  logic signed [XY_W-1:0] xi, yi;
  assign xi = XY_W'(i_in) <<< G;
  assign yi = XY_W'(q_in) <<< G;

  always_ff @(posedge clk) begin
    if (rst) begin
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0; vs[0] <= 1'b0;
    end else begin
      vs[0] <= in_valid;
      if (xi < 0) begin
        xs[0] <= -xi;
        ys[0] <= -yi;
        zs[0] <= (yi >= 0) ? ONE : -ONE;
      end else begin
        xs[0] <= xi;
        ys[0] <= yi;
        zs[0] <= '0;
      end
    end
  end

  // Micro-rotations.
  for (genvar i = 0; i < NITER; i++) begin : g_it
    always_ff @(posedge clk) begin
      if (rst) begin
        xs[i+1] <= '0; ys[i+1] <= '0; zs[i+1] <= '0; vs[i+1] <= 1'b0;
      end else begin
        vs[i+1] <= vs[i];
        if (ys[i] >= 0) begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + ATAN[i];
        end else begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - ATAN[i];
        end
      end
    end
  end

  // Output rounding to OUT_F fractional bits.
  localparam int unsigned SH = Z_F - OUT_F;
  logic signed [Z_W-1:0] zr;
  assign zr = (zs[NITER] + Z_W'(1 << (SH - 1))) >>> SH;

  always_ff @(posedge clk) begin
    if (rst) begin
      angle     <= '0;
      out_valid <= 1'b0;
    end else begin
      angle     <= OUT_W'(zr);
      out_valid <= vs[NITER];
    end
  end
endmodule
