// iir_chain: three cascaded first-order IIR low-pass filters (one I/Q branch).
//
// Each stage is an iir_lp1 with its own coefficient, so every stage can be
// set to its own cut-off or disabled (coefficient >= 1.0, i.e. >= 1024)
// independently. The chain narrows the bandwidth ahead of the arc-tangent so
// that additive photodiode noise does not corrupt the phase.
//
// Timing: three clocks from in_valid to out_valid, one per stage.
//
// Following the design description: three independently configured
// first-order stages. The ordering of b[0..2] from input to output is this
// design's own choice.
module iir_chain #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned B_W    = 12,
  parameter int unsigned STAGES = 3
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x,
  input  logic [B_W-1:0]           b [STAGES],
  output logic signed [DATA_W-1:0] y,
  output logic                     out_valid
);
  logic signed [DATA_W-1:0] d [STAGES+1];
  logic                     v [STAGES+1];
  assign d[0] = x;
  assign v[0] = in_valid;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    iir_lp1 #(.DATA_W(DATA_W), .B_W(B_W)) u_iir (
      .clk, .rst, .in_valid(v[s]), .x(d[s]), .b(b[s]), .y(d[s+1]), .out_valid(v[s+1])
    );
  end

  assign y         = d[STAGES];
  assign out_valid = v[STAGES];
endmodule
