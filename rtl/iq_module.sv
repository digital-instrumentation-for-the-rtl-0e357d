// iq_module: amplitude (module) of the I/Q vector, sqrt(I^2 + Q^2).
//
// The beat-note amplitude shows whether the polarisations of the two
// interfering signals are aligned. The sum of squares of the 2Q14 inputs is
// formed in one stage (an unsigned 4Q28 word), then a pipelined
// digit-by-digit square root produces one result bit per stage. The result
// is 3Q14 (17 bits, unsigned value with a zero sign bit).
//
// Timing: fully pipelined, one input per clock; the result follows in_valid
// by IN_W+2 clocks (1 for the squares, IN_W for the root, 1 output register).
//
// Following the design description: square root of I^2 + Q^2 from the I and
// Q words of the phase detector, [2.-14] inputs, [3.-14] output. This
// design's own choice: a shift-and-subtract square root instead of a
// hyperbolic CORDIC; the result is the exact floor of the root.
module iq_module #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 17
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] i_in,
  input  logic signed [IN_W-1:0] q_in,
  output logic [OUT_W-1:0]       amp,
  output logic                   out_valid
);
  localparam int unsigned SQ_W = 2 * IN_W;     // radicand width (even)
  localparam int unsigned NS   = IN_W;         // one stage per result bit

  logic [SQ_W-1:0] op  [NS+1];   // remainder
  logic [SQ_W-1:0] res [NS+1];   // partial root, scaled
  logic            v   [NS+1];

  // |I|,|Q| <= 2^(IN_W-1), so the sum of squares fits SQ_W unsigned bits.
  logic [SQ_W-1:0] sq;
  assign sq = SQ_W'(i_in * i_in) + SQ_W'(q_in * q_in);

  always_ff @(posedge clk) begin
    if (rst) begin
      op[0] <= '0; res[0] <= '0; v[0] <= 1'b0;
    end else begin
      op[0]  <= sq;
      res[0] <= '0;
      v[0]   <= in_valid;
    end
  end

  for (genvar s = 0; s < NS; s++) begin : g_sqrt
    localparam logic [SQ_W-1:0] BIT = SQ_W'(1) << (SQ_W - 2 - 2 * s);
    always_ff @(posedge clk) begin
      if (rst) begin
        op[s+1] <= '0; res[s+1] <= '0; v[s+1] <= 1'b0;
      end else begin
        v[s+1] <= v[s];
        if (op[s] >= res[s] + BIT) begin
          op[s+1]  <= op[s] - (res[s] + BIT);
          res[s+1] <= (res[s] >> 1) + BIT;
        end else begin
          op[s+1]  <= op[s];
          res[s+1] <= res[s] >> 1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      amp       <= '0;
      out_valid <= 1'b0;
    end else begin
      amp       <= OUT_W'(res[NS]);
      out_valid <= v[NS];
    end
  end
endmodule
