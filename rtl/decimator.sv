// decimator: keeps one sample in M.
//
// A counter runs over 0..M-1 on every clock; when it reaches M-1 the current
// input pair is registered and out_valid pulses for one clock. Every block
// after it works on the valid strobe, at f_clk/M (25 MS/s for M = 5 at
// 125 MHz). No filtering is done here: the FIR low-pass filters ahead of it
// remove what would alias.
//
// Timing: out_valid is high one clock in every M, from the M-th clock after
// reset on; the pair it carries is the input of the clock before.
//
// Following the design description: decimation of I and Q by M = 5 ahead of
// the arc-tangent. This design's own choice: the strobe interface and its
// phase after reset.
module decimator #(
  parameter int unsigned M      = 5,
  parameter int unsigned DATA_W = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] i_in,
  input  logic signed [DATA_W-1:0] q_in,
  output logic signed [DATA_W-1:0] i_out,
  output logic signed [DATA_W-1:0] q_out,
  output logic                     out_valid
);
  localparam int unsigned CNT_W = (M > 1) ? $clog2(M) : 1;
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      i_out     <= '0;
      q_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (cnt == CNT_W'(M - 1)) begin
        cnt       <= '0;
        i_out     <= i_in;
        q_out     <= q_in;
        out_valid <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
