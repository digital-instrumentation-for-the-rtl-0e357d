// sniffer: decimated data capture of selected signals into a FIFO.
//
// Sixteen 64-bit input channels plus a 64-bit time tag can be stored; the
// 17-bit `enable` mask chooses which (bit 16 = time tag, bits 15..0 =
// channels). The time tag counts in_valid strobes (decimated samples) since
// reset.
//
// Two storage modes, chosen by the decimation factor dec_n:
//  * continuous (dec_n >= CONT_MIN, 250 by default): every dec_n-th sample
//    is captured, indefinitely; with 25 MS/s samples dec_n = 250000 gives
//    one record every 10 ms. Records that meet a full FIFO are dropped and
//    counted.
//  * burst (dec_n < CONT_MIN): after a burst_start pulse, every sample is
//    captured until BURST_LEN words have been written (or the FIFO is full);
//    burst_done then rises until the next burst_start.
// A capture takes a snapshot of the enabled inputs and writes them into the
// FIFO one word per clock, time tag first, then channels in ascending order.
// If the next capture comes before the previous one has been written out
// (more enabled words than clocks between samples), it is skipped and
// counted in `overruns`.
//
// Read side: rd_en pops one word; rd_data is valid the clock after. The FIFO
// count is exported for a host that drains it.
//
// Following the design description: 16-channel selection, 17-bit enable
// (16 channels + time tag), 30-bit DEC_N, 64-bit x 2^14 FIFO, continuous mode
// for DEC_N >= 250 and 16384-word bursts at the full decimated rate. This
// design's own choice: the record layout, the time-tag format, the burst
// trigger, and the drop/overrun policy.
module sniffer
  import fl_pkg::*;
#(
  parameter int unsigned CH        = 16,
  parameter int unsigned W         = 64,
  parameter int unsigned AW        = 14,
  parameter int unsigned DEC_W     = 30,
  parameter int unsigned CONT_MIN  = 250,
  parameter int unsigned BURST_LEN = 16384
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,       // decimated sample strobe
  input  logic [W-1:0]     ch_data [CH],
  input  logic [CH:0]      enable,         // {time tag, channels}
  input  logic [DEC_W-1:0] dec_n,
  input  logic             burst_start,
  input  logic             rd_en,
  output logic [W-1:0]     rd_data,
  output logic             rd_empty,
  output logic [AW:0]      rd_count,
  output logic             burst_done,
  output logic [31:0]      overruns,       // captures skipped while busy
  output logic [31:0]      drops           // words lost to a full FIFO
);
  logic             cont;
  logic [DEC_W-1:0] dcnt;
  logic             armed;
  logic [AW:0]      burst_cnt;
  logic             tick;
  logic [63:0]      ttag;

  logic [W-1:0]     snap [CH+1];           // index CH = time tag
  logic [CH:0]      pend;
  logic             busy;

  logic             wr_en, full;
  logic [W-1:0]     wr_data;

  assign cont = (dec_n >= DEC_W'(CONT_MIN));
  assign busy = |pend;
  assign tick = in_valid && (cont ? (dcnt == dec_n - 1'b1) : armed);

  // Next word to write: time tag first, then channels 0..CH-1.
  logic [$clog2(CH+1)-1:0] sel;
  always_comb begin
    sel = '0;
    if (pend[CH]) sel = ($clog2(CH+1))'(CH);
    else
      for (int k = CH - 1; k >= 0; k--)
        if (pend[k]) sel = ($clog2(CH+1))'(k);
  end

  assign wr_en   = busy;
  assign wr_data = snap[sel];

  always_ff @(posedge clk) begin
    if (rst) begin
      dcnt       <= '0;
      armed      <= 1'b0;
      burst_cnt  <= '0;
      burst_done <= 1'b0;
      ttag       <= '0;
      pend       <= '0;
      overruns   <= '0;
      drops      <= '0;
      for (int k = 0; k <= CH; k++) snap[k] <= '0;
    end else begin
      if (in_valid) ttag <= ttag + 1'b1;

      // Decimation counter (continuous mode only).
      if (!cont)
        dcnt <= '0;
      else if (in_valid)
        dcnt <= (dcnt >= dec_n - 1'b1) ? '0 : dcnt + 1'b1;

      // Write out one pending word per clock.
      if (busy) begin
        pend[sel] <= 1'b0;
        if (full) drops <= drops + 1'b1;
        if (!cont && armed) begin
          if (full || burst_cnt == (AW+1)'(BURST_LEN - 1)) begin
            armed      <= 1'b0;
            burst_done <= 1'b1;
            pend       <= '0;
          end
          if (!full) burst_cnt <= burst_cnt + 1'b1;
        end
      end

      // Capture.
      if (tick) begin
        if (busy) begin
          overruns <= overruns + 1'b1;
        end else begin
          for (int k = 0; k < CH; k++) snap[k] <= ch_data[k];
          snap[CH] <= W'(ttag);
          pend     <= enable;
        end
      end

      if (burst_start) begin
        armed      <= 1'b1;
        burst_done <= 1'b0;
        burst_cnt  <= '0;
      end
    end
  end

  sync_fifo #(.W(W), .AW(AW)) u_fifo (
    .clk, .rst,
    .wr_en, .wr_data, .full,
    .rd_en, .rd_data, .empty(rd_empty), .count(rd_count)
  );
endmodule
