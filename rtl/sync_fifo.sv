// sync_fifo: single-clock first-in first-out buffer.
//
// 2^AW words of W bits in a memory array with binary read and write pointers
// and an occupancy counter. A write when full and a read when empty are
// ignored. The read port is registered: rd_data holds the word popped by
// rd_en one clock later.
//
// Ports: wr_en/wr_data/full on the write side, rd_en/rd_data/empty on the read
// side, count = number of stored words (0..2^AW).
//
// Following the design description: a 64-bit wide FIFO with 2^14 words for
// the sniffer. This design's own choice: the single clock and the registered
// read port.
module sync_fifo #(
  parameter int unsigned W  = 64,
  parameter int unsigned AW = 14
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  output logic          full,
  input  logic          rd_en,
  output logic [W-1:0]  rd_data,
  output logic          empty,
  output logic [AW:0]   count
);
  logic [W-1:0]  mem [2**AW];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign full  = (count == (AW+1)'(2**AW));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
    if (do_rd) rd_data <= mem[rp];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  // Occupancy never exceeds the depth.
  a_count: assert property (@(posedge clk) disable iff (rst) count <= (AW+1)'(2**AW));
endmodule
