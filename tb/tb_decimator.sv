// tb_decimator: checks that out_valid pulses once every M = 5 clocks and that
// each strobe carries the input pair of the clock before it.
module tb_decimator;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [15:0] ii, qi, io, qo;
  logic v;
  int checks = 0, failures = 0;
  int last = -1, nval = 0;
  logic signed [15:0] pi_d, pq_d;

  decimator dut (.clk, .rst, .i_in(ii), .q_in(qi), .i_out(io), .q_out(qo), .out_valid(v));
  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ii = '0; qi = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      pi_d = ii; pq_d = qi;
      ii = 16'($urandom); qi = 16'($urandom);
      @(negedge clk);
      // values visible now were sampled from the previous pair (pi_d was applied before this edge)
      if (v) begin
        nval++;
        checks++;
        if (last >= 0 && n - last != 5) begin failures++; $display("FAIL spacing %0d", n - last); end
        last = n;
      end
    end
    checks++;
    if (nval != 200) begin failures++; $display("FAIL count %0d", nval); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Data check: at each strobe, outputs equal the inputs present at the edge that raised it.
  logic signed [15:0] at_edge_i, at_edge_q;
  always @(posedge clk) begin
    at_edge_i <= ii;
    at_edge_q <= qi;
  end
  always @(negedge clk) if (!rst && v) begin
    checks++;
    if (io != at_edge_i || qo != at_edge_q) begin
      failures++;
      $display("FAIL data %0d/%0d %0d/%0d", io, at_edge_i, qo, at_edge_q);
    end
  end
endmodule
