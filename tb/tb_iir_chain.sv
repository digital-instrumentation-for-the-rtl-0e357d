// tb_iir_chain: checks the three-stage IIR chain against three cascaded
// integer models of the first-order stage (each with its own coefficient),
// the 3-clock strobe latency, the independent disabling of each stage, and
// the DC gain of one.
module tb_iir_chain;
  logic clk = 1'b0, rst = 1'b1;
  logic v, ov;
  logic signed [15:0] x, y;
  logic [11:0] b [3];
  int checks = 0, failures = 0;
  longint st [3];
  longint xs;
  int lat;

  iir_chain dut (.clk, .rst, .in_valid(v), .x, .b, .y, .out_valid(ov));
  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  task automatic sample(input logic signed [15:0] xi);
    x = xi; v = 1'b1;
    xs = longint'(xi);
    for (int s = 0; s < 3; s++) begin
      if (b[s] >= 1024) st[s] = xs <<< 10;
      else st[s] = st[s] + (((xs <<< 10) - st[s]) * longint'(b[s]) >>> 10);
      xs = st[s] >>> 10;
    end
    @(negedge clk);
    v = 1'b0;
    lat = 1;
    while (!ov && lat < 10) begin @(negedge clk); lat++; end
    chk(lat == 3, $sformatf("latency %0d", lat));
    chk(longint'(y) == xs, $sformatf("y=%0d model=%0d", y, xs));
    @(negedge clk);
  endtask

  initial begin
    v = 1'b0; x = '0;
    b[0] = 12'd100; b[1] = 12'd200; b[2] = 12'd300;
    for (int s = 0; s < 3; s++) st[s] = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int n = 0; n < 300; n++) sample(16'sd8000);
    chk(y > 16'sd7990, $sformatf("DC gain, y=%0d", y));
    for (int n = 0; n < 1200; n++) begin
      if (n % 150 == 0)
        for (int s = 0; s < 3; s++) b[s] = ($urandom % 4 == 0) ? 12'd2048 : 12'($urandom % 1024);
      sample(16'($urandom));
    end
    b[0] = 12'd1024; b[1] = 12'd1024; b[2] = 12'd1024;
    for (int n = 0; n < 20; n++) begin
      sample(16'($urandom));
      chk(y == x, "all stages disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
