// tb_iir_lp1: checks the single-coefficient first-order IIR low-pass.
//  * Random inputs with random b < 1024: every output matches a bit-exact
//    model of y += b*(x - y) with 10 guard bits, computed here in 64-bit
//    integers, one clock after in_valid.
//  * Step response with b = 64 (b = 0.0625): after n samples the output is
//    within 2 LSB of A*(1 - (1-b)^n), the analytic first-order response.
//  * b >= 1024 disables the filter: y follows x exactly.
module tb_iir_lp1;
  logic clk = 1'b0, rst = 1'b1;
  logic v, ov;
  logic signed [15:0] x, y;
  logic [11:0] b;
  int checks = 0, failures = 0;
  longint st;     // model state, 10 guard bits

  iir_lp1 dut (.clk, .rst, .in_valid(v), .x, .b, .y, .out_valid(ov));
  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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
    if (b >= 1024) st = longint'(xi) <<< 10;
    else st = st + (((longint'(xi) <<< 10) - st) * longint'(b) >>> 10);
    @(negedge clk);
    v = 1'b0;
    chk(ov == 1'b1, "out_valid");
    chk(longint'(y) == (st >>> 10), $sformatf("y=%0d model=%0d b=%0d", y, st >>> 10, b));
    repeat (4) @(negedge clk);    // decimated rate: one sample in five clocks
  endtask

  real expv;
  initial begin
    v = 1'b0; x = '0; b = 12'd64; st = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    // step response
    for (int n = 1; n <= 200; n++) begin
      sample(16'sd10000);
      expv = 10000.0 * (1.0 - (1.0 - 64.0 / 1024.0) ** n);
      chk($itor(y) > expv - 2.0 && $itor(y) < expv + 2.0, $sformatf("step n=%0d y=%0d exp=%f", n, y, expv));
    end
    // random
    for (int n = 0; n < 1500; n++) begin
      if (n % 100 == 0) b = 12'($urandom % 1024);
      sample(16'($urandom));
    end
    // disabled
    b = 12'd1024;
    for (int n = 0; n < 50; n++) begin
      sample(16'($urandom));
      chk(y == x, "bypass");
      if (n == 25) b = 12'd4095;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
