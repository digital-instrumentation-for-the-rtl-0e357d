// tb_pi_servo: checks the PI + accumulator controller.
//  1. Bit-exact check against a wide-integer model of the forward-difference
//     recurrences, with random errors, gains and command bits (sign, cl,
//     p_en, i_en), including the 3-clock latency to out_valid.
//  2. Closed loop: a plant whose measured phase is a constant disturbance of
//     7.3 cycles minus the unwrapped correction (G = H = 1). With gain 0.02
//     and i_gain 0.002 the residual error must fall below 1/1000 cycle.
//  3. cmd.rst clears the correction.
module tb_pi_servo;
  import fl_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic v, ov;
  logic signed [39:0] err;
  servo_cmd_t cmd;
  logic [31:0] gain, ig;
  logic [47:0] corr;
  int checks = 0, failures = 0;

  pi_servo dut (.clk, .rst, .in_valid(v), .err, .cmd, .gain, .i_gain(ig), .corr, .out_valid(ov));
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

  // Model state
  logic signed [159:0] m_int, m_s, m_e;
  logic [47:0]         m_corr;

  task automatic sample(input logic signed [39:0] e_in);
    int lat;
    err = e_in; v = 1'b1;
    m_e = cmd.sign ? -160'(e_in) : 160'(e_in);
    m_s = (cmd.p_en ? (m_e <<< 30) : 160'sd0) + m_int;
    if (!cmd.cl) m_int = 0;
    else if (cmd.i_en) m_int = m_int + m_e * $signed({1'b0, ig});
    if (cmd.cl) m_corr = m_corr + 48'((m_s * $signed({1'b0, gain})) >>> 25);
    @(negedge clk);
    v = 1'b0;
    lat = 1;
    while (!ov && lat < 8) begin @(negedge clk); lat++; end
    chk(lat == 3, $sformatf("latency %0d", lat));
    chk(corr == m_corr, $sformatf("corr %h model %h", corr, m_corr));
    @(negedge clk);
  endtask

  real d, u, res;
  longint unwrapped;
  logic [47:0] prev;
  initial begin
    v = 1'b0; err = '0;
    cmd = '{rst: 1'b0, sign: 1'b0, cl: 1'b1, p_en: 1'b1, i_en: 1'b1, unused: 3'b000};
    gain = 32'd1 << 20; ig = 32'd1 << 16;
    m_int = 0; m_corr = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    // 1. random, bit-exact
    for (int n = 0; n < 1500; n++) begin
      if (n % 50 == 0) begin
        cmd.sign = 1'($urandom); cmd.p_en = 1'($urandom); cmd.i_en = 1'($urandom);
        cmd.cl = ($urandom % 4) != 0;
        gain = $urandom; ig = $urandom >> ($urandom % 20);
      end
      sample(40'(longint'($urandom % 2000000) - 1000000));
    end
    // 3. rst command clears everything
    cmd.rst = 1'b1; @(negedge clk); cmd.rst = 1'b0;
    m_int = 0; m_corr = 0;
    chk(corr == 48'd0, "cmd.rst clears corr");
    // 2. closed loop
    cmd = '{rst: 1'b0, sign: 1'b0, cl: 1'b1, p_en: 1'b1, i_en: 1'b1, unused: 3'b000};
    gain = 32'($rtoi(0.02 * 2.0 ** 30)); ig = 32'($rtoi(0.002 * 2.0 ** 30));
    unwrapped = 0; prev = 0; d = 7.3;
    for (int n = 0; n < 8000; n++) begin
      u = $itor(unwrapped) / 2.0 ** 48;          // correction in cycles
      res = d - u;
      sample(40'($rtoi(res * 8192.0)));
      unwrapped += longint'($signed(corr - prev));
      prev = corr;
    end
    chk(res < 0.001 && res > -0.001, $sformatf("closed loop residual %f cycles", res));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
