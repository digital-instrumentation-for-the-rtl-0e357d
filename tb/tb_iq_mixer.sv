// tb_iq_mixer: checks the I/Q products and their scaling with random inputs.
// Expected values are the integer products shifted right by 12 (2Q26 to
// 2Q14), compared one clock after the inputs.
module tb_iq_mixer;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [13:0] x, lc, ls;
  logic signed [15:0] i_o, q_o;
  int checks = 0, failures = 0;
  longint ei, eq;

  iq_mixer dut (.clk, .rst, .x, .lo_cos(lc), .lo_sin(ls), .i_o, .q_o);
  always #4 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; lc = '0; ls = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      x  = 14'($urandom);
      lc = 14'($urandom);
      ls = 14'($urandom);
      if (n == 0) begin x = -14'sd8192; lc = -14'sd8192; ls = 14'sd8191; end
      ei = (longint'(x) * longint'(lc)) >>> 12;
      eq = (longint'(x) * longint'(ls)) >>> 12;
      @(negedge clk);
      checks++;
      if (longint'(i_o) != ei || longint'(q_o) != eq) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d c=%0d s=%0d: I %0d/%0d Q %0d/%0d", x, lc, ls, i_o, ei, q_o, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
