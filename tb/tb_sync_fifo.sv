// tb_sync_fifo: random pushes and pops against a queue model; fills the
// FIFO to its 16384-word depth (full must rise exactly there and further
// pushes must be ignored), then drains it (empty must rise at zero and
// extra pops must be ignored). rd_data is checked one clock after each pop.
module tb_sync_fifo;
  logic clk = 1'b0, rst = 1'b1;
  logic wr_en, rd_en, full, empty;
  logic [63:0] wd, rd;
  logic [14:0] count;
  int checks = 0, failures = 0;
  logic [63:0] q [$];
  logic [63:0] expd;
  bit pend;

  sync_fifo dut (.clk, .rst, .wr_en, .wr_data(wd), .full, .rd_en, .rd_data(rd), .empty, .count);
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

  task automatic step(input bit w, input bit r);
    wr_en = w; rd_en = r; wd = {$urandom, $urandom};
    chk(full == (q.size() == 16384) && empty == (q.size() == 0) && count == 15'(q.size()), "flags");
    if (r && q.size() > 0) begin expd = q.pop_front(); pend = 1; end else pend = 0;
    if (w && (q.size() < 16384 || (r && pend))) q.push_back(wd);
    @(negedge clk);
    if (pend) chk(rd == expd, $sformatf("data %h expected %h", rd, expd));
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wd = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int n = 0; n < 4000; n++) step(1'($urandom), 1'($urandom));
    while (q.size() < 16384) step(1, 0);
    chk(full, "full at depth");
    for (int n = 0; n < 10; n++) step(1, 0);
    while (q.size() > 0) step(0, 1);
    chk(empty, "empty after drain");
    for (int n = 0; n < 10; n++) step(0, 1);
    for (int n = 0; n < 2000; n++) step(1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
