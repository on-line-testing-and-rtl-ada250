// tb_watchdog_timer: with TIMEOUT = 100, regular kicks keep the watchdog
// quiet; missing kicks make it request a reconfiguration exactly 100 cycles
// after the last kick, and again every 100 cycles; a rising double_err
// requests one at once; nothing happens while enable is low.
module tb_watchdog_timer;
  logic clk = 0, rst_n = 0, enable = 0, kick = 0, double_err = 0;
  logic reconfig;
  logic [15:0] reconfig_count, timeouts;
  int checks = 0, failures = 0;

  watchdog_timer #(.TIMEOUT(100)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0, last_kick = 0, rq_at [$];
  always @(posedge clk) begin
    cyc++;
    if (reconfig) rq_at.push_back(cyc);
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (300) @(negedge clk);
    check(rq_at.size() == 0, "no request while disabled");
    enable = 1;
    for (int k = 0; k < 20; k++) begin
      repeat (60) @(negedge clk);
      kick = 1; @(negedge clk); kick = 0;
    end
    check(rq_at.size() == 0, "no request with regular kicks");
    last_kick = cyc;
    repeat (350) @(negedge clk);
    check(rq_at.size() == 3, $sformatf("%0d requests after kicks stop", rq_at.size()));
    if (rq_at.size() >= 2) begin
      check(rq_at[0] - last_kick == 101, $sformatf("first request %0d cycles after kick", rq_at[0] - last_kick));
      check(rq_at[1] - rq_at[0] == 100, "then every TIMEOUT cycles");
    end
    check(timeouts == 3 && reconfig_count == 3, "counters");
    rq_at.delete();
    kick = 1; @(negedge clk); kick = 0;
    repeat (10) @(negedge clk);
    double_err = 1;
    repeat (3) @(negedge clk);
    check(rq_at.size() == 1 && reconfig_count == 4 && timeouts == 3, "request on double error");
    double_err = 0;
    enable = 0;
    rq_at.delete();
    repeat (300) @(negedge clk);
    check(rq_at.size() == 0, "quiet when disabled again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
