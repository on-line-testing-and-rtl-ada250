// tb_scrub_tmr: the scrubber in TMR on a 16-frame device. Checks: the three
// copies agree and repair single upsets; a bit flip in one copy's command RAM
// is corrected by that RAM; an upset that throws one copy into its stop
// state raises copy_disagree but is outvoted, and repairs go on at the same
// pace; a second broken copy wins the vote and the scrubbing stops; per-copy
// reset brings all three back in step.
module tb_scrub_tmr;
  import scrub_pkg::*;

  localparam int unsigned NT = 2, NR = 1, NMJ = 2, NMN = 4;
  localparam int unsigned FRAMES = NT * NR * NMJ * NMN;

  logic [2:0] clk3, rst3;
  logic clk = 0, enable = 0;
  logic [31:0] icap_i, icap_o;
  logic icap_ce_n, icap_write_n, icap_busy;
  logic [11:0] syndrome;
  logic syndrome_valid;
  logic running, cycle_done, corrected, double_err, bram_sbiterr, bram_dbiterr, copy_disagree;
  far_t err_far, cur_far;
  logic [15:0] corr_count;
  int checks = 0, failures = 0;

  assign clk3 = {3{clk}};
  scrub_tmr #(.N_TOP(NT), .N_ROW(NR), .N_MAJOR(NMJ), .N_MINOR(NMN)) dut (
    .clk(clk3), .rst_n(rst3), .*);
  cfg_mem_model #(.N_TOP(NT), .N_ROW(NR), .N_MAJOR(NMJ), .N_MINOR(NMN)) cfg (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc++;
  int dis_seen = 0, sb_seen = 0;
  always @(posedge clk) begin
    if (copy_disagree && rst3 == 3'b111) dis_seen++;
    if (bram_sbiterr && rst3 == 3'b111) sb_seen++;
  end

  task automatic wait_cycle_done(output longint t);
    @(posedge clk);
    while (!cycle_done) @(posedge clk);
    t = cyc;
  endtask

  task automatic repair_one(input int unsigned fr, input int unsigned wi, input int unsigned b,
                            input string what);
    int unsigned c0 = corr_count;
    longint t0;
    cfg.flip(fr, wi, b);
    t0 = cyc;
    while (corr_count == 16'(c0) && cyc - t0 < 3 * FRAMES * 41 + 2000) @(posedge clk);
    check(corr_count == 16'(c0 + 1), {what, ": corrected"});
    check(cfg.mismatches() == 0, {what, ": memory repaired"});
  endtask

  longint ta, tb2, tc, td;

  initial begin
    rst3 = 3'b000;
    cfg.init_random();
    repeat (3) @(negedge clk);
    rst3 = 3'b111;
    enable = 1;
    wait_cycle_done(ta);
    wait_cycle_done(tb2);
    check(dis_seen == 0, "copies agree in fault-free operation");
    repair_one(4, 8, 17, "upset with three good copies");
    check(dis_seen == 0, "copies still agree");

    // one copy's command RAM upset: that RAM corrects it, the voter never sees it
    dut.g_copy[2].u_ctrl.u_ram.mem[1][40] = ~dut.g_copy[2].u_ctrl.u_ram.mem[1][40];
    wait_cycle_done(ta);
    check(dis_seen > 0, "one copy flags its RAM error: disagree seen");
    check(sb_seen == 0, "single copy's RAM flag outvoted");
    repair_one(7, 33, 2, "upset with an error in one command RAM");

    // one copy thrown into its stop state
    dis_seen = 0;
    void'($cast(dut.g_copy[1].u_ctrl.st, 7));
    wait_cycle_done(ta);
    wait_cycle_done(tb2);
    check(dis_seen > 0, "broken copy detected as disagreement");
    check(tb2 - ta >= FRAMES * 41 && tb2 - ta <= FRAMES * 41 + 20,
          $sformatf("scrub cycle with a broken copy %0d cycles", tb2 - ta));
    repair_one(11, 0, 31, "upset with one copy broken");
    repair_one(0, ECC_WORD, 2, "check-bit upset with one copy broken");

    // a second broken copy outvotes the good one
    void'($cast(dut.g_copy[2].u_ctrl.st, 7));
    repeat (5) @(posedge clk);
    check(!running, "two broken copies: scrubbing stops");
    tc = cyc;
    cfg.flip(3, 3, 3);
    repeat (3 * FRAMES * 41) @(posedge clk);
    check(cfg.mismatches() == 1, "no repair with two broken copies");

    // reset of all copies (the RAM upset of copy 2 is also cleared, as a
    // reconfiguration would)
    dut.g_copy[2].u_ctrl.u_ram.mem[1][40] = ~dut.g_copy[2].u_ctrl.u_ram.mem[1][40];
    rst3 = 3'b000;
    repeat (2) @(negedge clk);
    rst3 = 3'b111;
    ta = cyc;
    while (cfg.mismatches() != 0 && cyc - ta < 3 * FRAMES * 41) @(posedge clk);
    check(cfg.mismatches() == 0, "after reset the scrubber repairs again");
    dis_seen = 0;
    wait_cycle_done(td);
    wait_cycle_done(td);
    check(dis_seen == 0, "copies in step after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
