// tb_scrub_ctrl: self-checking test of the scrubber control logic.
//
// The scrubber runs against the configuration-memory model on a small device
// (16 frames). Checks: a frame is checked every 41 cycles; a clean scrub
// cycle takes 41 cycles per frame plus the command overhead; single upsets
// in data, check and parity bits of various frames are repaired and the
// memory matches its golden copy again; a bit flip in the command RAM is
// absorbed by its ECC; a double upset stops the scrubber with double_err and
// the right frame address.
module tb_scrub_ctrl;
  import scrub_pkg::*;

  localparam int unsigned NT = 2, NR = 1, NMJ = 2, NMN = 4;
  localparam int unsigned FRAMES = NT * NR * NMJ * NMN;

  logic clk = 0, rst_n = 0, enable = 0;
  logic [31:0] icap_i, icap_o;
  logic icap_ce_n, icap_write_n, icap_busy;
  logic [11:0] syndrome;
  logic syndrome_valid;
  logic running, cycle_done, corrected, double_err, bram_sbiterr, bram_dbiterr;
  far_t err_far, cur_far;
  logic [15:0] corr_count;
  int checks = 0, failures = 0;

  scrub_ctrl #(.N_TOP(NT), .N_ROW(NR), .N_MAJOR(NMJ), .N_MINOR(NMN)) dut (.*);
  cfg_mem_model #(.N_TOP(NT), .N_ROW(NR), .N_MAJOR(NMJ), .N_MINOR(NMN)) cfg (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc++;

  // interval between consecutive frame checks inside one readback
  longint last_sv = -1;
  int sv_41 = 0, sv_other = 0;
  bit in_rb;
  always @(posedge clk) begin
    if (syndrome_valid) begin
      if (last_sv >= 0 && cyc - last_sv == 41) sv_41++;
      last_sv = cyc;
    end
  end

  longint t_err, t_fix;
  int sb_seen = 0;
  always @(posedge clk) if (bram_sbiterr) sb_seen++;

  task automatic wait_cycle_done(output longint t);
    @(posedge clk);
    while (!cycle_done) @(posedge clk);
    t = cyc;
  endtask

  function automatic far_t idx_far(input int unsigned fr);
    far_t a = '0;
    a.minor = 7'(fr % NMN);
    a.major = 8'((fr / NMN) % NMJ);
    a.row   = 5'((fr / (NMN * NMJ)) % NR);
    a.top   = 1'((fr / (NMN * NMJ * NR)));
    return a;
  endfunction

  task automatic repair_one(input int unsigned fr, input int unsigned wi, input int unsigned b,
                            input string what);
    int unsigned c0 = corr_count;
    longint t0;
    cfg.flip(fr, wi, b);
    t0 = cyc;
    while (corr_count == 16'(c0) && cyc - t0 < 4 * FRAMES * 41 + 2000) @(posedge clk);
    check(corr_count == 16'(c0 + 1), {what, ": corrected"});
    check(cfg.mismatches() == 0, {what, ": memory matches golden copy"});
  endtask

  longint ta, tb2, t_sv_err, t_corr;
  int unsigned fr;

  initial begin
    cfg.init_random();
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(!running, "idle until enabled");
    enable = 1;
    wait_cycle_done(ta);
    wait_cycle_done(tb2);
    $display("scrub cycle: %0d cycles for %0d frames", tb2 - ta, FRAMES);
    check(tb2 - ta >= FRAMES * 41 && tb2 - ta <= FRAMES * 41 + 20,
          $sformatf("scrub cycle %0d cycles", tb2 - ta));
    check(sv_41 >= 2 * (FRAMES - 1), $sformatf("%0d frame checks 41 cycles apart", sv_41));
    check(corr_count == 0 && !double_err, "no corrections on a clean device");

    // single upsets: data bits, a check bit, the overall parity bit, first and last frame
    repair_one(5, 0, 0, "frame 5 word 0 bit 0");
    repair_one(0, 40, 31, "frame 0 word 40 bit 31");
    repair_one(FRAMES - 1, 19, 7, "last frame word 19");
    repair_one(9, ECC_WORD, 3, "check bit 3");
    repair_one(3, ECC_WORD, 11, "overall parity bit");
    repair_one(12, ECC_WORD, 20, "data bit in the ECC word");
    for (int k = 0; k < 6; k++)
      repair_one($urandom % FRAMES, $urandom % FRAME_WORDS, $urandom % 32, "random upset");

    // correction time: from the syndrome of the bad frame to the repair
    fr = 6;
    cfg.flip(fr, 11, 9);
    @(posedge clk);
    while (!(syndrome_valid && syndrome != 0)) @(posedge clk);
    t_sv_err = cyc;
    while (!corrected) @(posedge clk);
    t_corr = cyc;
    $display("correction time %0d cycles", t_corr - t_sv_err);
    check(t_corr - t_sv_err > 3 * 41 && t_corr - t_sv_err < 250,
          $sformatf("correction time %0d cycles", t_corr - t_sv_err));
    check(cfg.mismatches() == 0, "repaired after timing run");

    // upset in the command RAM: the RAM ECC hides it
    dut.u_ram.mem[3][5] = ~dut.u_ram.mem[3][5];
    wait_cycle_done(ta);
    check(sb_seen > 0, "command RAM single-bit error reported");
    repair_one(2, 7, 13, "upset while the command RAM holds an error");

    // double upset in one frame
    cfg.flip(10, 4, 1);
    cfg.flip(10, 30, 22);
    ta = cyc;
    while (!double_err && cyc - ta < 2 * FRAMES * 41 + 500) @(posedge clk);
    check(double_err, "double error reported");
    check(err_far == idx_far(10), $sformatf("double error frame address %h", err_far));
    repeat (50) @(posedge clk);
    check(!running, "scrubber stopped after a double error");
    check(cfg.mismatches() == 2, "double error left untouched");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
