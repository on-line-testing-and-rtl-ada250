// tb_ft_system_top: end-to-end test of the whole system at its default size
// (100 BIST iterations, a 5472-frame device, a 262144-cycle watchdog).
//
// The AES half and the scrubber half run side by side. Every recovery or
// detection mechanism is made to happen and is counted; a mechanism that is
// never seen is a failure:
//   AES   - user encryption/decryption against FIPS-197; on-line parity error
//           on a CT-box upset during user traffic; BIST failing on that upset;
//           BIST passing on a fault-free core (before and after the repair).
//   scrub - single upsets corrected; command RAM ECC correction; one TMR copy
//           broken and outvoted; a double upset reported; the watchdog asking
//           for a full reconfiguration on the double error and on a timeout
//           (two copies broken), and the system running again after each
//           reconfiguration (played here by reset plus reload of the golden
//           image into the configuration memory model).
module tb_ft_system_top;
  import aes_pkg::*;
  import scrub_pkg::*;
  import aes_ref_pkg::*;

  localparam int unsigned FRAMES = 2 * 2 * 38 * 36;
  localparam longint SCRUB_CYC = FRAMES * 41;
  localparam longint WD_TIMEOUT = 262144;

  logic clk = 0, rst_n = 0;
  logic aes_start = 0, aes_err_clr = 0, bist_start = 0, scrub_enable = 0;
  aes_mode_e aes_mode = MODE_ENC;
  logic [31:0] aes_din = '0, aes_dout;
  logic aes_busy, aes_din_req, aes_dout_valid, aes_done, aes_error;
  logic bist_busy, bist_pass, bist_fail;
  logic [15:0] bist_iter;
  logic [127:0] bist_signature;
  logic [31:0] icap_i, icap_o;
  logic icap_ce_n, icap_write_n, icap_busy;
  logic [11:0] syndrome;
  logic syndrome_valid;
  logic scrub_running, scrub_cycle_done, scrub_corrected, scrub_double_err;
  logic scrub_bram_sbiterr, scrub_bram_dbiterr, scrub_copy_disagree;
  far_t scrub_far, scrub_err_far;
  logic [15:0] scrub_corr_count, reconfig_count, wd_timeouts;
  logic reconfig;
  int checks = 0, failures = 0;

  ft_system_top dut (.*);
  cfg_mem_model cfg (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- event counters ----------------
  longint cyc = 0;
  int n_bist_pass = 0, n_bist_fail = 0, n_online = 0, n_corr = 0, n_double = 0;
  int n_ram_ecc = 0, n_disagree = 0, n_wd_double = 0, n_wd_timeout = 0, n_recovered = 0;
  int n_user_ok = 0, n_tmr_masked = 0;
  logic aes_error_q = 0, dbl_q = 0, bist_busy_q = 0;
  logic [15:0] to_q = 0;
  // events are counted only while out of reset (registers start at random
  // values until the first clock edge of the reset)
  logic live = 0;
  always @(posedge clk) live <= rst_n;
  always @(posedge clk) begin
    cyc++;
  end
  always @(posedge clk) if (live && rst_n) begin
    if (aes_error && !aes_error_q) n_online++;
    if (bist_busy_q && !bist_busy && bist_pass) n_bist_pass++;
    if (bist_busy_q && !bist_busy && bist_fail) n_bist_fail++;
    if (scrub_corrected) n_corr++;
    if (scrub_double_err && !dbl_q) n_double++;
    if (scrub_bram_sbiterr) n_ram_ecc++;
    if (scrub_copy_disagree) n_disagree++;
    if (reconfig && wd_timeouts == to_q) n_wd_double++;
    if (wd_timeouts != to_q) n_wd_timeout++;
  end
  always @(posedge clk) begin
    aes_error_q <= aes_error;
    dbl_q <= scrub_double_err;
    bist_busy_q <= bist_busy;
    to_q <= rst_n ? wd_timeouts : 16'd0;
  end

  // ---------------- AES helpers ----------------
  task automatic user_run(input aes_mode_e m, input logic [127:0] blk, output logic [127:0] res);
    int k = 0, o = 0;
    while (aes_busy || bist_busy) @(negedge clk);
    aes_mode = m; aes_start = 1;
    @(negedge clk);
    aes_start = 0;
    res = '0;
    while (aes_busy) begin
      aes_din = blk[127-32*k -: 32];
      if (aes_din_req) k++;
      #1;
      if (aes_dout_valid) begin res[127-32*o -: 32] = aes_dout; o++; end
      @(negedge clk);
    end
  endtask

  task automatic run_bist();
    while (aes_busy) @(negedge clk);
    bist_start = 1;
    @(negedge clk); bist_start = 0;
    while (bist_busy) @(negedge clk);
    @(negedge clk);
  endtask

  // one CT-box cell upset: ROM A, address 0, the 2*SB byte, bit 5
  task automatic flip_rom0();
    dut.u_aes.u_core.u_rom_a.mem[0][CT_2SB].d[5] = ~dut.u_aes.u_core.u_rom_a.mem[0][CT_2SB].d[5];
  endtask

  logic [127:0] sig_ref;
  task automatic aes_thread();
    logic [127:0] r, key, pt, x;
    x = '0;
    for (int i = 0; i < 100; i++) x = decrypt(decrypt(encrypt(x, x), encrypt(x, x)), decrypt(encrypt(x, x), encrypt(x, x)));
    sig_ref = x;
    run_bist();
    check(bist_pass && bist_iter == 100 && bist_signature == sig_ref, "BIST passes, 100 iterations");
    user_run(MODE_KEY, 128'h000102030405060708090a0b0c0d0e0f, r);
    user_run(MODE_ENC, 128'h00112233445566778899aabbccddeeff, r);
    if (r == 128'h69c4e0d86a7b0430d8cdb78070b4c55a) n_user_ok++;
    user_run(MODE_DEC, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, r);
    if (r == 128'h00112233445566778899aabbccddeeff) n_user_ok++;
    check(n_user_ok == 2 && !aes_error, "user encrypt and decrypt");
    for (int t = 0; t < 4; t++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      pt = {$urandom, $urandom, $urandom, $urandom};
      user_run(MODE_KEY, key, r);
      user_run(MODE_ENC, pt, r);
      check(r == encrypt(key, pt), "random user encryption");
    end
    // CT-box upset at the S-box address of a zero byte: key 0, plaintext 0
    user_run(MODE_KEY, 128'h0, r);
    flip_rom0();
    user_run(MODE_ENC, 128'h0, r);
    repeat (2) @(negedge clk);
    check(aes_error, "on-line parity error during user traffic");
    @(negedge clk); aes_err_clr = 1; @(negedge clk); aes_err_clr = 0;
    check(!aes_error, "error flag cleared");
    run_bist();
    check(bist_fail && !bist_pass, "BIST fails on the CT-box upset");
    flip_rom0();
    @(negedge clk); aes_err_clr = 1; @(negedge clk); aes_err_clr = 0;
    run_bist();
    check(bist_pass && bist_signature == sig_ref, "BIST passes after repair");
  endtask

  // ---------------- scrubber helpers ----------------
  task automatic wait_cycle_done(output longint t);
    @(posedge clk);
    while (!scrub_cycle_done) @(posedge clk);
    t = cyc;
  endtask

  task automatic repair_one(input int unsigned fr, input int unsigned wi, input int unsigned b,
                            input string what);
    int unsigned c0 = scrub_corr_count;
    longint t0;
    cfg.flip(fr, wi, b);
    t0 = cyc;
    while (scrub_corr_count == 16'(c0) && cyc - t0 < 2 * SCRUB_CYC + 2000) @(posedge clk);
    check(scrub_corr_count == 16'(c0 + 1) && cfg.mismatches() == 0, {what, ": repaired"});
  endtask

  task automatic reconfigure();
    @(negedge clk);
    rst_n = 0;
    cfg.reload();
    repeat (3) @(negedge clk);
    rst_n = 1;
  endtask

  longint ta, tb2, t_last_done;
  always @(posedge clk) if (scrub_cycle_done) t_last_done = cyc;

  task automatic scrub_thread();
    int dis0, c0;
    wait_cycle_done(ta);
    wait_cycle_done(tb2);
    $display("full scrub cycle: %0d cycles for %0d frames", tb2 - ta, FRAMES);
    check(tb2 - ta >= SCRUB_CYC && tb2 - ta <= SCRUB_CYC + 20, "scrub cycle length");
    check(n_disagree == 0 && n_corr == 0, "clean device, copies agree");
    repair_one(100, 3, 4, "single upset");
    repair_one(FRAMES - 1, 40, 31, "upset in the last frame");
    repair_one(2000, ECC_WORD, 5, "upset in a check bit");
    // the same command RAM word upset in two copies (different bits)
    dut.u_scrub.g_copy[0].u_ctrl.u_ram.mem[3][5] = ~dut.u_scrub.g_copy[0].u_ctrl.u_ram.mem[3][5];
    dut.u_scrub.g_copy[2].u_ctrl.u_ram.mem[3][9] = ~dut.u_scrub.g_copy[2].u_ctrl.u_ram.mem[3][9];
    repair_one(4000, 17, 17, "upset while the command RAMs hold errors");
    check(n_ram_ecc > 0, "command RAM ECC corrections reported");
    // one TMR copy thrown into its stop state
    dis0 = n_disagree;
    void'($cast(dut.u_scrub.g_copy[1].u_ctrl.st, 7));
    c0 = n_corr;
    repair_one(3000, 0, 0, "upset with one broken copy");
    if (n_disagree > dis0 && n_corr > c0) n_tmr_masked++;
    check(n_tmr_masked > 0, "broken copy outvoted");
    // double upset: scrubber stops, watchdog requests reconfiguration
    cfg.flip(1234, 5, 6);
    cfg.flip(1234, 25, 26);
    ta = cyc;
    while (!reconfig && cyc - ta < 2 * SCRUB_CYC) @(posedge clk);
    check(reconfig && scrub_double_err && wd_timeouts == 0, "reconfiguration on a double error");
    check(scrub_err_far.major == 8'(1234 / 36 % 38) && scrub_err_far.minor == 7'(1234 % 36),
          "double-error frame address");
  endtask

  initial begin
    cfg.init_random();
    repeat (3) @(negedge clk);
    rst_n = 1;
    scrub_enable = 1;
    fork
      aes_thread();
      scrub_thread();
    join
    // recovery from the double error by full reconfiguration
    reconfigure();
    wait_cycle_done(ta);
    if (cfg.mismatches() == 0 && !scrub_copy_disagree && !scrub_double_err) n_recovered++;
    check(n_recovered == 1, "running again after the reconfiguration");
    run_bist();
    check(bist_pass, "BIST passes after the reconfiguration");
    // two copies broken: no scrub cycle completes, the watchdog times out
    void'($cast(dut.u_scrub.g_copy[0].u_ctrl.st, 7));
    void'($cast(dut.u_scrub.g_copy[1].u_ctrl.st, 7));
    @(posedge clk);
    while (!reconfig) @(posedge clk);
    $display("watchdog timeout %0d cycles after the last scrub cycle", cyc - t_last_done);
    check(wd_timeouts == 1 && cyc - t_last_done >= WD_TIMEOUT && cyc - t_last_done <= WD_TIMEOUT + 2,
          "watchdog timeout");
    reconfigure();
    repair_one(77, 7, 7, "single upset after the second reconfiguration");
    if (cfg.mismatches() == 0 && !scrub_copy_disagree) n_recovered++;
    repeat (5) @(posedge clk);

    $display("mechanisms: bist_pass=%0d bist_fail=%0d online_err=%0d user_ok=%0d corrected=%0d",
             n_bist_pass, n_bist_fail, n_online, n_user_ok, n_corr);
    $display("            ram_ecc=%0d tmr_masked=%0d double=%0d wd_double=%0d wd_timeout=%0d recovered=%0d",
             n_ram_ecc, n_tmr_masked, n_double, n_wd_double, n_wd_timeout, n_recovered);
    check(n_bist_pass >= 3, "BIST pass seen");
    check(n_bist_fail >= 1, "BIST fail seen");
    check(n_online >= 1, "on-line error seen");
    check(n_user_ok == 2, "user operation seen");
    check(n_corr >= 6, "scrub corrections seen");
    check(n_ram_ecc >= 1, "command RAM ECC seen");
    check(n_tmr_masked >= 1, "TMR masking seen");
    check(n_double >= 1, "double error seen");
    check(n_wd_double >= 1, "watchdog double-error reconfiguration seen");
    check(n_wd_timeout >= 1, "watchdog timeout reconfiguration seen");
    check(n_recovered == 2, "recovery after reconfiguration seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
