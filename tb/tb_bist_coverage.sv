// tb_bist_coverage: fault-coverage experiment for the AES BIST.
//
// CT-box part: every memory cell of the two CT-box ROMs (2 x 512 words x 36
// bits = 36864 cells, parity bits included) is flipped in turn, a full BIST
// (up to 100 iterations) is run, and the iteration in which the parity
// checker stops the BIST is recorded. The cell is restored afterwards. Every
// fault must be detected within the 100 iterations; the histogram of
// detection iterations is printed at a few points for comparison with the
// published coverage curve, which reaches 100 % at iteration 83.
// Key part: each of the 88 x 36 = 3168 key-store cells is flipped right after
// the key expansion that wrote it (forward keys after the first expansion of
// the iteration, inverse keys after the second), and the BIST must fail in
// its first iteration.
// STRIDE > 1 tests every STRIDE-th ROM cell only.
module tb_bist_coverage;
  import aes_pkg::*;

  localparam int STRIDE = 1;
  localparam int MAXIT = 100;

  logic clk = 0, rst_n = 0;
  logic start = 0, err_clr = 0, bist_start = 0;
  aes_mode_e mode = MODE_ENC;
  logic [31:0] din = '0, dout;
  logic busy, din_req, dout_valid, done, error;
  logic bist_busy, bist_pass, bist_fail;
  logic [15:0] bist_iter;
  logic [127:0] signature;
  int checks = 0, failures = 0;

  aes_bist dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // the core may still be finishing the process that failed
  task automatic launch();
    while (busy) @(negedge clk);
    @(negedge clk); err_clr = 1;
    @(negedge clk); err_clr = 0; bist_start = 1;
    @(negedge clk); bist_start = 0;
    if (!bist_busy) begin
      failures++;
      $display("FAIL: BIST did not start");
    end
  endtask

  task automatic finish_bist();
    while (bist_busy) @(negedge clk);
  endtask

  task automatic flip_rom(input int rom, input int addr, input int f, input int b);
    if (rom == 0) begin
      if (b == 8) dut.u_core.u_rom_a.mem[addr][f].p = ~dut.u_core.u_rom_a.mem[addr][f].p;
      else dut.u_core.u_rom_a.mem[addr][f].d[b] = ~dut.u_core.u_rom_a.mem[addr][f].d[b];
    end else begin
      if (b == 8) dut.u_core.u_rom_b.mem[addr][f].p = ~dut.u_core.u_rom_b.mem[addr][f].p;
      else dut.u_core.u_rom_b.mem[addr][f].d[b] = ~dut.u_core.u_rom_b.mem[addr][f].d[b];
    end
  endtask

  task automatic flip_key(input int w, input int f, input int b);
    if (b == 8) dut.u_core.keyram[w][f].p = ~dut.u_core.keyram[w][f].p;
    else dut.u_core.keyram[w][f].d[b] = ~dut.u_core.keyram[w][f].d[b];
  endtask

  int hist [MAXIT+1];
  int n_rom = 0, n_det = 0, worst = 0, it;
  int cum;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    launch(); finish_bist();
    check(bist_pass, "fault-free BIST passes");
    for (int k = 0; k <= MAXIT; k++) hist[k] = 0;

    for (int c = 0; c < 2 * 512 * 36; c += STRIDE) begin
      automatic int rom = c / (512 * 36), addr = (c / 36) % 512, f = (c % 36) / 9, b = c % 9;
      flip_rom(rom, addr, f, b);
      launch(); finish_bist();
      n_rom++;
      if (bist_fail) begin
        it = int'(bist_iter) + 1;   // iteration in which it was caught
        n_det++;
        hist[it]++;
        if (it > worst) worst = it;
      end
      check(bist_fail, $sformatf("ROM %0d word %0d byte %0d bit %0d not detected", rom, addr, f, b));
      flip_rom(rom, addr, f, b);
    end
    cum = 0;
    for (int k = 1; k <= MAXIT; k++) begin
      cum += hist[k];
      if (k inside {1, 2, 5, 10, 20, 30, 50, 83, 100})
        $display("CT-box coverage after %0d iterations: %0d of %0d (%0d.%01d %%)", k, cum, n_rom,
                 cum * 100 / n_rom, (cum * 1000 / n_rom) % 10);
    end
    $display("CT-box faults: %0d injected, %0d detected, last detected in iteration %0d", n_rom, n_det, worst);
    check(worst <= MAXIT && n_det == n_rom, "all CT-box faults detected within 100 iterations");

    // key store: forward words 0..43 after process 0, inverse words 44..87 after process 2
    for (int w = 0; w < 88; w++)
      for (int f = 0; f < 4; f++)
        for (int b = 0; b < 9; b++) begin
          launch();
          while (dut.proc != ((w < 44) ? 3'd1 : 3'd3) && bist_busy) @(negedge clk);
          flip_key(w, f, b);
          finish_bist();
          check(bist_fail && bist_iter == 0,
                $sformatf("key word %0d byte %0d bit %0d: fail %0d iter %0d", w, f, b, bist_fail, bist_iter));
        end
    launch(); finish_bist();
    check(bist_pass, "BIST passes again at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
