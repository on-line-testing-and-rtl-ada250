// tb_aes_bist: self-checking test of the AES BIST.
//
// Runs the full 100-iteration BIST on a fault-free core and compares the
// final FIFO contents with the same loop computed by the reference model
// (key expand, encrypt, key expand, decrypt, key expand, decrypt, each output
// feeding the next input, starting from zero). Checks the 534-cycle
// iteration, the pass flag, that the user ports still encrypt correctly, and
// that a single flipped CT-box ROM cell makes the BIST stop with bist_fail.
module tb_aes_bist;
  import aes_pkg::*;
  import aes_ref_pkg::*;

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
    repeat (400000) @(posedge clk);
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

  task automatic user_run(input aes_mode_e m, input logic [127:0] blk, output logic [127:0] res);
    int k = 0, o = 0;
    @(negedge clk);
    mode = m; start = 1;
    @(negedge clk);
    start = 0;
    res = '0;
    while (busy) begin
      din = blk[127-32*k -: 32];
      if (din_req) k++;
      #1;
      if (dout_valid) begin res[127-32*o -: 32] = dout; o++; end
      @(negedge clk);
    end
  endtask

  task automatic run_bist(output int ncyc);
    while (busy) @(negedge clk);
    @(negedge clk); bist_start = 1;
    @(negedge clk); bist_start = 0;
    ncyc = 1;
    while (bist_busy) begin @(negedge clk); ncyc++; end
  endtask

  logic [127:0] x, y, z, r;
  int n, iters;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    iters = dut.MAX_ITER;
    x = '0;
    for (int i = 0; i < iters; i++) begin
      y = encrypt(x, x);
      z = decrypt(y, y);
      x = decrypt(z, z);
    end
    run_bist(n);
    check(bist_pass && !bist_fail, "fault-free BIST passes");
    check(bist_iter == 16'(iters), $sformatf("iterations %0d", bist_iter));
    check(signature == x, $sformatf("signature %h exp %h", signature, x));
    check(n == iters * 534 + 1, $sformatf("BIST took %0d cycles, expected %0d", n, iters * 534 + 1));

    // user path
    user_run(MODE_KEY, 128'h000102030405060708090a0b0c0d0e0f, r);
    user_run(MODE_ENC, 128'h00112233445566778899aabbccddeeff, r);
    check(r == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("user encrypt %h", r));

    // one CT-box cell (ISB field of ROM B, a rarely used part) flipped
    dut.u_core.u_rom_b.mem[8'h3c][CT_ISB].d[6] = ~dut.u_core.u_rom_b.mem[8'h3c][CT_ISB].d[6];
    run_bist(n);
    check(bist_fail && !bist_pass, "BIST fails with a CT-box fault");
    check(n < iters * 534, $sformatf("BIST stopped early, after %0d iterations", bist_iter));
    $display("fault detected in iteration %0d", bist_iter);
    dut.u_core.u_rom_b.mem[8'h3c][CT_ISB].d[6] = ~dut.u_core.u_rom_b.mem[8'h3c][CT_ISB].d[6];
    run_bist(n);
    check(bist_pass && signature == x, "BIST passes again after repair");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
