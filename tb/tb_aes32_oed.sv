// tb_aes32_oed: self-checking test of the 32-bit AES core with parity checking.
//
// Runs the FIPS-197 known-answer vectors and random key/block pairs against
// the reference model in aes_ref_pkg, checks that encryption and decryption
// take 44 cycles and key expansion 132, that no parity error is raised on a
// fault-free run, and that a bit flipped in a CT-box ROM cell, in a stored
// round key and in the ShiftRows register is flagged by err_now.
module tb_aes32_oed;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start = 0, err_clr = 0;
  aes_mode_e mode = MODE_ENC;
  logic [31:0] din = '0, dout;
  logic busy, din_req, dout_valid, done, err_now, error;
  int checks = 0, failures = 0;
  int errs_seen;

  aes32_oed dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (busy && err_now) errs_seen++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // run one process; returns the output block and the busy cycle count
  task automatic run(input aes_mode_e m, input logic [127:0] blk,
                     output logic [127:0] res, output int ncyc);
    int k = 0, o = 0;
    @(negedge clk);
    mode = m; start = 1;
    @(negedge clk);
    start = 0;
    ncyc = 0;
    res = '0;
    while (busy) begin
      din = blk[127-32*k -: 32];
      if (din_req) k++;
      #1;
      if (dout_valid) begin
        res[127-32*o -: 32] = dout;
        o++;
      end
      ncyc++;
      @(negedge clk);
    end
  endtask

  logic [127:0] key, pt, ct, back, exp_ct;
  int n;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // FIPS-197 appendix C.1
    key = 128'h000102030405060708090a0b0c0d0e0f;
    pt  = 128'h00112233445566778899aabbccddeeff;
    errs_seen = 0;
    run(MODE_KEY, key, back, n);
    $display("key cycles %0d at %t", n, $time);
    check(n == 132, $sformatf("key expansion took %0d cycles", n));
    run(MODE_ENC, pt, ct, n);
    check(n == 44, $sformatf("encryption took %0d cycles", n));
    check(ct == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("C.1 ct %h", ct));
    run(MODE_DEC, ct, back, n);
    check(n == 44, $sformatf("decryption took %0d cycles", n));
    check(back == pt, $sformatf("C.1 decrypt %h", back));
    // FIPS-197 appendix B
    run(MODE_KEY, 128'h2b7e151628aed2a6abf7158809cf4f3c, back, n);
    run(MODE_ENC, 128'h3243f6a8885a308d313198a2e0370734, ct, n);
    check(ct == 128'h3925841d02dc09fbdc118597196a0b32, $sformatf("B ct %h", ct));
    // random pairs against the reference model
    for (int t = 0; t < 12; t++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      pt  = {$urandom, $urandom, $urandom, $urandom};
      run(MODE_KEY, key, back, n);
      run(MODE_ENC, pt, ct, n);
      exp_ct = encrypt(key, pt);
      check(ct == exp_ct, $sformatf("random ct %h exp %h", ct, exp_ct));
      run(MODE_DEC, ct, back, n);
      check(back == pt, $sformatf("random dec %h", back));
      run(MODE_DEC, pt, back, n);
      check(back == decrypt(key, pt), "random decrypt of arbitrary block");
    end
    check(errs_seen == 0, $sformatf("%0d parity errors on fault-free runs", errs_seen));
    check(error == 0, "sticky error clear on fault-free runs");

    // fault: flip one bit of a round key in the key RAM, encryption must flag it
    errs_seen = 0;
    dut.keyram[17][2].d[3] = ~dut.keyram[17][2].d[3];
    run(MODE_ENC, pt, ct, n);
    check(errs_seen > 0, "round-key bit flip detected");
    check(error == 1, "sticky error set");
    @(negedge clk); err_clr = 1; @(negedge clk); err_clr = 0;
    check(error == 0, "err_clr clears error");

    // fault: flip a bit of CT-box ROM A in the SB field of every encryption word
    run(MODE_KEY, key, back, n);
    for (int a = 0; a < 256; a++) dut.u_rom_a.mem[a][CT_2SB].d[5] = ~dut.u_rom_a.mem[a][CT_2SB].d[5];
    errs_seen = 0;
    run(MODE_ENC, pt, ct, n);
    check(errs_seen > 0, "CT-box ROM bit flip detected in encryption");
    for (int a = 0; a < 256; a++) dut.u_rom_a.mem[a][CT_2SB].d[5] = ~dut.u_rom_a.mem[a][CT_2SB].d[5];
    // fault: decryption half
    for (int a = 256; a < 512; a++) dut.u_rom_b.mem[a][1].d[0] = ~dut.u_rom_b.mem[a][1].d[0];
    errs_seen = 0;
    run(MODE_DEC, ct, back, n);
    check(errs_seen > 0, "CT-box ROM bit flip detected in decryption");
    for (int a = 256; a < 512; a++) dut.u_rom_b.mem[a][1].d[0] = ~dut.u_rom_b.mem[a][1].d[0];
    errs_seen = 0;
    run(MODE_ENC, pt, ct, n);
    check(errs_seen == 0 && ct == encrypt(key, pt), "clean again after repair");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
