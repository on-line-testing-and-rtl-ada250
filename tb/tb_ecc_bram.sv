// tb_ecc_bram: checks the 512 x 64 ECC block RAM: preloaded contents, write
// then read with one cycle of read latency, correction of a single flipped
// bit in every one of the 72 stored positions (with sbiterr), detection of
// double flips (dbiterr), and that the array itself is not rewritten.
module tb_ecc_bram;
  localparam logic [63:0] IV [2] = '{64'h0123_4567_89ab_cdef, 64'hdead_beef_0000_ffff};
  logic clk = 0, we = 0;
  logic [8:0] waddr = 0, raddr = 0;
  logic [63:0] wdata = 0, rdata;
  logic sbiterr, dbiterr;
  int checks = 0, failures = 0;

  ecc_bram #(.DEPTH(512), .INIT_WORDS(2), .INIT(IV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rd(input int a, output logic [63:0] d, output logic s, output logic db);
    @(negedge clk); raddr = 9'(a);
    @(negedge clk); d = rdata; s = sbiterr; db = dbiterr;
  endtask

  logic [63:0] ref_mem [512];
  logic [63:0] d;
  logic s, db;
  logic [71:0] saved;

  initial begin
    rd(0, d, s, db); check(d == IV[0] && !s && !db, "preloaded word 0");
    rd(1, d, s, db); check(d == IV[1] && !s && !db, "preloaded word 1");
    rd(2, d, s, db); check(d == 0 && !s && !db, "other words start at zero");
    for (int a = 0; a < 512; a++) begin
      ref_mem[a] = {$urandom, $urandom};
      @(negedge clk); we = 1; waddr = 9'(a); wdata = ref_mem[a];
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 512; a += 7) begin
      rd(a, d, s, db);
      check(d == ref_mem[a] && !s && !db, $sformatf("read back %0d", a));
    end
    for (int b = 0; b < 72; b++) begin
      saved = dut.mem[100];
      dut.mem[100][b] = ~dut.mem[100][b];
      rd(100, d, s, db);
      check(d == ref_mem[100] && s && !db, $sformatf("single flip at bit %0d corrected", b));
      check(dut.mem[100] != saved, "array not rewritten by the read");
      dut.mem[100] = saved;
    end
    for (int t = 0; t < 40; t++) begin
      automatic int b1 = $urandom % 72, b2;
      do b2 = $urandom % 72; while (b2 == b1);
      saved = dut.mem[200];
      dut.mem[200][b1] = ~dut.mem[200][b1];
      dut.mem[200][b2] = ~dut.mem[200][b2];
      rd(200, d, s, db);
      check(db && !s, $sformatf("double flip %0d,%0d detected", b1, b2));
      dut.mem[200] = saved;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
