// tb_scrub_err_locate: feeds the error-detection logic the syndrome of every
// single bit upset of a frame (all 1312 positions, codes enumerated
// independently here), of random double upsets, and the zero syndrome, and
// checks the status, the word and the bit mask.
module tb_scrub_err_locate;
  import scrub_pkg::*;
  logic [11:0] syndrome;
  syn_status_e status;
  logic [5:0] word;
  logic [31:0] mask;
  int checks = 0, failures = 0;
  logic [10:0] code [FRAME_BITS];

  scrub_err_locate dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    int v = 3;
    for (int f = 0; f < FRAME_BITS; f++) begin
      if (f / 32 == ECC_WORD && f % 32 < ECC_BITS) code[f] = (f % 32 < 11) ? 11'(1 << (f % 32)) : 0;
      else begin
        while ((v & (v - 1)) == 0) v++;
        code[f] = 11'(v);
        v++;
      end
    end
    syndrome = 0; #1;
    check(status == SYN_NONE, "zero syndrome");
    for (int f = 0; f < FRAME_BITS; f++) begin
      syndrome = {1'b1, code[f]}; #1;
      check(status == SYN_SINGLE && word == 6'(f / 32) && mask == (32'd1 << (f % 32)),
            $sformatf("bit %0d: st %0d word %0d mask %h", f, status, word, mask));
    end
    for (int t = 0; t < 2000; t++) begin
      automatic int a = $urandom % FRAME_BITS, b;
      do b = $urandom % FRAME_BITS; while (b == a);
      syndrome = {1'b0, code[a] ^ code[b]}; #1;
      check(status == SYN_DOUBLE, $sformatf("double %0d %0d", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
