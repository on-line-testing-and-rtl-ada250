// tb_tmr_voter: random vectors through a 37-bit voter; each output bit must
// be the value held by at least two inputs, and disagree must be high exactly
// when the three inputs are not all equal.
module tb_tmr_voter;
  localparam int W = 37;
  logic [W-1:0] a, b, c, y;
  logic disagree;
  int checks = 0, failures = 0;

  tmr_voter #(.W(W)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] e;
    for (int t = 0; t < 3000; t++) begin
      a = {$urandom, $urandom};
      b = (t % 3 == 0) ? a : {$urandom, $urandom};
      c = (t % 5 == 0) ? a : (t % 7 == 0) ? (a ^ (W'(1) << (t % W))) : {$urandom, $urandom};
      #1;
      for (int k = 0; k < W; k++) e[k] = (int'(a[k]) + int'(b[k]) + int'(c[k])) >= 2;
      checks++;
      if (y != e) failures++;
      checks++;
      if (disagree != !(a == b && b == c)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
