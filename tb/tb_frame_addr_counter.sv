// tb_frame_addr_counter: steps the frame address counter through two full
// passes of a 2 x 3 x 4 x 5 device and compares the FAR fields, the linear
// index, the remaining count, last and wrap with a nested-loop reference;
// also checks clear and that the counter holds without inc.
module tb_frame_addr_counter;
  import scrub_pkg::*;
  localparam int NT = 2, NR = 3, NMJ = 4, NMN = 5, FR = NT * NR * NMJ * NMN;
  logic clk = 0, rst_n = 0, clear = 0, inc = 0;
  far_t far;
  logic [19:0] idx, remaining;
  logic last, wrap;
  int checks = 0, failures = 0;

  frame_addr_counter #(.N_TOP(NT), .N_ROW(NR), .N_MAJOR(NMJ), .N_MINOR(NMN)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      n = 0;
      for (int t = 0; t < NT; t++)
        for (int r = 0; r < NR; r++)
          for (int mj = 0; mj < NMJ; mj++)
            for (int mn = 0; mn < NMN; mn++) begin
              @(negedge clk);
              inc = 1;
              check(far.top == 1'(t) && far.row == 5'(r) && far.major == 8'(mj) &&
                    far.minor == 7'(mn) && far.btype == 0,
                    $sformatf("frame %0d far %h", n, far));
              check(idx == 20'(n) && remaining == 20'(FR - n), "idx and remaining");
              check(last == (n == FR - 1) && wrap == (n == FR - 1), "last and wrap");
              n++;
            end
    end
    @(negedge clk); inc = 0;
    check(idx == 0, "back at the first frame");
    @(negedge clk); inc = 1;
    repeat (7) @(negedge clk);
    inc = 0;
    repeat (3) @(negedge clk);
    check(idx == 7, "holds without inc");
    clear = 1; @(negedge clk); clear = 0;
    check(idx == 0 && far == '0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
