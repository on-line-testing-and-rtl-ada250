// tb_ctbox_rom: checks every word of a CT-box ROM against the reference
// S-box: the encryption half {2*SB, SB, ISB, 3*SB}, the decryption half
// {E*ISB, 9*ISB, D*ISB, B*ISB}, and an even parity bit on every byte, on both
// read ports.
module tb_ctbox_rom;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic [8:0] addr_a, addr_b;
  pword_t q_a, q_b;
  int checks = 0, failures = 0;

  ctbox_rom dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [35:0] expect_word(input int a);
    sbox_t s = aes_ref_pkg::make_sbox();
    sbox_t si = invert(s);
    logic [7:0] b [4];
    logic [35:0] w;
    if (a < 256) begin
      b[0] = ref_mul(s[a], 2); b[1] = s[a]; b[2] = si[a]; b[3] = ref_mul(s[a], 3);
    end else begin
      b[0] = ref_mul(si[a-256], 14); b[1] = ref_mul(si[a-256], 9);
      b[2] = ref_mul(si[a-256], 13); b[3] = ref_mul(si[a-256], 11);
    end
    for (int k = 0; k < 4; k++) w[9*k +: 9] = {^b[k], b[k]};
    return w;
  endfunction

  initial begin
    for (int a = 0; a < 512; a++) begin
      addr_a = 9'(a);
      addr_b = 9'(511 - a);
      #1;
      checks++;
      if (q_a != expect_word(a)) begin
        failures++;
        if (failures < 5) $display("FAIL port a addr %0d: %h exp %h", a, q_a, expect_word(a));
      end
      checks++;
      if (q_b != expect_word(511 - a)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
