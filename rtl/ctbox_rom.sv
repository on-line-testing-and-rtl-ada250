// ctbox_rom: one dual-port CT-box ROM, 512 words of 36 bits.
//
// Address bit 8 selects the half: 0 = encryption/key-schedule half
// {2*SB(s), SB(s), ISB(s), 3*SB(s)}, 1 = decryption half
// {E*ISB(s), 9*ISB(s), D*ISB(s), B*ISB(s)}; bits 7:0 are the state byte s.
// Every byte of a word carries its pre-computed parity bit, so the table and
// its parities fill exactly one 18-kbit block ROM, as the design intends. The
// contents are computed at elaboration from the S-box tables and GF(2^8)
// multipliers in aes_pkg. The AES core uses two instances so that
// consecutive T-tables come from different ROMs, which keeps a single faulty
// ROM cell from cancelling itself in the column XOR.
//
// Timing: both read ports are combinational (asynchronous read). The design
// puts the CT-box in a block ROM; reading it without a clock edge is this
// implementation's choice, so that a round takes four cycles with no bubble.
module ctbox_rom
  import aes_pkg::*;
(
  input  logic [8:0] addr_a,
  input  logic [8:0] addr_b,
  output pword_t     q_a,
  output pword_t     q_b
);

  pword_t mem [512];

  initial begin
    for (int a = 0; a < 512; a++) mem[a] = ct0_word(a[8], a[7:0]);
  end

  assign q_a = mem[addr_a];
  assign q_b = mem[addr_b];

endmodule
