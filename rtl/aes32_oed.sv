// aes32_oed: 32-bit AES-128 core with on-line error detection by parity.
//
// The core works on one 32-bit state column per clock. Encryption and
// decryption take 44 cycles per 128-bit block: four cycles load the block
// and add round key 0, then ten rounds of four cycles each. Round operations
// are reordered to ShiftRows, SubBytes+MixColumns, AddRoundKey. ShiftRows is
// done by four byte-wide shift registers (8 deep) read at a computed depth, so
// quarter c of a round picks bytes s(c), s(c+5), s(c+10), s(c+15) of the old
// state (the inverse offsets for decryption). SubBytes and MixColumns are one
// lookup in the CT-box: four table ports (two dual-port ctbox_rom instances)
// give T0..T3, built from the ROM word by byte selection and rotation, and
// are XORed with the round-key word. Decryption uses the equivalent inverse
// cipher with InvMixColumns applied to round keys 1..9.
//
// Key expansion (mode KEY) also uses the CT-box: 4 cycles load the key, 40
// cycles compute w[4..43] (SubWord from the SB field, RotWord by wiring, the
// round constant from an xtime LFSR), then 88 cycles build the 44 decryption
// keys, two cycles per word: SB of each byte, then either the decryption
// table (which yields InvMixColumns of the word) or ISB (which restores it,
// for round keys 0 and 10). All 88 words are kept in the key RAM.
//
// Error detection: every byte carries an even-parity bit. Parity is generated
// at the data input, shifted with the byte, pre-computed in the CT-box, XORed
// through AddRoundKey and the round constant (whose parity is updated by
// p' = p ^ a7), and stored with each round key. It is checked at the four
// CT-box inputs in every process and on the output words. err_now flags a
// mismatch in the current cycle; error is its sticky copy, cleared by err_clr.
// No extra cycles are spent on checking.
//
// Interface: pulse start for one cycle while busy is low with mode set. din is
// sampled in the four cycles where din_req is high (the first four busy
// cycles), row 0 of each column in bits 31:24. In ENC and DEC the result comes
// out on dout in the last four busy cycles with dout_valid; done pulses with
// the last word. KEY keeps busy for 132 cycles and produces no output. The
// structure follows the design described; the cycle numbering, port names,
// the two-cycle inverse-key step and the asynchronous RAM/ROM reads are this
// implementation's choices.
module aes32_oed
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  aes_mode_e   mode,
  input  logic [31:0] din,
  output logic        busy,
  output logic        din_req,
  output logic [31:0] dout,
  output logic        dout_valid,
  output logic        done,
  output logic        err_now,
  input  logic        err_clr,
  output logic        error
);

  localparam int unsigned DEC_BASE = KEY_WORDS;  // decryption keys at 44..87

  aes_mode_e   mode_q;
  logic [7:0]  cyc;
  pbyte_t      sr [4][8];          // ShiftRows shift registers, [row][depth]
  pword_t      keyram [2*KEY_WORDS];
  pword_t      ks [4];             // last four key words, ks[0] newest
  pbyte_t      rc;                 // round constant with its parity
  pword_t      sbw;                // SB of a key word (inverse-key step)

  logic [8:0]  rom_addr [4];
  pword_t      rom_q    [4];

  // Consecutive tables on different ROMs: A serves T0 and T2, B serves T1 and T3
  ctbox_rom u_rom_a (.addr_a(rom_addr[0]), .addr_b(rom_addr[2]), .q_a(rom_q[0]), .q_b(rom_q[2]));
  ctbox_rom u_rom_b (.addr_a(rom_addr[1]), .addr_b(rom_addr[3]), .q_a(rom_q[1]), .q_b(rom_q[3]));

  // combinational datapath
  pword_t      din_p, newcol, rk, kword, acc, t0, sbw_d, ksrc;
  pbyte_t      selb [4];           // bytes looked up in the CT-box this cycle
  logic        selhalf, lookup, mid_key;
  logic        shift_en, kw_en, rc_step, sbw_en;
  logic [6:0]  kw_addr, ksrc_addr, dkey_addr;
  logic [3:0]  in_err, out_err;
  logic [3:0]  rnd;
  logic [1:0]  qc;
  logic        last, is_enc, is_dec, is_key;
  logic [6:0]  jw;                 // decryption-key word index 0..43
  logic [3:0]  jr;                 // its round
  logic [1:0]  jc;                 // its column
  logic [1:0]  srow [4];           // ShiftRows source column of each row

  assign is_enc  = (mode_q == MODE_ENC);
  assign is_dec  = (mode_q == MODE_DEC);
  assign is_key  = (mode_q == MODE_KEY);
  assign rnd     = cyc[5:2];
  assign qc      = cyc[1:0];
  assign din_p   = add_parity(din);
  assign din_req = busy && (cyc < 8'd4);
  assign jw      = 7'((cyc - 8'(KEY_WORDS)) >> 1);
  assign jr      = 4'(jw >> 2);
  assign jc      = jw[1:0];
  assign mid_key = (jr != 4'd0) && (jr != 4'(NR));
  assign ksrc_addr = (jr == 4'd0)     ? 7'(40 + 32'(jc)) :
                     (jr == 4'(NR))   ? 7'(jc) :
                                        7'(4 * (10 - 32'(jr)) + 32'(jc));
  assign dkey_addr = 7'(DEC_BASE) + jw;
  assign ksrc    = keyram[ksrc_addr];
  assign rk      = keyram[(is_dec ? 7'(DEC_BASE) : 7'd0) + 7'(cyc)];

  always_comb begin
    for (int r = 0; r < 4; r++)
      srow[r] = is_enc ? qc + 2'(r) : qc - 2'(r);
  end

  // CT-box addresses and the parity check at the CT-box inputs
  always_comb begin
    selhalf = 1'b0;
    lookup  = 1'b0;
    for (int r = 0; r < 4; r++) selb[r] = '0;
    if (busy) begin
      if (!is_key) begin
        lookup  = (cyc >= 8'd4);
        selhalf = is_dec && (rnd != 4'(NR));
        for (int r = 0; r < 4; r++)
          selb[r] = sr[r][3 - 32'(srow[r]) + 32'(qc)];
      end else if (cyc < 8'(KEY_WORDS)) begin
        lookup = (cyc >= 8'd4) && (qc == 2'd0);
        for (int r = 0; r < 4; r++) selb[r] = ks[0][(r + 1) % 4];   // RotWord by wiring
      end else if (cyc[0] == 1'b0) begin
        lookup = 1'b1;
        for (int r = 0; r < 4; r++) selb[r] = ksrc[r];
      end else begin
        lookup  = 1'b1;
        selhalf = mid_key;
        for (int r = 0; r < 4; r++) selb[r] = sbw[r];
      end
    end
    for (int r = 0; r < 4; r++) begin
      rom_addr[r] = {selhalf, selb[r].d};
      in_err[r]   = lookup && (^{selb[r].p, selb[r].d});
    end
  end

  // table combination, key schedule and outputs
  always_comb begin
    newcol     = '0;
    kword      = '0;
    acc        = '0;
    t0         = '0;
    sbw_d      = sbw;
    shift_en   = 1'b0;
    kw_en      = 1'b0;
    kw_addr    = '0;
    rc_step    = 1'b0;
    sbw_en     = 1'b0;
    out_err    = '0;
    dout_valid = 1'b0;
    last       = 1'b0;
    if (busy) begin
      if (!is_key) begin
        shift_en = 1'b1;
        if (cyc < 8'd4) begin
          newcol = pxor(din_p, rk);
        end else if (rnd == 4'(NR)) begin
          for (int r = 0; r < 4; r++)
            acc[r] = is_enc ? rom_q[r][CT_SB] : rom_q[r][CT_ISB];
          newcol     = pxor(acc, rk);
          dout_valid = 1'b1;
          out_err    = parity_err(newcol);
        end else begin
          acc = rk;
          for (int r = 0; r < 4; r++) begin
            if (is_enc) begin
              t0[0] = rom_q[r][CT_2SB];
              t0[1] = rom_q[r][CT_SB];
              t0[2] = rom_q[r][CT_SB];
              t0[3] = rom_q[r][CT_3SB];
            end else begin
              t0 = rom_q[r];
            end
            acc = pxor(acc, rot_down(t0, r));
          end
          newcol = acc;
        end
        last = (cyc == 8'(BLOCK_CYC - 1));
      end else begin
        if (cyc < 8'(KEY_WORDS)) begin
          kw_en   = 1'b1;
          kw_addr = 7'(cyc);
          if (cyc < 8'd4) begin
            kword = din_p;
          end else if (qc == 2'd0) begin
            for (int r = 0; r < 4; r++) acc[r] = rom_q[r][CT_SB];   // SubWord
            acc[0].d = acc[0].d ^ rc.d;                             // round constant
            acc[0].p = acc[0].p ^ rc.p;
            kword    = pxor(ks[3], acc);
            rc_step  = 1'b1;
          end else begin
            kword = pxor(ks[3], ks[0]);
          end
        end else if (cyc[0] == 1'b0) begin
          for (int r = 0; r < 4; r++) sbw_d[r] = rom_q[r][CT_SB];
          sbw_en = 1'b1;
        end else begin
          if (mid_key) begin
            for (int r = 0; r < 4; r++) acc = pxor(acc, rot_down(rom_q[r], r));
          end else begin
            for (int r = 0; r < 4; r++) acc[r] = rom_q[r][CT_ISB];
          end
          kword   = acc;
          kw_en   = 1'b1;
          kw_addr = dkey_addr;
        end
        last = (cyc == 8'(KEYX_CYC - 1));
      end
    end
  end

  assign err_now = |in_err || |out_err;
  assign done    = busy && last;
  assign dout    = strip_parity(newcol);

  // control and state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      cyc    <= '0;
      mode_q <= MODE_ENC;
      error  <= 1'b0;
      rc     <= '{p: 1'b1, d: 8'h01};
    end else begin
      if (err_clr)      error <= 1'b0;
      else if (err_now) error <= 1'b1;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          cyc    <= '0;
          mode_q <= mode;
          rc     <= '{p: 1'b1, d: 8'h01};
        end
      end else begin
        cyc <= cyc + 8'd1;
        if (last) busy <= 1'b0;
        if (rc_step) begin
          rc.d <= xtime(rc.d);
          rc.p <= rc.p ^ rc.d[7];     // parity of the next round constant
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (shift_en) begin
      for (int r = 0; r < 4; r++) begin
        for (int d = 7; d > 0; d--) sr[r][d] <= sr[r][d-1];
        sr[r][0] <= newcol[r];
      end
    end
    if (kw_en) begin
      keyram[kw_addr] <= kword;
      ks[3] <= ks[2];
      ks[2] <= ks[1];
      ks[1] <= ks[0];
      ks[0] <= kword;
    end
    if (sbw_en) sbw <= sbw_d;
  end

endmodule
