// aes_pkg: types, constants and GF(2^8) helpers shared by the 32-bit AES core
// with on-line parity checking and by its BIST.
//
// A state byte travels with one parity bit (pbyte_t, even parity: the XOR of
// the nine bits is 0). A 32-bit state column is four such bytes (pword_t,
// 36 bits); element [0] is row 0, which is bits [31:24] of the plain 32-bit
// word, as in FIPS-197. The S-box and its inverse are computed as constant
// tables by walking the multiplicative group of GF(2^8) and applying the
// affine map, so the CT-box ROM contents are generated rather than pasted in. ct0_word() builds one 36-bit CT-box word:
// the encryption half holds {2*SB, SB, ISB, 3*SB}, the decryption half
// {E*ISB, 9*ISB, D*ISB, B*ISB}, each byte with its parity pre-computed. This
// layout (one SB element of the encryption table replaced by ISB for the
// inverse key schedule) follows the design; the byte packing is our choice.
package aes_pkg;

  typedef struct packed {
    logic       p;   // even parity of d
    logic [7:0] d;
  } pbyte_t;

  typedef pbyte_t [3:0] pword_t;  // [r] = row r of a state column

  typedef enum logic [1:0] {
    MODE_ENC = 2'd0,
    MODE_DEC = 2'd1,
    MODE_KEY = 2'd2
  } aes_mode_e;

  localparam int unsigned NR         = 10;        // rounds of AES-128
  localparam int unsigned KEY_WORDS  = 4 * (NR + 1); // 44 round-key words
  localparam int unsigned BLOCK_CYC  = 4 * (NR + 1); // 44 cycles per block
  localparam int unsigned KEYX_CYC   = KEY_WORDS + 2 * KEY_WORDS; // 132

  // CT-box word fields (byte index inside a 36-bit ROM word)
  localparam int unsigned CT_2SB = 0, CT_SB = 1, CT_ISB = 2, CT_3SB = 3;

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // multiplication by the small constants of MixColumns and its inverse,
  // written as xtime chains so no loop is needed
  function automatic logic [7:0] mul3(input logic [7:0] a);
    return xtime(a) ^ a;
  endfunction
  function automatic logic [7:0] mul9(input logic [7:0] a);
    return xtime(xtime(xtime(a))) ^ a;
  endfunction
  function automatic logic [7:0] mulb(input logic [7:0] a);
    return xtime(xtime(xtime(a))) ^ xtime(a) ^ a;
  endfunction
  function automatic logic [7:0] muld(input logic [7:0] a);
    return xtime(xtime(xtime(a))) ^ xtime(xtime(a)) ^ a;
  endfunction
  function automatic logic [7:0] mule(input logic [7:0] a);
    return xtime(xtime(xtime(a))) ^ xtime(xtime(a)) ^ xtime(a);
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] a, input int unsigned n);
    return (a << n) | (a >> (8 - n));
  endfunction

  // S-box table: walk the field with the generator 3 (p) and its inverse
  // (q = 1/p), applying the affine map to q at each step; 0 maps to 63.
  function automatic logic [255:0][7:0] make_sbox();
    logic [255:0][7:0] t;
    logic [7:0] p, q;
    t = '0;
    p = 8'h01;
    q = 8'h01;
    for (int i = 0; i < 255; i++) begin
      p = mul3(p);
      q = q ^ (q << 1);
      q = q ^ (q << 2);
      q = q ^ (q << 4);
      if (q[7]) q = q ^ 8'h09;
      t[p] = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4) ^ 8'h63;
    end
    t[0] = 8'h63;
    return t;
  endfunction

  function automatic logic [255:0][7:0] invert_table(input logic [255:0][7:0] t);
    logic [255:0][7:0] r;
    r = '0;
    for (int i = 0; i < 256; i++) r[t[i]] = 8'(i);
    return r;
  endfunction

  localparam logic [255:0][7:0] SBOX_T  = make_sbox();
  localparam logic [255:0][7:0] ISBOX_T = invert_table(SBOX_T);

  function automatic logic [7:0] sbox(input logic [7:0] a);
    return SBOX_T[a];
  endfunction

  function automatic logic [7:0] inv_sbox(input logic [7:0] a);
    return ISBOX_T[a];
  endfunction

  function automatic pbyte_t mkp(input logic [7:0] d);
    pbyte_t r;
    r.d = d;
    r.p = ^d;
    return r;
  endfunction

  // 32-bit word (row 0 in bits 31:24) to a column with generated parity
  function automatic pword_t add_parity(input logic [31:0] w);
    pword_t r;
    for (int k = 0; k < 4; k++) r[k] = mkp(w[31-8*k -: 8]);
    return r;
  endfunction

  function automatic logic [31:0] strip_parity(input pword_t w);
    return {w[0].d, w[1].d, w[2].d, w[3].d};
  endfunction

  // per-byte parity check of a column: bit k set when byte k is inconsistent
  function automatic logic [3:0] parity_err(input pword_t w);
    logic [3:0] e;
    for (int k = 0; k < 4; k++) e[k] = ^{w[k].p, w[k].d};
    return e;
  endfunction

  function automatic pword_t pxor(input pword_t a, input pword_t b);
    pword_t r;
    for (int k = 0; k < 4; k++) begin
      r[k].d = a[k].d ^ b[k].d;
      r[k].p = a[k].p ^ b[k].p;
    end
    return r;
  endfunction

  // rotate a table column down by n rows: result[row] = t[(row - n) mod 4]
  function automatic pword_t rot_down(input pword_t t, input int unsigned n);
    pword_t r;
    for (int k = 0; k < 4; k++) r[k] = t[(k + 4 - n) % 4];
    return r;
  endfunction

  // CT0 word at address {dec, s}
  function automatic pword_t ct0_word(input logic dec, input logic [7:0] s);
    pword_t w;
    logic [7:0] sb, isb;
    sb  = sbox(s);
    isb = inv_sbox(s);
    if (!dec) begin
      w[CT_2SB] = mkp(xtime(sb));
      w[CT_SB]  = mkp(sb);
      w[CT_ISB] = mkp(isb);
      w[CT_3SB] = mkp(mul3(sb));
    end else begin
      w[0] = mkp(mule(isb));
      w[1] = mkp(mul9(isb));
      w[2] = mkp(muld(isb));
      w[3] = mkp(mulb(isb));
    end
    return w;
  endfunction

endpackage
