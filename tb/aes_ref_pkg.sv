// aes_ref_pkg: plain byte-oriented AES-128 reference model for the testbenches.
//
// Written straight from the standard cipher and inverse cipher (FIPS-197),
// on a 128-bit block with byte 0 in bits 127:120. The S-box is built by the
// usual generator walk (p = p*3, q = q/3) rather than by field inversion, so
// that it shares no code with the design's CT-box generator.
package aes_ref_pkg;

  typedef logic [7:0] sbox_t [256];

  function automatic logic [7:0] ref_xt(input logic [7:0] a);
    return (a << 1) ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] ref_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = ref_xt(a);
    end
    return r;
  endfunction

  function automatic sbox_t make_sbox();
    sbox_t s;
    logic [7:0] p = 1, q = 1, x;
    do begin
      p = p ^ (p << 1) ^ (p[7] ? 8'h1b : 8'h00);
      q ^= q << 1; q ^= q << 2; q ^= q << 4;
      if (q[7]) q ^= 8'h09;
      x = q ^ {q[6:0], q[7]} ^ {q[5:0], q[7:6]} ^ {q[4:0], q[7:5]} ^ {q[3:0], q[7:4]};
      s[p] = x ^ 8'h63;
    end while (p != 1);
    s[0] = 8'h63;
    return s;
  endfunction

  function automatic sbox_t invert(input sbox_t s);
    sbox_t r;
    for (int i = 0; i < 256; i++) r[s[i]] = 8'(i);
    return r;
  endfunction

  typedef logic [31:0] rk_t [44];

  function automatic rk_t expand(input logic [127:0] key);
    rk_t w;
    sbox_t s = make_sbox();
    logic [7:0] rc = 1;
    logic [31:0] t;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {s[t[31:24]], s[t[23:16]], s[t[15:8]], s[t[7:0]]} ^ {rc, 24'h0};
        rc = ref_xt(rc);
      end
      w[i] = w[i-4] ^ t;
    end
    return w;
  endfunction

  function automatic logic [7:0] gb(input logic [127:0] st, input int i);
    return st[127-8*i -: 8];
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] key, input logic [127:0] pt);
    rk_t w = expand(key);
    sbox_t s = make_sbox();
    logic [127:0] st, ns;
    logic [7:0] a0, a1, a2, a3;
    st = pt ^ {w[0], w[1], w[2], w[3]};
    for (int rd = 1; rd <= 10; rd++) begin
      for (int c = 0; c < 4; c++) begin
        a0 = s[gb(st, 4*c)];
        a1 = s[gb(st, 4*((c+1)%4) + 1)];
        a2 = s[gb(st, 4*((c+2)%4) + 2)];
        a3 = s[gb(st, 4*((c+3)%4) + 3)];
        if (rd < 10)
          ns[127-32*c -: 32] = {ref_mul(a0,2)^ref_mul(a1,3)^a2^a3,
                                a0^ref_mul(a1,2)^ref_mul(a2,3)^a3,
                                a0^a1^ref_mul(a2,2)^ref_mul(a3,3),
                                ref_mul(a0,3)^a1^a2^ref_mul(a3,2)};
        else
          ns[127-32*c -: 32] = {a0, a1, a2, a3};
      end
      st = ns ^ {w[4*rd], w[4*rd+1], w[4*rd+2], w[4*rd+3]};
    end
    return st;
  endfunction

  function automatic logic [127:0] decrypt(input logic [127:0] key, input logic [127:0] ct);
    rk_t w = expand(key);
    sbox_t si = invert(make_sbox());
    logic [127:0] st, ns;
    logic [7:0] a0, a1, a2, a3;
    st = ct ^ {w[40], w[41], w[42], w[43]};
    for (int rd = 9; rd >= 0; rd--) begin
      // inverse shift rows and inverse sub bytes
      for (int c = 0; c < 4; c++)
        ns[127-32*c -: 32] = {si[gb(st, 4*c)], si[gb(st, 4*((c+3)%4) + 1)],
                              si[gb(st, 4*((c+2)%4) + 2)], si[gb(st, 4*((c+1)%4) + 3)]};
      st = ns ^ {w[4*rd], w[4*rd+1], w[4*rd+2], w[4*rd+3]};
      if (rd > 0) begin
        for (int c = 0; c < 4; c++) begin
          a0 = gb(st, 4*c); a1 = gb(st, 4*c+1); a2 = gb(st, 4*c+2); a3 = gb(st, 4*c+3);
          ns[127-32*c -: 32] = {ref_mul(a0,14)^ref_mul(a1,11)^ref_mul(a2,13)^ref_mul(a3,9),
                                ref_mul(a0,9)^ref_mul(a1,14)^ref_mul(a2,11)^ref_mul(a3,13),
                                ref_mul(a0,13)^ref_mul(a1,9)^ref_mul(a2,14)^ref_mul(a3,11),
                                ref_mul(a0,11)^ref_mul(a1,13)^ref_mul(a2,9)^ref_mul(a3,14)};
        end
        st = ns;
      end
    end
    return st;
  endfunction

endpackage
