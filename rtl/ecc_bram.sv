// ecc_bram: 512 x 64-bit block RAM with 8 Hamming SEC-DED protection bits.
//
// Each 72-bit entry holds 64 data bits and 8 check bits, which are generated
// on every write. A read returns, one clock after the address, the data
// corrected for any single-bit error (sbiterr) and flags an uncorrectable
// double error (dbiterr). As in the FPGA block RAM ECC option, the error is
// not written back to the array; only the output is corrected. Code layout:
// data bit i has code c(i), the i-th integer >= 3 that is not a power of two;
// check bit k (k < 7) has code 2^k; check bit 7 is the overall parity. This
// layout is this design's choice, not the vendor's.
//
// INIT holds the initial contents of the first INIT_WORDS entries (the rest
// start at zero), so the scrubber's command sequences are preloaded the way a
// block RAM is initialised from the bitstream. Ports: one write port and one
// read port, both on clk; DEPTH = 512 as in the 512 x 64 ECC configuration.
module ecc_bram #(
  parameter int unsigned DEPTH      = 512,
  parameter int unsigned INIT_WORDS = 1,
  parameter logic [63:0] INIT [INIT_WORDS] = '{default: 64'h0}
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [$clog2(DEPTH)-1:0]  waddr,
  input  logic [63:0]               wdata,
  input  logic [$clog2(DEPTH)-1:0]  raddr,
  output logic [63:0]               rdata,
  output logic                      sbiterr,
  output logic                      dbiterr
);

  logic [71:0] mem [DEPTH];

  // code of every data bit, and for each check bit k the mask of the data
  // bits whose code has bit k set (both constant)
  function automatic logic [63:0][6:0] make_codes();
    logic [63:0][6:0] c;
    int unsigned n;
    c = '0;
    n = 0;
    for (int unsigned v = 3; v < 128; v++) begin
      if ((v & (v - 1)) != 0 && n < 64) begin
        c[n] = 7'(v);
        n++;
      end
    end
    return c;
  endfunction

  function automatic logic [6:0][63:0] make_masks(input logic [63:0][6:0] c);
    logic [6:0][63:0] m;
    for (int k = 0; k < 7; k++)
      for (int i = 0; i < 64; i++) m[k][i] = c[i][k];
    return m;
  endfunction

  localparam logic [63:0][6:0] CODE = make_codes();
  localparam logic [6:0][63:0] MASK = make_masks(CODE);

  function automatic logic [71:0] encode(input logic [63:0] d);
    logic [6:0] h;
    for (int k = 0; k < 7; k++) h[k] = ^(d & MASK[k]);
    return {^{d, h}, h, d};
  endfunction

  // the code of an all-zero word is all zero
  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) mem[a] = '0;
    for (int unsigned a = 0; a < INIT_WORDS && a < DEPTH; a++) mem[a] = encode(INIT[a]);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= encode(wdata);
  end

  // read: register the raw entry, then decode
  logic [71:0] raw;
  always_ff @(posedge clk) raw <= mem[raddr];

  logic [6:0] syn;
  logic       par;
  always_comb begin
    for (int k = 0; k < 7; k++) syn[k] = raw[64+k] ^ (^(raw[63:0] & MASK[k]));
    par = ^raw;
    rdata = raw[63:0];
    for (int i = 0; i < 64; i++) if (par && syn == CODE[i]) rdata[i] = ~raw[i];
    sbiterr = par;
    dbiterr = !par && (syn != 7'd0);
  end

endmodule
