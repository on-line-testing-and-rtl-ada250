// scrub_err_locate: error-detection logic of the scrubber.
//
// Purely combinational. It classifies a 12-bit frame syndrome as no error,
// single error or double error (see scrub_pkg for the decoding table) and,
// for a single error, gives the word of the frame that holds the bad bit and
// a 32-bit mask with that bit set, which the controller XORs into the frame
// copy in its block RAM. A code in S[10:0] that names no bit of the frame
// (more than one flip aliasing to an unused code) is reported as a double
// error. From S[10:0] = h: a power of two 2^k is check bit k; otherwise the
// data bit is d = h - 2 - floor(log2 h), placed at frame bit d below the ECC
// field and d + 12 above it.
module scrub_err_locate
  import scrub_pkg::*;
(
  input  logic [11:0]  syndrome,
  output syn_status_e  status,
  output logic [5:0]   word,
  output logic [31:0]  mask
);

  logic [10:0]  h;
  logic         ovr;
  int unsigned  d, f;
  logic         pow2, valid;

  assign h    = syndrome[10:0];
  assign ovr  = syndrome[11];
  assign pow2 = (h != 11'd0) && ((h & (h - 11'd1)) == 11'd0);

  always_comb begin
    d = 0;
    f = ECC_WORD * 32 + 11;           // overall parity bit
    valid = 1'b1;
    if (pow2) begin
      f = ECC_WORD * 32 + flog2(h);
    end else if (h != 11'd0) begin
      d = 32'(h) - 2 - flog2(h);
      f = (d < ECC_WORD * 32) ? d : d + ECC_BITS;
      valid = (d < FRAME_BITS - ECC_BITS);
    end
    if (!ovr && h == 11'd0)  status = SYN_NONE;
    else if (ovr && valid)   status = SYN_SINGLE;
    else                     status = SYN_DOUBLE;
    word = 6'(f / 32);
    mask = 32'd1 << (f % 32);
  end

endmodule
