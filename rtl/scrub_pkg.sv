// scrub_pkg: constants, types and functions of the internal configuration
// error-recovery mechanism (the "scrubber").
//
// A configuration frame is 41 words of 32 bits, 1312 bits in all: 1300 data
// bits and 12 ECC bits. This design assumes the ECC bits sit in bits 11:0 of
// word ECC_WORD (20). Bits 10:0 are Hamming check bits: data bit d (frame bits
// in order, skipping the ECC field) has code c(d), the d-th integer >= 3 that
// is not a power of two, and check bit k has code 2^k. Bit 11 is the overall
// parity. The frame syndrome S is then decoded as follows (this matches the
// table of error states for Virtex-4/5 frames; the bit-to-code mapping is this
// design's own, because a device's mapping is vendor data):
//   S[11]=0, S[10:0]=0   no error
//   S[11]=1, S[10:0]!=0  single error, S[10:0] locates it
//   S[11]=1, S[10:0]=0   single error in the overall parity bit
//   S[11]=0, S[10:0]!=0  double error, not correctable
// The frame address follows the Virtex-5 frame address register: block type
// [23:21], top/bottom [20], row [19:15], major (column) [14:7], minor [6:0].
// The ICAP words are Virtex-5 type-1/type-2 packet headers and commands.
package scrub_pkg;

  localparam int unsigned FRAME_WORDS = 41;
  localparam int unsigned FRAME_BITS  = FRAME_WORDS * 32;
  localparam int unsigned ECC_WORD    = 20;
  localparam int unsigned ECC_BITS    = 12;

  // configuration packets
  localparam logic [31:0] ICAP_DUMMY     = 32'hFFFF_FFFF;
  localparam logic [31:0] ICAP_SYNC      = 32'hAA99_5566;
  localparam logic [31:0] ICAP_NOOP      = 32'h2000_0000;
  localparam logic [31:0] ICAP_WR_CMD    = 32'h3000_8001;  // type 1, write CMD, 1 word
  localparam logic [31:0] ICAP_WR_FAR    = 32'h3000_2001;  // type 1, write FAR, 1 word
  localparam logic [31:0] ICAP_WR_FDRI   = 32'h3000_4000;  // type 1, write FDRI, count in type 2
  localparam logic [31:0] ICAP_RD_FDRO   = 32'h2800_6000;  // type 1, read FDRO, count in type 2
  localparam logic [31:0] ICAP_T2_WR     = 32'h5000_0000;  // type 2 write, [26:0] words
  localparam logic [31:0] ICAP_T2_RD     = 32'h4800_0000;  // type 2 read, [26:0] words
  localparam logic [31:0] CMD_WCFG       = 32'h0000_0001;
  localparam logic [31:0] CMD_RCFG       = 32'h0000_0004;
  localparam logic [31:0] CMD_DESYNC     = 32'h0000_000D;

  typedef struct packed {
    logic [7:0]  rsvd;
    logic [2:0]  btype;
    logic        top;
    logic [4:0]  row;
    logic [7:0]  major;
    logic [6:0]  minor;
  } far_t;

  typedef enum logic [1:0] {
    SYN_NONE   = 2'd0,
    SYN_SINGLE = 2'd1,
    SYN_DOUBLE = 2'd2
  } syn_status_e;

  // floor(log2(h)) for h > 0
  function automatic int unsigned flog2(input logic [10:0] h);
    int unsigned r = 0;
    for (int i = 0; i < 11; i++) if (h[i]) r = i;
    return r;
  endfunction

endpackage
