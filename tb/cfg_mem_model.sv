// cfg_mem_model: behavioural model (not synthesizable) of the FPGA
// configuration memory as seen through the ICAP and the frame ECC primitive.
//
// It stores FRAMES frames of 41 words and understands the small subset of
// Virtex-5 configuration packets that the scrubber sends: dummy and sync
// words, type-1 writes to CMD (DESYNC ends the session) and FAR, type-1
// FDRI/FDRO headers followed by a type-2 word count. A read session returns
// one word per cycle while icap_ce_n = 0 and icap_write_n = 1 (icap_busy low
// marks a valid word); deasserting icap_ce_n pauses it, and any new command
// ends it (NOOP does not). Written FDRI words replace frame words from FAR on. No pad frames
// are modelled. Alongside each read the model plays the frame ECC primitive:
// it accumulates the Hamming syndrome of the frame being read (layout in
// scrub_pkg) and pulses syndrome_valid with the last word of each frame.
// Testbench tasks: init_random() fills the memory with random frames with
// consistent ECC and keeps a golden copy; flip() upsets one bit; reload()
// restores the golden copy (a full reconfiguration); mismatches() counts bits
// that differ from the golden copy.
module cfg_mem_model
  import scrub_pkg::*;
#(
  parameter int unsigned N_TOP   = 2,
  parameter int unsigned N_ROW   = 2,
  parameter int unsigned N_MAJOR = 38,
  parameter int unsigned N_MINOR = 36
) (
  input  logic        clk,
  input  logic [31:0] icap_i,
  input  logic        icap_ce_n,
  input  logic        icap_write_n,
  output logic [31:0] icap_o,
  output logic        icap_busy,
  output logic [11:0] syndrome,
  output logic        syndrome_valid
);

  localparam int unsigned FRAMES = N_TOP * N_ROW * N_MAJOR * N_MINOR;
  localparam int unsigned WORDS  = FRAMES * FRAME_WORDS;

  logic [31:0] mem    [WORDS];
  logic [31:0] golden [WORDS];
  logic [10:0] bitcode [FRAME_BITS];

  typedef enum {P_HDR, P_CMD, P_FAR, P_T2, P_FDRI} pend_e;

  bit          synced = 0;
  pend_e       pend = P_HDR;
  int unsigned t1_reg = 0;
  int unsigned far_idx = 0;
  int unsigned rd_left = 0, rd_ptr = 0, rd_word = 0;
  int unsigned wr_left = 0, wr_ptr = 0;
  logic [10:0] acc_h = 0;
  logic        acc_p = 0;
  int unsigned reads = 0, writes = 0;

  initial begin
    int unsigned v = 3, d = 0;
    icap_o = '0;
    icap_busy = 1'b1;
    syndrome = '0;
    syndrome_valid = 1'b0;
    for (int unsigned f = 0; f < FRAME_BITS; f++) begin
      if (f / 32 == ECC_WORD && f % 32 < ECC_BITS) begin
        bitcode[f] = (f % 32 < 11) ? 11'(1 << (f % 32)) : 11'd0;
      end else begin
        while ((v & (v - 1)) == 0) v++;
        bitcode[f] = 11'(v);
        v++;
        d++;
      end
    end
  end

  function automatic int unsigned far_to_idx(input far_t a);
    return ((32'(a.top) * N_ROW + 32'(a.row)) * N_MAJOR + 32'(a.major)) * N_MINOR + 32'(a.minor);
  endfunction

  function automatic logic [11:0] word_syn(input logic [31:0] w, input int unsigned wi);
    logic [10:0] h = 0;
    for (int b = 0; b < 32; b++) if (w[b]) h ^= bitcode[wi*32 + b];
    return {^w, h};
  endfunction

  task automatic seal_frame(input int unsigned fr);
    logic [11:0] s = 0;
    mem[fr*FRAME_WORDS + ECC_WORD][11:0] = '0;
    for (int unsigned wi = 0; wi < FRAME_WORDS; wi++) s ^= word_syn(mem[fr*FRAME_WORDS + wi], wi);
    mem[fr*FRAME_WORDS + ECC_WORD][10:0] = s[10:0];
    // overall parity over every bit, including the check bits just written
    mem[fr*FRAME_WORDS + ECC_WORD][11] = s[11] ^ (^s[10:0]);
  endtask

  task automatic init_random();
    for (int unsigned k = 0; k < WORDS; k++) mem[k] = $urandom;
    for (int unsigned fr = 0; fr < FRAMES; fr++) seal_frame(fr);
    for (int unsigned k = 0; k < WORDS; k++) golden[k] = mem[k];
  endtask

  task automatic flip(input int unsigned fr, input int unsigned wi, input int unsigned b);
    mem[fr*FRAME_WORDS + wi][b] = ~mem[fr*FRAME_WORDS + wi][b];
  endtask

  // full reconfiguration: the whole memory is rewritten from the golden image
  task automatic reload();
    for (int unsigned k = 0; k < WORDS; k++) mem[k] = golden[k];
  endtask

  function automatic int unsigned mismatches();
    int unsigned n = 0;
    for (int unsigned k = 0; k < WORDS; k++) n += $countones(mem[k] ^ golden[k]);
    return n;
  endfunction

  always @(posedge clk) begin
    syndrome_valid <= 1'b0;
    icap_busy      <= 1'b1;
    if (!icap_ce_n && !icap_write_n) begin
      writes++;
      if (!synced) begin
        if (icap_i == ICAP_SYNC) synced = 1;
        pend = P_HDR;
      end else begin
        unique case (pend)
          P_CMD: begin
            if (icap_i == CMD_DESYNC) synced = 0;
            pend = P_HDR;
          end
          P_FAR: begin
            far_idx = far_to_idx(far_t'(icap_i));
            pend = P_HDR;
          end
          P_FDRI: begin
            if (wr_ptr < WORDS) mem[wr_ptr] = icap_i;
            wr_ptr++;
            wr_left--;
            if (wr_left == 0) pend = P_HDR;
          end
          default: begin
            if (icap_i != ICAP_NOOP) rd_left = 0;  // a command other than NOOP ends a read
            if (icap_i == ICAP_NOOP) begin
              pend = P_HDR;
            end else if (icap_i[31:29] == 3'b001) begin
              t1_reg = 32'(icap_i[26:13]);
              if (icap_i[28:27] == 2'b10 && icap_i[10:0] == 11'd1 && t1_reg == 4) pend = P_CMD;
              else if (icap_i[28:27] == 2'b10 && icap_i[10:0] == 11'd1 && t1_reg == 1) pend = P_FAR;
              else if (icap_i[10:0] == 11'd0 && (t1_reg == 2 || t1_reg == 3)) pend = P_T2;
              else pend = P_HDR;
            end else begin
              pend = P_HDR;
            end
          end
          P_T2: begin
            pend = P_HDR;
            if (icap_i[31:29] == 3'b010 && icap_i[28:27] == 2'b01 && t1_reg == 3) begin
              rd_left = 32'(icap_i[26:0]);
              rd_ptr  = far_idx * FRAME_WORDS;
              rd_word = 0;
              acc_h   = '0;
              acc_p   = 1'b0;
            end else if (icap_i[31:29] == 3'b010 && icap_i[28:27] == 2'b10 && t1_reg == 2) begin
              wr_left = 32'(icap_i[26:0]);
              wr_ptr  = far_idx * FRAME_WORDS;
              if (wr_left != 0) pend = P_FDRI;
            end
          end
        endcase
      end
    end else if (!icap_ce_n && icap_write_n && rd_left != 0 && rd_ptr < WORDS) begin
      logic [11:0] s;
      reads++;
      icap_o    <= mem[rd_ptr];
      icap_busy <= 1'b0;
      s = word_syn(mem[rd_ptr], rd_word);
      acc_h ^= s[10:0];
      acc_p ^= s[11];
      rd_ptr++;
      rd_left--;
      rd_word++;
      if (rd_word == FRAME_WORDS) begin
        syndrome       <= {acc_p, acc_h};
        syndrome_valid <= 1'b1;
        rd_word = 0;
        acc_h   = '0;
        acc_p   = 1'b0;
      end
    end
  end

endmodule
