// scrub_ctrl: control logic with block RAM of the internal configuration
// error-recovery mechanism (scrubber).
//
// The scrubber continuously reads back the FPGA configuration through the
// ICAP while the frame ECC primitive computes a syndrome for every frame. A
// finite state machine, a frame address counter and the error-detection logic
// replace the embedded processor of processor-based scrubbers:
//   START    wait for enable, point the counter at the first frame
//   INIT_RB  send the readback command sequence: FAR = counter, word count =
//            41 * (frames left)
//   CHECK    read; on every SYNDROMEVALID pulse a clean frame advances the
//            counter; after the last frame the readback is started again
//   single error: stop the readback, READ_FRAME reads the bad frame into the
//            block RAM buffer, CORRECT flips the located bit there, WRITE
//            writes the frame back, RECHECK reads the frame once more; if it
//            is clean the counter moves on and the readback restarts
//   double error (or a frame still bad after correction): STOP, with
//            double_err and the frame address reported
// Between sequences the ICAP is desynchronised.
//
// The configuration commands live in the ECC-protected 512 x 64 block RAM
// (entries 0..63, preloaded), with substitution flags in bits 35:32 for the
// frame address and the word count; entries 64..104 buffer one frame. A
// command word is read from the RAM one cycle before it reaches the ICAP;
// all ICAP inputs are registered. ICAP ports: icap_ce_n (active low enable),
// icap_write_n (0 = write, 1 = read), icap_i, icap_o and icap_busy (low
// while icap_o carries read data). Frame ECC ports: syndrome, syndrome_valid.
// cycle_done pulses once per complete scrub of the device (a vital signal
// for an external watchdog); corrected pulses per repaired frame; cur_far is
// the frame being checked. The
// sequence of states and the use of the RAM follow the described mechanism;
// the exact command sequences, the restart of the readback at the frame after
// a repaired one, and the handling of a failed recheck are this design's
// choices.
module scrub_ctrl
  import scrub_pkg::*;
#(
  parameter int unsigned N_TOP   = 2,
  parameter int unsigned N_ROW   = 2,
  parameter int unsigned N_MAJOR = 38,
  parameter int unsigned N_MINOR = 36
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  // ICAP
  output logic [31:0] icap_i,
  output logic        icap_ce_n,
  output logic        icap_write_n,
  input  logic [31:0] icap_o,
  input  logic        icap_busy,
  // frame ECC
  input  logic [11:0] syndrome,
  input  logic        syndrome_valid,
  // status
  output logic        running,
  output far_t        cur_far,
  output logic        cycle_done,
  output logic        corrected,
  output logic        double_err,
  output far_t        err_far,
  output logic [15:0] corr_count,
  output logic        bram_sbiterr,
  output logic        bram_dbiterr
);

  // command RAM layout
  localparam int unsigned SEQ_RB = 0;     // readback
  localparam int unsigned SEQ_DS = 16;    // desync
  localparam int unsigned SEQ_WR = 24;    // frame write
  localparam int unsigned BUF    = 64;    // frame buffer
  localparam int unsigned F_FAR  = 32, F_CNT = 33, F_END = 34;

  localparam logic [63:0] CMDS [40] = '{
    // 0: readback from FAR, word count substituted
    {32'h0, ICAP_DUMMY}, {32'h0, ICAP_SYNC}, {32'h0, ICAP_NOOP}, {32'h0, ICAP_WR_CMD},
    {32'h0, CMD_RCFG},   {32'h0, ICAP_WR_FAR}, {32'h1, 32'h0},   {32'h0, ICAP_RD_FDRO},
    {32'h2, ICAP_T2_RD}, {32'h4, ICAP_NOOP},
    64'h0, 64'h0, 64'h0, 64'h0, 64'h0, 64'h0,
    // 16: desync
    {32'h0, ICAP_WR_CMD}, {32'h0, CMD_DESYNC}, {32'h4, ICAP_NOOP},
    64'h0, 64'h0, 64'h0, 64'h0, 64'h0,
    // 24: write one frame at FAR
    {32'h0, ICAP_DUMMY}, {32'h0, ICAP_SYNC}, {32'h0, ICAP_NOOP}, {32'h0, ICAP_WR_CMD},
    {32'h0, CMD_WCFG},   {32'h0, ICAP_WR_FAR}, {32'h1, 32'h0},   {32'h0, ICAP_WR_FDRI},
    {32'h4, ICAP_T2_WR | 32'(FRAME_WORDS)},
    64'h0, 64'h0, 64'h0, 64'h0, 64'h0, 64'h0, 64'h0
  };

  typedef enum logic [3:0] {
    S_START, S_SEND, S_CHECK, S_RD_DATA, S_CORR_RD, S_CORR_WR,
    S_WR_DATA, S_STOP
  } state_e;

  // what follows a command sequence
  typedef enum logic [2:0] {
    N_CHECK, N_RD_DATA, N_WR_DATA, N_DESYNC_THEN, N_NEXT
  } after_e;

  typedef enum logic [2:0] {
    D_INIT_RB, D_READ_FRAME, D_CORRECT, D_RECHECK, D_STOP
  } then_e;

  state_e      st;
  after_e      snd_after;
  then_e       then_q;
  logic [8:0]  ptr;
  logic        snd_v;
  logic        recheck;
  logic [5:0]  wcnt;           // words moved in RD_DATA / WR_DATA
  logic        wr_v;
  logic [5:0]  err_word;
  logic [31:0] err_mask;
  logic [26:0] rd_count;

  // frame address counter
  logic        fc_clear, fc_inc, fc_last, fc_wrap;
  far_t        far;
  logic [19:0] fc_idx, fc_rem;
  logic        unused_idx;
  assign unused_idx = ^fc_idx;
  assign cur_far    = far;
  frame_addr_counter #(.N_TOP(N_TOP), .N_ROW(N_ROW), .N_MAJOR(N_MAJOR), .N_MINOR(N_MINOR)) u_fac (
    .clk, .rst_n, .clear(fc_clear), .inc(fc_inc), .far, .idx(fc_idx),
    .remaining(fc_rem), .last(fc_last), .wrap(fc_wrap)
  );

  // error-detection logic
  syn_status_e syn_st;
  logic [5:0]  syn_word;
  logic [31:0] syn_mask;
  scrub_err_locate u_loc (.syndrome, .status(syn_st), .word(syn_word), .mask(syn_mask));

  // block RAM with ECC
  logic        ram_we;
  logic [8:0]  ram_waddr, ram_raddr;
  logic [63:0] ram_wdata, ram_q;
  ecc_bram #(.DEPTH(512), .INIT_WORDS(40), .INIT(CMDS)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .raddr(ram_raddr), .rdata(ram_q), .sbiterr(bram_sbiterr), .dbiterr(bram_dbiterr)
  );

  assign running = (st != S_START) && (st != S_STOP);

  // RAM address and write port
  always_comb begin
    ram_raddr = ptr;
    ram_we    = 1'b0;
    ram_waddr = 9'(BUF) + 9'(wcnt);
    ram_wdata = {32'h0, icap_o};
    unique case (st)
      S_RD_DATA: ram_we = !icap_busy;
      S_CORR_RD: ram_raddr = 9'(BUF) + 9'(err_word);
      S_CORR_WR: begin
        ram_we    = 1'b1;
        ram_waddr = 9'(BUF) + 9'(err_word);
        ram_wdata = {32'h0, ram_q[31:0] ^ err_mask};
      end
      S_WR_DATA: ram_raddr = 9'(BUF) + 9'(wcnt);
      default: ;
    endcase
  end

  assign fc_inc   = (st == S_CHECK) && syndrome_valid && (syn_st == SYN_NONE);
  assign fc_clear = (st == S_START);

  // substitute the frame address or the word count into a command word
  function automatic logic [31:0] subst(input logic [63:0] q, input far_t a, input logic [26:0] n);
    if (q[F_FAR]) return 32'(a);
    if (q[F_CNT]) return q[31:0] | 32'(n);
    return q[31:0];
  endfunction

  task automatic start_seq(input logic [8:0] base, input after_e after);
    ptr       <= 9'(base);
    snd_v     <= 1'b0;
    snd_after <= after;
    st        <= S_SEND;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_START;
      snd_after    <= N_CHECK;
      then_q       <= D_INIT_RB;
      ptr          <= '0;
      snd_v        <= 1'b0;
      recheck      <= 1'b0;
      wcnt         <= '0;
      wr_v         <= 1'b0;
      err_word     <= '0;
      err_mask     <= '0;
      rd_count     <= '0;
      icap_i       <= '0;
      icap_ce_n    <= 1'b1;
      icap_write_n <= 1'b1;
      cycle_done   <= 1'b0;
      corrected    <= 1'b0;
      double_err   <= 1'b0;
      err_far      <= '0;
      corr_count   <= '0;
    end else begin
      icap_ce_n    <= 1'b1;
      icap_write_n <= 1'b1;
      cycle_done   <= fc_wrap;
      corrected    <= 1'b0;
      unique case (st)
        S_START: if (enable) begin
          recheck  <= 1'b0;
          rd_count <= 27'(FRAME_WORDS * N_TOP * N_ROW * N_MAJOR * N_MINOR);
          start_seq(9'(SEQ_RB), N_CHECK);                     // Initiate readback
        end

        S_SEND: begin
          ptr   <= ptr + 9'd1;
          snd_v <= 1'b1;
          if (snd_v) begin
            icap_i       <= subst(ram_q, far, rd_count);
            icap_ce_n    <= 1'b0;
            icap_write_n <= 1'b0;
            if (ram_q[F_END]) begin
              snd_v <= 1'b0;
              wcnt  <= '0;
              wr_v  <= 1'b0;
              unique case (snd_after)
                N_CHECK:   st <= S_CHECK;
                N_RD_DATA: st <= S_RD_DATA;
                N_WR_DATA: begin st <= S_WR_DATA; ptr <= 9'(BUF); end
                default: begin                               // end of a desync
                  unique case (then_q)
                    D_INIT_RB: begin
                      recheck  <= 1'b0;
                      rd_count <= 27'({fc_rem, 5'd0}) + 27'({fc_rem, 3'd0}) + 27'(fc_rem);
                      start_seq(9'(SEQ_RB), N_CHECK);
                    end
                    D_READ_FRAME: begin
                      rd_count <= 27'(FRAME_WORDS);
                      start_seq(9'(SEQ_RB), N_RD_DATA);
                    end
                    D_CORRECT: st <= S_CORR_RD;
                    D_RECHECK: begin
                      recheck  <= 1'b1;
                      rd_count <= 27'(FRAME_WORDS);
                      start_seq(9'(SEQ_RB), N_CHECK);
                    end
                    default: st <= S_STOP;
                  endcase
                end
              endcase
            end
          end
        end

        S_CHECK: begin
          icap_ce_n    <= 1'b0;                              // keep reading
          icap_write_n <= 1'b1;
          if (syndrome_valid) begin
            unique case (syn_st)
              SYN_NONE: begin
                if (recheck || fc_last) begin
                  if (recheck) corrected <= 1'b1;
                  if (recheck) corr_count <= corr_count + 16'd1;
                  then_q       <= D_INIT_RB;
                  icap_ce_n    <= 1'b1;
                  start_seq(9'(SEQ_DS), N_DESYNC_THEN);
                end
              end
              SYN_SINGLE: begin
                icap_ce_n <= 1'b1;                           // stop the readback
                if (recheck) begin
                  then_q  <= D_STOP;
                  err_far <= far;
                  double_err <= 1'b1;
                end else begin
                  then_q   <= D_READ_FRAME;
                  err_word <= syn_word;
                  err_mask <= syn_mask;
                end
                start_seq(9'(SEQ_DS), N_DESYNC_THEN);
              end
              default: begin
                icap_ce_n  <= 1'b1;
                then_q     <= D_STOP;
                err_far    <= far;
                double_err <= 1'b1;
                start_seq(9'(SEQ_DS), N_DESYNC_THEN);
              end
            endcase
          end
        end

        S_RD_DATA: begin                                     // Read frame
          icap_ce_n    <= 1'b0;
          icap_write_n <= 1'b1;
          if (!icap_busy) begin
            wcnt <= wcnt + 6'd1;
            if (wcnt == 6'(FRAME_WORDS - 1)) begin
              icap_ce_n <= 1'b1;
              then_q    <= D_CORRECT;
              start_seq(9'(SEQ_DS), N_DESYNC_THEN);
            end
          end
        end

        S_CORR_RD: st <= S_CORR_WR;                          // Correct frame
        S_CORR_WR: start_seq(9'(SEQ_WR), N_WR_DATA);

        S_WR_DATA: begin
          wr_v <= 1'b1;
          if (wr_v) begin
            icap_i       <= ram_q[31:0];
            icap_ce_n    <= 1'b0;
            icap_write_n <= 1'b0;
          end
          if (wcnt != 6'(FRAME_WORDS)) wcnt <= wcnt + 6'd1;
          if (wr_v && wcnt == 6'(FRAME_WORDS)) begin
            then_q <= D_RECHECK;
            start_seq(9'(SEQ_DS), N_DESYNC_THEN);
          end
        end

        S_STOP: ;

        default: st <= S_START;
      endcase
    end
  end

endmodule
