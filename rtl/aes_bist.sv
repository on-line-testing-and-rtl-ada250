// aes_bist: built-in self-test around the 32-bit AES core with parity checking.
//
// The BIST needs no pattern generator and no response analyser. It runs the
// core in a loop of six processes, key expansion, encryption, key expansion,
// decryption, key expansion, decryption, and feeds each output back as the
// next input, so the AES itself produces pseudo-random patterns; the core's
// own parity checkers judge the result. The first input is all zero. A
// four-word FIFO (a 4-stage shift register) holds the block between
// processes. MUX1 picks the zero block (Init) or the FIFO head as core input;
// MUX2 picks the core output or, during key expansion, which produces no
// output, the FIFO head itself, so the FIFO keeps its block and hands it on
// as data to the next encryption or decryption. The test stops at the first
// parity error (bist_fail) or after MAX_ITER iterations (bist_pass).
//
// Interface: when no test runs, the core is driven directly from the user
// ports (start, mode, din) and its outputs appear on the user outputs. A
// one-cycle bist_start pulse clears the FIFO and starts the test; bist_busy
// stays high until bist_pass or bist_fail. bist_iter counts completed
// iterations and signature shows the FIFO contents (word 0 in bits 127:96).
// Each process costs its core cycles plus one start cycle, so an iteration
// takes 3*133 + 3*45 = 534 cycles. Process order, the feedback loop, the
// zero first input, the FIFO and the two muxes follow the described BIST; the
// user-port multiplexing, the FIFO clear and the cycle schedule are this
// implementation's choices. MAX_ITER = 100 follows the number of iterations
// over which fault coverage is reported.
module aes_bist
  import aes_pkg::*;
#(
  parameter int unsigned MAX_ITER = 100
) (
  input  logic         clk,
  input  logic         rst_n,
  // user side of the core
  input  logic         start,
  input  aes_mode_e    mode,
  input  logic [31:0]  din,
  output logic         busy,
  output logic         din_req,
  output logic [31:0]  dout,
  output logic         dout_valid,
  output logic         done,
  output logic         error,
  input  logic         err_clr,
  // self-test
  input  logic         bist_start,
  output logic         bist_busy,
  output logic         bist_pass,
  output logic         bist_fail,
  output logic [15:0]  bist_iter,
  output logic [127:0] signature
);

  typedef enum logic [1:0] {B_IDLE, B_LAUNCH, B_RUN} bstate_e;

  bstate_e     st;
  logic [2:0]  proc;        // 0..5 within an iteration
  logic        init;        // first process of the first iteration
  logic [31:0] fifo [4];    // fifo[3] is the head
  aes_mode_e   proc_mode, core_mode;
  logic        core_start, core_busy, core_din_req, core_dout_valid, core_done, core_err;
  logic [31:0] core_din, core_dout, mux2;
  logic        key_proc;

  always_comb begin
    unique case (proc)
      3'd1:                proc_mode = MODE_ENC;
      3'd3, 3'd5:          proc_mode = MODE_DEC;
      default:             proc_mode = MODE_KEY;
    endcase
  end
  assign key_proc  = (proc_mode == MODE_KEY);

  // MUX1: zero block on Init, else the FIFO head; user data when no test runs
  assign core_din   = bist_busy ? (init ? 32'h0 : fifo[3]) : din;
  assign core_mode  = bist_busy ? proc_mode : mode;
  assign core_start = bist_busy ? (st == B_LAUNCH) : start;
  // MUX2: FIFO recirculates during key expansion, else takes the core output
  assign mux2       = key_proc ? fifo[3] : core_dout;

  aes32_oed u_core (
    .clk, .rst_n,
    .start(core_start), .mode(core_mode), .din(core_din),
    .busy(core_busy), .din_req(core_din_req),
    .dout(core_dout), .dout_valid(core_dout_valid), .done(core_done),
    .err_now(core_err), .err_clr, .error
  );

  assign busy       = core_busy;
  assign din_req    = core_din_req && !bist_busy;
  assign dout       = core_dout;
  assign dout_valid = core_dout_valid && !bist_busy;
  assign done       = core_done && !bist_busy;
  assign bist_busy  = (st != B_IDLE);
  assign signature  = {fifo[3], fifo[2], fifo[1], fifo[0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= B_IDLE;
      proc      <= '0;
      init      <= 1'b0;
      bist_pass <= 1'b0;
      bist_fail <= 1'b0;
      bist_iter <= '0;
      for (int i = 0; i < 4; i++) fifo[i] <= '0;
    end else begin
      unique case (st)
        B_IDLE: if (bist_start && !core_busy) begin
          st        <= B_LAUNCH;
          proc      <= '0;
          init      <= 1'b1;
          bist_pass <= 1'b0;
          bist_fail <= 1'b0;
          bist_iter <= '0;
          for (int i = 0; i < 4; i++) fifo[i] <= '0;
        end
        B_LAUNCH: st <= B_RUN;
        B_RUN: begin
          if (core_err) begin
            bist_fail <= 1'b1;
            st        <= B_IDLE;
          end else if (core_done) begin
            init <= 1'b0;
            if (proc == 3'd5) begin
              proc      <= '0;
              bist_iter <= bist_iter + 16'd1;
              if (32'(bist_iter) + 1 >= MAX_ITER) begin
                bist_pass <= 1'b1;
                st        <= B_IDLE;
              end else begin
                st <= B_LAUNCH;
              end
            end else begin
              proc <= proc + 3'd1;
              st   <= B_LAUNCH;
            end
          end
        end
        default: st <= B_IDLE;
      endcase
      // FIFO shift: one word per loaded input word, and per output word
      if (st == B_RUN && (core_din_req || core_dout_valid)) begin
        fifo[3] <= fifo[2];
        fifo[2] <= fifo[1];
        fifo[1] <= fifo[0];
        fifo[0] <= mux2;
      end
    end
  end

endmodule
