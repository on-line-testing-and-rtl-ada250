// scrub_tmr: the scrubber in triple modular redundancy.
//
// Three copies of the control logic, each with its own ECC block RAM, run in
// lock-step, each on its own clock input (the three clocks are meant to be
// separate but synchronous, the same frequency and phase). A majority voter
// sits in front of the single ICAP: the 34 ICAP input bits (data, enable,
// read/write) of the three copies are voted. The ICAP read data and busy and
// the frame ECC syndrome are fed back to all three copies. A single upset in
// one copy is therefore outvoted and the scrubbing goes on. The status
// outputs (the vital signals for an external watchdog) are voted in the same
// way; voting them, and the copy_disagree flag, are this design's additions
// to the voter at the ICAP inputs. Ports and timing otherwise as in
// scrub_ctrl.
module scrub_tmr
  import scrub_pkg::*;
#(
  parameter int unsigned N_TOP   = 2,
  parameter int unsigned N_ROW   = 2,
  parameter int unsigned N_MAJOR = 38,
  parameter int unsigned N_MINOR = 36
) (
  input  logic [2:0]  clk,
  input  logic [2:0]  rst_n,
  input  logic        enable,
  output logic [31:0] icap_i,
  output logic        icap_ce_n,
  output logic        icap_write_n,
  input  logic [31:0] icap_o,
  input  logic        icap_busy,
  input  logic [11:0] syndrome,
  input  logic        syndrome_valid,
  output logic        running,
  output far_t        cur_far,
  output logic        cycle_done,
  output logic        corrected,
  output logic        double_err,
  output far_t        err_far,
  output logic [15:0] corr_count,
  output logic        bram_sbiterr,
  output logic        bram_dbiterr,
  output logic        copy_disagree
);

  typedef struct packed {
    logic [31:0] i;
    logic        ce_n;
    logic        write_n;
  } icap_in_t;

  typedef struct packed {
    logic        running;
    far_t        cur_far;
    logic        cycle_done;
    logic        corrected;
    logic        double_err;
    far_t        err_far;
    logic [15:0] corr_count;
    logic        sbiterr;
    logic        dbiterr;
  } status_t;

  icap_in_t icap_c [3];
  status_t  stat_c [3];
  icap_in_t icap_v;
  status_t  stat_v;
  logic     dis_icap, dis_stat;

  for (genvar k = 0; k < 3; k++) begin : g_copy
    scrub_ctrl #(.N_TOP(N_TOP), .N_ROW(N_ROW), .N_MAJOR(N_MAJOR), .N_MINOR(N_MINOR)) u_ctrl (
      .clk(clk[k]), .rst_n(rst_n[k]), .enable,
      .icap_i(icap_c[k].i), .icap_ce_n(icap_c[k].ce_n), .icap_write_n(icap_c[k].write_n),
      .icap_o, .icap_busy, .syndrome, .syndrome_valid,
      .running(stat_c[k].running), .cur_far(stat_c[k].cur_far),
      .cycle_done(stat_c[k].cycle_done), .corrected(stat_c[k].corrected),
      .double_err(stat_c[k].double_err), .err_far(stat_c[k].err_far),
      .corr_count(stat_c[k].corr_count),
      .bram_sbiterr(stat_c[k].sbiterr), .bram_dbiterr(stat_c[k].dbiterr)
    );
  end

  tmr_voter #(.W($bits(icap_in_t))) u_vote_icap (
    .a(icap_c[0]), .b(icap_c[1]), .c(icap_c[2]), .y(icap_v), .disagree(dis_icap)
  );
  tmr_voter #(.W($bits(status_t))) u_vote_stat (
    .a(stat_c[0]), .b(stat_c[1]), .c(stat_c[2]), .y(stat_v), .disagree(dis_stat)
  );

  assign icap_i        = icap_v.i;
  assign icap_ce_n     = icap_v.ce_n;
  assign icap_write_n  = icap_v.write_n;
  assign running       = stat_v.running;
  assign cur_far       = stat_v.cur_far;
  assign cycle_done    = stat_v.cycle_done;
  assign corrected     = stat_v.corrected;
  assign double_err    = stat_v.double_err;
  assign err_far       = stat_v.err_far;
  assign corr_count    = stat_v.corr_count;
  assign bram_sbiterr  = stat_v.sbiterr;
  assign bram_dbiterr  = stat_v.dbiterr;
  assign copy_disagree = dis_icap || dis_stat;

endmodule
