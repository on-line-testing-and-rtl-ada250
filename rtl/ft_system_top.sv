// ft_system_top: the two fault-tolerance designs side by side.
//
// Left: the compact 32-bit AES-128 core with on-line parity error detection,
// wrapped by its BIST (aes_bist). The user drives the core through the aes_*
// ports; bist_start runs the self-test. Right: the self-recovery system in
// its most reliable form, the configuration scrubber in TMR (scrub_tmr)
// watched by a watchdog timer (watchdog_timer) that requests a full
// reconfiguration from the golden image when the scrubber stops completing
// scrub cycles or reports a double error. The ICAP and frame ECC primitives
// are part of the FPGA itself, so their ports are brought out here: icap_*
// and syndrome*. reconfig is the request to the external reload circuit. In
// the described architecture the watchdog is external to the FPGA; here it is
// instantiated beside the scrubber so that the whole recovery loop is in one
// place. All parts run on clk; the three TMR copies get the same clock and
// reset. The two designs share nothing but the clock and reset.
module ft_system_top
  import aes_pkg::*;
  import scrub_pkg::*;
#(
  parameter int unsigned BIST_ITER  = 100,
  parameter int unsigned N_TOP      = 2,
  parameter int unsigned N_ROW      = 2,
  parameter int unsigned N_MAJOR    = 38,
  parameter int unsigned N_MINOR    = 36,
  parameter int unsigned WD_TIMEOUT = 262144
) (
  input  logic         clk,
  input  logic         rst_n,
  // AES core, user side
  input  logic         aes_start,
  input  aes_mode_e    aes_mode,
  input  logic [31:0]  aes_din,
  output logic         aes_busy,
  output logic         aes_din_req,
  output logic [31:0]  aes_dout,
  output logic         aes_dout_valid,
  output logic         aes_done,
  output logic         aes_error,
  input  logic         aes_err_clr,
  // AES self-test
  input  logic         bist_start,
  output logic         bist_busy,
  output logic         bist_pass,
  output logic         bist_fail,
  output logic [15:0]  bist_iter,
  output logic [127:0] bist_signature,
  // scrubber
  input  logic         scrub_enable,
  output logic [31:0]  icap_i,
  output logic         icap_ce_n,
  output logic         icap_write_n,
  input  logic [31:0]  icap_o,
  input  logic         icap_busy,
  input  logic [11:0]  syndrome,
  input  logic         syndrome_valid,
  output logic         scrub_running,
  output far_t         scrub_far,
  output logic         scrub_cycle_done,
  output logic         scrub_corrected,
  output logic         scrub_double_err,
  output far_t         scrub_err_far,
  output logic [15:0]  scrub_corr_count,
  output logic         scrub_bram_sbiterr,
  output logic         scrub_bram_dbiterr,
  output logic         scrub_copy_disagree,
  // watchdog
  output logic         reconfig,
  output logic [15:0]  reconfig_count,
  output logic [15:0]  wd_timeouts
);

  aes_bist #(.MAX_ITER(BIST_ITER)) u_aes (
    .clk, .rst_n,
    .start(aes_start), .mode(aes_mode), .din(aes_din),
    .busy(aes_busy), .din_req(aes_din_req), .dout(aes_dout),
    .dout_valid(aes_dout_valid), .done(aes_done), .error(aes_error),
    .err_clr(aes_err_clr),
    .bist_start, .bist_busy, .bist_pass, .bist_fail, .bist_iter,
    .signature(bist_signature)
  );

  scrub_tmr #(.N_TOP(N_TOP), .N_ROW(N_ROW), .N_MAJOR(N_MAJOR), .N_MINOR(N_MINOR)) u_scrub (
    .clk({3{clk}}), .rst_n({3{rst_n}}), .enable(scrub_enable),
    .icap_i, .icap_ce_n, .icap_write_n, .icap_o, .icap_busy,
    .syndrome, .syndrome_valid,
    .running(scrub_running), .cur_far(scrub_far), .cycle_done(scrub_cycle_done),
    .corrected(scrub_corrected), .double_err(scrub_double_err), .err_far(scrub_err_far),
    .corr_count(scrub_corr_count), .bram_sbiterr(scrub_bram_sbiterr),
    .bram_dbiterr(scrub_bram_dbiterr), .copy_disagree(scrub_copy_disagree)
  );

  watchdog_timer #(.TIMEOUT(WD_TIMEOUT)) u_wd (
    .clk, .rst_n, .enable(scrub_enable), .kick(scrub_cycle_done),
    .double_err(scrub_double_err), .reconfig, .reconfig_count, .timeouts(wd_timeouts)
  );

endmodule
