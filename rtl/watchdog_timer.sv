// watchdog_timer: watchdog for the self-recovery architectures.
//
// The timer watches a vital signal of the error-recovery mechanism: kick, a
// pulse the scrubber gives each time it completes a scrub of the whole
// device. If no kick arrives within TIMEOUT cycles, or the scrubber reports an
// uncorrectable double error, the watchdog raises reconfig for one cycle to
// have the device reloaded from the golden configuration in external
// non-volatile memory, and starts counting again. It only counts while
// enable is high. reconfig_count counts the requests, timeouts only those
// caused by a missing kick. The document gives the function; the counter,
// the one-cycle request and the default TIMEOUT (2^18 cycles, longer than one
// scrub cycle of the default 5472-frame device, 224369 cycles) are this
// design's choices.
module watchdog_timer #(
  parameter int unsigned TIMEOUT = 262144
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        kick,
  input  logic        double_err,
  output logic        reconfig,
  output logic [15:0] reconfig_count,
  output logic [15:0] timeouts
);

  localparam int unsigned CW = $clog2(TIMEOUT + 1);

  logic [CW-1:0] cnt;
  logic          dbl_q;
  logic          expire, dbl_rise;

  assign expire   = enable && !kick && (cnt == CW'(TIMEOUT - 1));
  assign dbl_rise = enable && double_err && !dbl_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt            <= '0;
      dbl_q          <= 1'b0;
      reconfig       <= 1'b0;
      reconfig_count <= '0;
      timeouts       <= '0;
    end else begin
      dbl_q    <= double_err;
      reconfig <= expire || dbl_rise;
      if (expire || dbl_rise) reconfig_count <= reconfig_count + 16'd1;
      if (expire)             timeouts       <= timeouts + 16'd1;
      if (!enable || kick || expire || dbl_rise) cnt <= '0;
      else                                       cnt <= cnt + CW'(1);
    end
  end

endmodule
