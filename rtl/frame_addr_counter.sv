// frame_addr_counter: frame address counter of the scrubber.
//
// Separate counters for the minor address, major (column) address, row and
// top/bottom bit form the 32-bit frame address (Virtex-5 FAR layout, block
// type 0, which holds the interconnect and logic configuration; block RAM
// content frames are not scrubbed). inc advances to the next frame, minor
// fastest, then major, row and top/bottom; after the last frame all counters
// return to the first frame and wrap pulses. clear returns to the first frame.
// idx is the linear number of the current frame (0 .. FRAMES-1) and
// remaining the number of frames from the current one to the end, used for
// the readback word count. The device geometry is a set of parameters; real
// devices have column-dependent minor counts, which this uniform geometry
// does not model. Defaults (2 x 2 x 38 x 36 = 5472 frames) approximate an
// XC5VLX30, whose full readback is 226115 cycles = 5515 frames of 41 words.
module frame_addr_counter
  import scrub_pkg::*;
#(
  parameter int unsigned N_TOP   = 2,
  parameter int unsigned N_ROW   = 2,
  parameter int unsigned N_MAJOR = 38,
  parameter int unsigned N_MINOR = 36
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        inc,
  output far_t        far,
  output logic [19:0] idx,
  output logic [19:0] remaining,
  output logic        last,
  output logic        wrap
);

  localparam int unsigned FRAMES = N_TOP * N_ROW * N_MAJOR * N_MINOR;

  logic       top;
  logic [4:0] row;
  logic [7:0] major;
  logic [6:0] minor;

  assign far       = '{rsvd: '0, btype: 3'd0, top: top, row: row, major: major, minor: minor};
  assign last      = (idx == 20'(FRAMES - 1));
  assign remaining = 20'(FRAMES) - idx;
  assign wrap      = inc && last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {top, row, major, minor} <= '0;
      idx <= '0;
    end else if (clear || (inc && last)) begin
      {top, row, major, minor} <= '0;
      idx <= '0;
    end else if (inc) begin
      idx <= idx + 20'd1;
      if (minor != 7'(N_MINOR - 1)) begin
        minor <= minor + 7'd1;
      end else begin
        minor <= '0;
        if (major != 8'(N_MAJOR - 1)) begin
          major <= major + 8'd1;
        end else begin
          major <= '0;
          if (row != 5'(N_ROW - 1)) begin
            row <= row + 5'd1;
          end else begin
            row <= '0;
            top <= ~top;
          end
        end
      end
    end
  end

  initial begin
    assert (N_TOP >= 1 && N_TOP <= 2 && N_ROW <= 32 && N_MAJOR <= 256 && N_MINOR <= 128)
      else $error("frame geometry does not fit the frame address fields");
  end

endmodule
