// time_stamp_counter: the chip's time base.
// A 12-bit counter runs at the master clock (160 MHz, 6.25 ns per count) while
// GCR0 bit 0 enables it; its value is distributed to all channels as the time stamp,
// in binary or, when GCR0 bit 1 is set, Gray coded. An 8-bit frame counter counts
// wraps of the time stamp counter and supplies FrameN of the header words; GCR0
// bit 6 holds it at zero. ts_rst (from the reset manager) clears the time stamp;
// global_rst clears both. frame_start pulses in the cycle the time stamp wraps.
// Widths and control bits follow the specification; the frame length (one time
// stamp period, 4096 clocks) is this design's assumption.
module time_stamp_counter
  import toast_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               global_rst,
  input  logic               ts_rst,
  input  logic               ts_en,        // GCR0[0]
  input  logic               gray_mode,    // GCR0[1]
  input  logic               frame_rst,    // GCR0[6]
  output logic [TS_W-1:0]    ts,           // time stamp bus to the channels
  output logic [FRAME_W-1:0] frame_n,
  output logic               frame_start   // one cycle, when ts wraps to 0
);
  logic [TS_W-1:0] cnt;
  logic            wrap;
  assign wrap = ts_en && (cnt == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      frame_n     <= '0;
      frame_start <= 1'b0;
    end else begin
      frame_start <= wrap && !(global_rst || ts_rst);
      if (global_rst || ts_rst) cnt <= '0;
      else if (ts_en)           cnt <= cnt + 1'b1;
      if (global_rst || frame_rst) frame_n <= '0;
      else if (wrap && !ts_rst)    frame_n <= frame_n + 1'b1;
    end
  end

  assign ts = gray_mode ? (cnt ^ (cnt >> 1)) : cnt;
endmodule
