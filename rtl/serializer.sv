// serializer: one 160 Mb/s data output link, one bit per master clock, MSB first.
// A 32-bit shift register sends the current word while a one-word holding register
// is refilled from the framer: `req` is high while the holding register is empty and
// the link is enabled, and `load` (granted by the link arbiter) writes `word` into it.
// At the end of each word the holding register moves into the shift register; if it
// is empty a sync word is sent instead, so the link never stalls. A disabled link
// (GCR0 bit 4 or 5 low) drives 0; once enabled it starts with a sync word. `word_end` pulses in the cycle the last bit of a
// word is on the line. The 1-bit-per-clock rate follows from the 160 MHz clock and
// 160 Mb/s links; the holding-register scheme is this design's choice.
module serializer
  import toast_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  output logic        req,
  input  logic        load,
  input  logic [31:0] word,
  output logic        tx,
  output logic        word_end
);
  logic [31:0] shreg, hold;
  logic        hold_full;
  logic [4:0]  bitcnt;

  assign req      = enable && !hold_full;
  assign tx       = enable && shreg[31];
  assign word_end = enable && (bitcnt == 5'd31);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= SYNC_WORD;
      hold      <= '0;
      hold_full <= 1'b0;
      bitcnt    <= '0;
    end else if (!enable) begin
      shreg  <= SYNC_WORD;       // a link starts with a sync word
      bitcnt <= '0;
    end else begin
      bitcnt <= bitcnt + 5'd1;
      if (bitcnt == 5'd31) begin
        shreg <= hold_full ? hold : SYNC_WORD;
        if (load) hold <= word;
        hold_full <= load;
      end else begin
        shreg <= {shreg[30:0], 1'b0};
        if (load) begin
          hold      <= word;
          hold_full <= 1'b1;
        end
      end
    end
  end

  a_load_when_req: assert property (@(posedge clk) disable iff (!rst_n) load |-> req);
endmodule
