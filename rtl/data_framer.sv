// data_framer: builds the stream of 32-bit output words.
// Word formats (2-bit packet header, then 30 bits):
//   data    01 Region[2:0] Channel[2:0] Le[11:0] Te[11:0]
//   header  00 11 ChipId[6:0] Reserved[12:0]=0 FrameN[7:0]
//   trailer 11 00 DataCnt[11:0] CRC[15:0]
//   sync    10 01 1001 0110 0110 1001 1001 0110 0110
// The word on `word` is always valid and is consumed when `take` is high. Priority:
// a pending trailer, then a pending header, then a hit from the global FIFO, and a
// sync word when there is nothing else. At every frame start (time stamp wrap) the
// trailer of the ending frame, carrying its data word count and the CRC of its data
// words, and the header of the new frame are queued. A header for frame 0 is queued
// after reset. The word formats follow the specification; the frame boundaries, the
// CRC (CRC-16-CCITT, initial value FFFF, over the 32-bit data words, MSB first) and
// this priority order are this design's choices.
module data_framer
  import toast_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,
  input  logic [6:0]         chip_id,
  input  logic [FRAME_W-1:0] frame_n,
  input  logic               frame_start,
  input  logic               ev_valid,
  output logic               ev_ready,
  input  chip_event_t        ev_data,
  output logic [31:0]        word,
  input  logic               take,
  output logic [1:0]         word_type     // packet header of `word`
);
  logic        hdr_pend, trl_pend;
  logic [11:0] cnt, trl_cnt;
  logic [15:0] crc, trl_crc;
  logic [11:0] cnt_n;
  logic [15:0] crc_n;
  logic [31:0] data_word;

  assign data_word = {PKT_DATA, ev_data};

  always_comb begin
    if (trl_pend)      word = {PKT_TRAILER, 2'b00, trl_cnt, trl_crc};
    else if (hdr_pend) word = {PKT_HEADER, 2'b11, chip_id, 13'd0, frame_n};
    else if (ev_valid) word = data_word;
    else               word = SYNC_WORD;
  end
  assign word_type = word[31:30];
  assign ev_ready  = take && !trl_pend && !hdr_pend && ev_valid;

  // count and CRC of the current frame, including a data word taken this cycle
  always_comb begin
    cnt_n = cnt;
    crc_n = crc;
    if (ev_ready) begin
      cnt_n = cnt + 12'd1;
      crc_n = crc16_word(crc, data_word);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr_pend <= 1'b1;
      trl_pend <= 1'b0;
      cnt      <= '0;
      crc      <= 16'hFFFF;
      trl_cnt  <= '0;
      trl_crc  <= '0;
    end else if (clr) begin
      hdr_pend <= 1'b1;
      trl_pend <= 1'b0;
      cnt      <= '0;
      crc      <= 16'hFFFF;
    end else if (frame_start) begin
      trl_pend <= 1'b1;
      hdr_pend <= 1'b1;
      trl_cnt  <= cnt_n;
      trl_crc  <= crc_n;
      cnt      <= '0;
      crc      <= 16'hFFFF;
    end else begin
      cnt <= cnt_n;
      crc <= crc_n;
      if (take) begin
        if (trl_pend)      trl_pend <= 1'b0;
        else if (hdr_pend) hdr_pend <= 1'b0;
      end
    end
  end
endmodule
