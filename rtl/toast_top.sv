// toast_top: digital back end of the ToASt 64-channel strip readout chip.
// Sixty-four front-end channels deliver two discriminator outputs each (time and
// energy threshold). They are grouped into 8 regions of 8 channels; each region
// measures leading and trailing edge time stamps with the double threshold logic and
// buffers hits in a local FIFO. The global readout unit gathers the regions into a
// 64-cell FIFO, the framer turns hits into 32-bit words framed by header, trailer and
// sync words, and one or two 160 Mb/s serial links (GCR0 bits 4 and 5) send them
// out; with both links enabled consecutive words go to whichever link asks first,
// link 0 winning ties. A 16-bit command link at 80 Mb/s writes and reads the 14 global
// and 128 channel control registers. The reset manager decodes the pulse length of
// SyncReset into time stamp and global resets. The analog front end is not part of
// this RTL: its discriminator outputs are inputs here, and the register fields that
// control it (polarity, test pulse, per-channel DACs and enables, bias DACs) are
// outputs. All logic runs on the 160 MHz master clock.
module toast_top
  import toast_pkg::*;
#(
  parameter int unsigned REGION_FIFO_DEPTH = 8,
  parameter int unsigned GLOBAL_FIFO_DEPTH = 64
) (
  input  logic              clk,            // 160 MHz master clock
  input  logic              pon_rst_n,      // asynchronous power-on reset, active low
  input  logic              sync_reset,     // pulse-length-encoded synchronous reset
  input  logic [6:0]        chip_addr,
  input  logic              test_pulse,     // digital test pulse
  input  logic              cfg_rx,
  output logic              cfg_tx,
  output logic              tx_out_0,
  output logic              tx_out_1,
  // analog front-end boundary
  input  logic [63:0]       hit_t,          // time threshold discriminators (HC1, delayed)
  input  logic [63:0]       hit_e,          // energy threshold discriminators (HC2)
  output logic              fe_polarity,    // GCR0[10]: 0 n-type, 1 p-type strips
  output logic              fe_test_pulse,  // test pulse to the injection circuit
  output logic [REG_W-1:0]  fe_ccr [128],   // channel registers, index 2*channel+reg
  output logic [REG_W-1:0]  fe_gcr [N_GCR]  // global registers (GCR2-13 are bias DACs)
);
  // ---------------- resets and time base ----------------
  logic rst_n, global_rst, ts_rst;
  reset_manager u_rst (
    .clk(clk), .pon_rst_n(pon_rst_n), .sync_reset(sync_reset),
    .rst_n(rst_n), .global_rst(global_rst), .ts_rst(ts_rst));

  logic [REG_W-1:0] gcr [N_GCR];
  logic [TS_W-1:0]  ts;
  logic [FRAME_W-1:0] frame_n;
  logic             frame_start;
  time_stamp_counter u_ts (
    .clk(clk), .rst_n(rst_n), .global_rst(global_rst), .ts_rst(ts_rst),
    .ts_en(gcr[0][GCR0_TS_EN]), .gray_mode(gcr[0][GCR0_TS_GRAY]),
    .frame_rst(gcr[0][GCR0_FRAME_RST]),
    .ts(ts), .frame_n(frame_n), .frame_start(frame_start));

  // ---------------- configuration ----------------
  logic             ccr_we;
  logic [2:0]       ccr_region;
  logic [3:0]       ccr_addr;
  logic [REG_W-1:0] ccr_wdata;
  logic [REG_W-1:0] ccr_rdata [8];
  logic             cmd_valid, selected;
  config_unit u_cfg (
    .clk(clk), .rst_n(rst_n), .chip_addr(chip_addr), .cfg_rx(cfg_rx), .cfg_tx(cfg_tx),
    .gcr(gcr), .ccr_we(ccr_we), .ccr_region(ccr_region), .ccr_addr(ccr_addr),
    .ccr_wdata(ccr_wdata), .ccr_rdata(ccr_rdata), .cmd_valid(cmd_valid),
    .selected(selected));

  // ---------------- regions ----------------
  logic          reg_valid [8];
  logic          reg_ready [8];
  region_event_t reg_data  [8];
  logic [7:0]    lost_hit  [8];
  for (genvar r = 0; r < 8; r++) begin : g_region
    logic [REG_W-1:0] ccr [16];
    region_readout #(.FIFO_DEPTH(REGION_FIFO_DEPTH)) u_region (
      .clk(clk), .rst_n(rst_n), .clr(global_rst),
      .disable_region(gcr[1][r]),
      .single_th(gcr[0][GCR0_SINGLE_TH]), .le_only(gcr[0][GCR0_LE_ONLY]),
      .ts(ts), .hit_t(hit_t[8*r +: 8]), .hit_e(hit_e[8*r +: 8]),
      .ccr_we(ccr_we && ccr_region == 3'(r)), .ccr_addr(ccr_addr),
      .ccr_wdata(ccr_wdata), .ccr_rdata(ccr_rdata[r]), .ccr(ccr),
      .out_valid(reg_valid[r]), .out_ready(reg_ready[r]), .out_data(reg_data[r]),
      .lost_hit(lost_hit[r]));
    for (genvar k = 0; k < 16; k++) begin : g_ccr_out
      assign fe_ccr[16*r + k] = ccr[k];
    end
  end

  // ---------------- global readout and framing ----------------
  logic        ev_valid, ev_ready;
  chip_event_t ev_data;
  logic [$clog2(GLOBAL_FIFO_DEPTH):0] g_level;
  global_readout #(.FIFO_DEPTH(GLOBAL_FIFO_DEPTH)) u_gro (
    .clk(clk), .rst_n(rst_n), .clr(global_rst),
    .reg_valid(reg_valid), .reg_ready(reg_ready), .reg_data(reg_data),
    .out_valid(ev_valid), .out_ready(ev_ready), .out_data(ev_data), .level(g_level));

  logic [31:0] word;
  logic [1:0]  word_type;
  logic        take;
  data_framer u_framer (
    .clk(clk), .rst_n(rst_n), .clr(global_rst), .chip_id(chip_addr),
    .frame_n(frame_n), .frame_start(frame_start),
    .ev_valid(ev_valid), .ev_ready(ev_ready), .ev_data(ev_data),
    .word(word), .take(take), .word_type(word_type));

  // ---------------- output links ----------------
  logic req0, req1, load0, load1, wend0, wend1;
  assign load0 = req0;
  assign load1 = req1 && !req0;
  assign take  = load0 || load1;

  serializer u_tx0 (
    .clk(clk), .rst_n(rst_n), .enable(gcr[0][GCR0_TX0_EN]),
    .req(req0), .load(load0), .word(word), .tx(tx_out_0), .word_end(wend0));
  serializer u_tx1 (
    .clk(clk), .rst_n(rst_n), .enable(gcr[0][GCR0_TX1_EN]),
    .req(req1), .load(load1), .word(word), .tx(tx_out_1), .word_end(wend1));

  // ---------------- analog front-end controls ----------------
  assign fe_polarity   = gcr[0][GCR0_POLARITY];
  assign fe_test_pulse = test_pulse;
  assign fe_gcr        = gcr;
endmodule
