// region_readout: one region of eight channels with its readout unit and its
// configuration registers.
// The eight channel_logic instances hold at most one finished hit each. A round-robin
// arbiter moves one hit per clock into the region FIFO as a region_event_t
// (channel number, Le, Te). The FIFO derandomises hits for the global readout unit,
// which reads it with a valid/ready handshake. The region also holds its 16 channel
// control registers (two 12-bit registers per channel, triplicated against upsets),
// written and read over a simple register port from the configuration unit:
// address {channel[2:0], reg}, with reg 0 = mask, delay enable, calibration enable,
// ToT discharge DAC and reg 1 = energy and time threshold DACs. A region disabled by
// GCR1 keeps its channels idle and accepts nothing into its FIFO.
// The grouping into 8-channel regions with a local FIFO follows the specification;
// the FIFO depth (8) and the round-robin order are this design's choices.
module region_readout
  import toast_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,            // global synchronous reset
  input  logic                disable_region, // GCR1[region]
  input  logic                single_th,      // GCR0[8]
  input  logic                le_only,        // GCR0[9]
  input  logic [TS_W-1:0]     ts,
  input  logic [7:0]          hit_t,          // time discriminators of the 8 channels
  input  logic [7:0]          hit_e,          // energy discriminators
  // channel control register port
  input  logic                ccr_we,
  input  logic [3:0]          ccr_addr,       // {channel, reg}
  input  logic [REG_W-1:0]    ccr_wdata,
  output logic [REG_W-1:0]    ccr_rdata,
  output logic [REG_W-1:0]    ccr [16],       // all registers, to the analog front end
  // event output
  output logic                out_valid,
  input  logic                out_ready,
  output region_event_t       out_data,
  output logic [7:0]          lost_hit        // pulses: a hit met a full channel
);
  // ---- channel control registers ----
  for (genvar r = 0; r < 16; r++) begin : g_ccr
    tmr_reg #(.W(REG_W), .RESET_VAL('0)) u_ccr (
      .clk(clk), .rst_n(rst_n), .en(ccr_we && ccr_addr == 4'(r)),
      .d(ccr_wdata), .q(ccr[r]));
  end
  assign ccr_rdata = ccr[ccr_addr];

  // ---- channels ----
  logic [7:0]      ev_valid, ev_ready;
  logic [TS_W-1:0] ev_le [8];
  logic [TS_W-1:0] ev_te [8];
  for (genvar c = 0; c < 8; c++) begin : g_ch
    channel_logic u_ch (
      .clk(clk), .rst_n(rst_n), .clr(clr || disable_region),
      .hit_t(hit_t[c]), .hit_e(hit_e[c]), .ts(ts),
      .mask(ccr[2*c][CCR0_MASK]), .single_th(single_th), .le_only(le_only),
      .ev_valid(ev_valid[c]), .ev_ready(ev_ready[c]),
      .ev_le(ev_le[c]), .ev_te(ev_te[c]), .lost_hit(lost_hit[c]));
  end

  // ---- arbitration into the region FIFO ----
  logic [7:0]    grant;
  logic [2:0]    gidx;
  logic          f_in_ready, f_push;
  region_event_t f_in;

  assign f_push = |ev_valid && f_in_ready;
  rr_arbiter #(.N(8)) u_arb (
    .clk(clk), .rst_n(rst_n), .req(ev_valid), .advance(f_push),
    .grant(grant), .grant_idx(gidx));
  assign ev_ready = f_push ? grant : '0;
  assign f_in     = '{channel: gidx, le: ev_le[gidx], te: ev_te[gidx]};

  logic [$clog2(FIFO_DEPTH):0] level;
  sync_fifo #(.W($bits(region_event_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(clk), .rst_n(rst_n), .clr(clr),
    .in_valid(|ev_valid), .in_ready(f_in_ready), .in_data(f_in),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data),
    .level(level));

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ev_ready));
endmodule
