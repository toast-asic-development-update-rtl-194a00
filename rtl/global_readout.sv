// global_readout: the second-level buffer of the chip.
// A round-robin arbiter takes one hit per clock from the eight region FIFOs, tags it
// with the region number and writes it, as a chip_event_t (region, channel, Le, Te =
// the 30-bit payload of a data word), into the 64-cell global FIFO. The framer reads
// that FIFO with a valid/ready handshake. All interfaces are valid/ready; a region is
// served only when the global FIFO has room, so no hit is dropped here. The 64-cell
// depth follows the specification's architecture figure; the round-robin order is
// this design's choice.
module global_readout
  import toast_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          reg_valid [8],
  output logic          reg_ready [8],
  input  region_event_t reg_data  [8],
  output logic          out_valid,
  input  logic          out_ready,
  output chip_event_t   out_data,
  output logic [$clog2(FIFO_DEPTH):0] level
);
  logic [7:0]  req, grant;
  logic [2:0]  gidx;
  logic        f_in_ready, push;
  chip_event_t f_in;

  for (genvar r = 0; r < 8; r++) begin : g_req
    assign req[r]       = reg_valid[r];
    assign reg_ready[r] = grant[r] && f_in_ready;
  end
  assign push = |req && f_in_ready;

  rr_arbiter #(.N(8)) u_arb (
    .clk(clk), .rst_n(rst_n), .req(req), .advance(push),
    .grant(grant), .grant_idx(gidx));

  assign f_in = '{region: gidx, channel: reg_data[gidx].channel,
                  le: reg_data[gidx].le, te: reg_data[gidx].te};

  sync_fifo #(.W($bits(chip_event_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(clk), .rst_n(rst_n), .clr(clr),
    .in_valid(|req), .in_ready(f_in_ready), .in_data(f_in),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data),
    .level(level));
endmodule
