// config_unit: the configuration and control unit behind the 80 Mb/s command link.
// Bits arrive on cfg_rx at half the master clock rate (one bit every second clock,
// on the cycles where the internal bit_en toggle is high), MSB first, as back-to-back
// 16-bit commands: a 4-bit function code and a 12-bit operand.
//   1101 01 aB a[6:0] 00     chip select (aB = broadcast, else a = ChipAddr)
//   0000 ...                 chip deselect
//   0100 0000 r[2:0] 0 c[2:0] a0   select channel register a0 of channel c, region r
//   0100 0000 r[2:0] 1 a[3:0]      select region register (none defined: writes are
//                                  ignored, reads return 0)
//   0100 0001 0 a[6:0]       select global register a (GCR0-13)
//   0101 d[11:0]             write the selected register
//   0110 0000 0000 0000      read the selected register
//   1111 0000 0000 0000      no operation (idle)
// Only a selected chip acts on select, write and read. Every received command is sent
// back on cfg_tx, starting the bit after its last bit; after a read the next word
// sent is the reply 1000 d[11:0] in place of the echo of the following command, which
// is therefore ignored (the host must send an idle word there).
// Word alignment: after reset, and whenever the line has been low for 32 bit periods,
// the receiver waits for a 1, which is taken as the first bit of a word; from then on
// words are counted back to back. Idle words keep the link alive.
// The 14 global registers (with their power-on defaults) and the selection state are
// triplicated. The channel registers live in the regions and are reached through the
// ccr_* port; ccr_wdata is the operand of the word being completed and is valid
// while ccr_we is high (its LSB is the line itself in that cycle). The command codes and register map follow the specification; the word
// alignment and link reset scheme, and that a select addressed to another chip
// deselects this one, are this design's choices.
module config_unit
  import toast_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [6:0]        chip_addr,
  input  logic              cfg_rx,
  output logic              cfg_tx,
  output logic [REG_W-1:0]  gcr [N_GCR],
  // channel control register port, to the regions
  output logic              ccr_we,
  output logic [2:0]        ccr_region,
  output logic [3:0]        ccr_addr,
  output logic [REG_W-1:0]  ccr_wdata,
  input  logic [REG_W-1:0]  ccr_rdata [8],
  output logic              cmd_valid,      // pulse: a command word was received
  output logic              selected
);
  // ---------------- bit timing and receiver ----------------
  logic bit_en;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bit_en <= 1'b0;
    else        bit_en <= !bit_en;
  end

  logic        aligned;
  logic [3:0]  bitcnt;
  logic [15:0] rxsh;
  logic [5:0]  zeros;
  logic [15:0] cmd;
  logic        word_done;

  assign word_done = bit_en && aligned && (bitcnt == 4'd15);
  assign cmd       = {rxsh[14:0], cfg_rx};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aligned <= 1'b0;
      bitcnt  <= '0;
      rxsh    <= '0;
      zeros   <= '0;
    end else if (bit_en) begin
      rxsh  <= {rxsh[14:0], cfg_rx};
      zeros <= cfg_rx ? 6'd0 : ((zeros == 6'd32) ? zeros : zeros + 6'd1);
      if (!aligned) begin
        if (cfg_rx) begin
          aligned <= 1'b1;
          bitcnt  <= 4'd1;
        end
      end else if (zeros >= 6'd31 && !cfg_rx) begin
        aligned <= 1'b0;           // line silent for 32 bit periods: link reset
        bitcnt  <= '0;
      end else begin
        bitcnt <= bitcnt + 4'd1;
      end
    end
  end

  // ---------------- command decoding ----------------
  typedef enum logic [1:0] {SEL_NONE = 2'd0, SEL_CCR = 2'd1, SEL_REGION = 2'd2, SEL_GCR = 2'd3} sel_e;
  // protected state: {selected, reply_pending, sel type, region, address}
  typedef struct packed {
    logic       selected;
    logic       reply_pending;
    logic [1:0] sel;
    logic [2:0] region;
    logic [6:0] addr;
  } cu_state_t;

  cu_state_t st, st_n;
  logic [3:0]       fn;
  logic [11:0]      op;
  logic             busy;
  logic             gcr_we;
  logic [REG_W-1:0] rdata;

  assign fn   = cmd[15:12];
  assign op   = cmd[11:0];
  assign busy = st.reply_pending;   // the word after a read is not interpreted

  always_comb begin
    unique case (sel_e'(st.sel))
      SEL_CCR: rdata = ccr_rdata[st.region];
      SEL_GCR: rdata = (st.addr < 7'(N_GCR)) ? gcr[st.addr[3:0]] : '0;
      default: rdata = '0;
    endcase
  end

  always_comb begin
    st_n       = st;
    gcr_we     = 1'b0;
    ccr_we     = 1'b0;
    if (word_done) begin
      st_n.reply_pending = 1'b0;
      if (!busy) begin
        unique case (fn)
          FN_CHIP_SEL: if (op[11:10] == 2'b01 && op[1:0] == 2'b00)
                         st_n.selected = op[9] || (op[8:2] == chip_addr);
          FN_DESELECT: st_n.selected = 1'b0;
          FN_REG_SEL: if (st.selected) begin
            if (op[11:7] == 5'b00010) begin
              st_n.sel  = 2'(SEL_GCR);
              st_n.addr = op[6:0];
            end else if (op[11:8] == 4'b0000) begin
              st_n.region = op[7:5];
              st_n.sel    = op[4] ? 2'(SEL_REGION) : 2'(SEL_CCR);
              st_n.addr   = {3'b000, op[3:0]};
            end else begin
              st_n.sel = 2'(SEL_NONE);
            end
          end
          FN_REG_WR: if (st.selected) begin
            gcr_we = (sel_e'(st.sel) == SEL_GCR) && (st.addr < 7'(N_GCR));
            ccr_we = (sel_e'(st.sel) == SEL_CCR);
          end
          FN_REG_RD: if (st.selected) st_n.reply_pending = 1'b1;
          default: ;
        endcase
      end
    end
  end

  tmr_reg #(.W($bits(cu_state_t)), .RESET_VAL('0)) u_state (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .d(st_n), .q(st));

  assign ccr_region = st.region;
  assign ccr_addr   = st.addr[3:0];
  assign ccr_wdata  = op;
  assign cmd_valid  = word_done;
  assign selected   = st.selected;

  // ---------------- global control registers ----------------
  for (genvar g = 0; g < N_GCR; g++) begin : g_gcr
    tmr_reg #(.W(REG_W), .RESET_VAL(gcr_default(g))) u_gcr (
      .clk(clk), .rst_n(rst_n), .en(gcr_we && st.addr == 7'(g)),
      .d(op), .q(gcr[g]));
  end

  // ---------------- transmitter: echo and read reply ----------------
  logic [15:0] txsh;
  logic [15:0] reply;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      txsh  <= '0;
      reply <= '0;
    end else begin
      if (word_done && !busy && fn == FN_REG_RD && st.selected)
        reply <= {FN_RD_REPLY, rdata};
      if (word_done)   txsh <= busy ? reply : cmd;
      else if (bit_en) txsh <= {txsh[14:0], 1'b0};
    end
  end
  assign cfg_tx = txsh[15];
endmodule
