// reset_manager: power-on reset synchronisation and decoding of the synchronous,
// pulse-length-encoded reset line.
// The asynchronous power-on reset pon_rst_n (active low) is released synchronously
// through two flops and serves only at start-up. The SyncReset line is sampled each
// clock; the number of consecutive high cycles is counted and decoded when the pulse
// ends: 2 cycles give a time stamp reset, 4 or more give a global reset together with
// a time stamp reset, and pulses of 1 or 3 cycles are ignored (as the chip
// specification states). Both outputs are one-cycle pulses issued the cycle after
// the line falls; decoding at the falling edge is this design's choice. The counter
// saturates, and the decoder state is triplicated against upsets.
module reset_manager (
  input  logic clk,
  input  logic pon_rst_n,     // asynchronous power-on reset, active low
  input  logic sync_reset,    // pulse-length-encoded synchronous reset
  output logic rst_n,         // synchronised power-on reset, active low
  output logic global_rst,    // one-cycle global reset pulse
  output logic ts_rst         // one-cycle time stamp reset pulse
);
  logic [1:0] por_sync;
  always_ff @(posedge clk or negedge pon_rst_n) begin
    if (!pon_rst_n) por_sync <= '0;
    else            por_sync <= {por_sync[0], 1'b1};
  end
  assign rst_n = por_sync[1];

  // state: {previous line value, saturating 3-bit length count}
  logic [3:0] st_q, st_d;
  logic       line_q;
  logic [2:0] len_q;
  assign {line_q, len_q} = st_q;

  always_comb begin
    st_d = st_q;
    if (sync_reset) st_d = {1'b1, (len_q == 3'd7) ? len_q : len_q + 3'd1};
    else            st_d = {1'b0, 3'd0};
  end

  tmr_reg #(.W(4), .RESET_VAL('0)) u_state (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .d(st_d), .q(st_q));

  logic pulse_end;
  assign pulse_end = line_q && !sync_reset;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      global_rst <= 1'b0;
      ts_rst     <= 1'b0;
    end else begin
      global_rst <= pulse_end && (len_q >= 3'd4);
      ts_rst     <= pulse_end && (len_q == 3'd2 || len_q >= 3'd4);
    end
  end
endmodule
