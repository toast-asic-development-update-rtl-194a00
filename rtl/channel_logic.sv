// channel_logic: the double threshold logic of one front-end channel.
// Each channel has two discriminators: a low "time" threshold and a higher "energy"
// threshold. Both outputs are synchronised with two flops. The time stamp is stored as
// the leading edge (Le) when the time discriminator fires, which keeps the jitter low;
// the hit is only kept if the energy discriminator also fires while the time one is
// still high (validation), which rejects noise. The trailing edge (Te) is stored when
// the energy discriminator falls, so Te-Le is the time over threshold and measures the
// charge. GCR0 modes: single threshold mode uses only the time discriminator (no
// validation, Te on its falling edge); leading-edge-only mode finishes the hit at
// validation with Te = 0. A finished hit waits in the channel (ev_valid) until the
// region takes it (ev_ready); hits arriving meanwhile are lost and counted by a
// lost_hit pulse. The channel mask bit keeps the channel idle. The state register
// is triplicated. Le/Te storage points follow the specification's figure of the double
// threshold logic; the hold-until-read behaviour, the re-arm only after both
// discriminators have gone low, and the te=0 convention are this design's choices.
module channel_logic
  import toast_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,          // global synchronous reset
  input  logic            hit_t,        // time discriminator (asynchronous)
  input  logic            hit_e,        // energy discriminator (asynchronous)
  input  logic [TS_W-1:0] ts,           // time stamp bus
  input  logic            mask,         // CCR0[7]
  input  logic            single_th,    // GCR0[8]
  input  logic            le_only,      // GCR0[9]
  output logic            ev_valid,
  input  logic            ev_ready,
  output logic [TS_W-1:0] ev_le,
  output logic [TS_W-1:0] ev_te,
  output logic            lost_hit
);
  typedef enum logic [2:0] {
    S_IDLE  = 3'd0,   // waiting for a time threshold crossing
    S_ARMED = 3'd1,   // Le stored, waiting for validation
    S_VALID = 3'd2,   // validated, waiting for the trailing edge
    S_DONE  = 3'd3,   // hit complete, waiting to be read
    S_WAIT  = 3'd4    // waiting for both discriminators to go low
  } state_e;

  logic [1:0] t_sync, e_sync;
  logic       t_prev;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_sync <= '0;
      e_sync <= '0;
      t_prev <= 1'b0;
    end else begin
      t_sync <= {t_sync[0], hit_t};
      e_sync <= {e_sync[0], hit_e};
      t_prev <= t_sync[1];
    end
  end
  logic t_s, e_s, t_rise, trail;
  assign t_s    = t_sync[1];
  assign e_s    = e_sync[1];
  assign t_rise = t_s && !t_prev;
  assign trail  = single_th ? !t_s : !e_s;   // trailing edge condition

  state_e state, state_n;
  logic [2:0] state_q;
  assign state = state_e'(state_q);

  logic            le_we, te_we, te_zero;
  always_comb begin
    state_n  = state;
    le_we    = 1'b0;
    te_we    = 1'b0;
    te_zero  = 1'b0;
    lost_hit = 1'b0;
    unique case (state)
      S_IDLE: if (t_rise) begin
        le_we = 1'b1;
        if (single_th || e_s) begin
          if (le_only) begin state_n = S_DONE; te_zero = 1'b1; end
          else         state_n = S_VALID;
        end else       state_n = S_ARMED;
      end
      S_ARMED: begin
        if (e_s) begin
          if (le_only) begin state_n = S_DONE; te_zero = 1'b1; end
          else         state_n = S_VALID;
        end else if (!t_s) state_n = S_IDLE;   // dark signal: discarded
      end
      S_VALID: if (trail) begin
        te_we   = 1'b1;
        state_n = S_DONE;
      end
      S_DONE: begin
        if (t_rise) lost_hit = 1'b1;
        if (ev_ready) state_n = (t_s || e_s) ? S_WAIT : S_IDLE;
      end
      S_WAIT: if (!t_s && !e_s) state_n = S_IDLE;
      default: state_n = S_IDLE;
    endcase
    if (clr || mask) state_n = S_IDLE;
  end

  tmr_reg #(.W(3), .RESET_VAL(3'(S_IDLE))) u_state (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .d(3'(state_n)), .q(state_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_le <= '0;
      ev_te <= '0;
    end else begin
      if (le_we)   ev_le <= ts;
      if (te_we)   ev_te <= ts;
      if (te_zero) ev_te <= '0;
    end
  end

  assign ev_valid = (state == S_DONE);
endmodule
