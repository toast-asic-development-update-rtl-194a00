// tb_rate_40khz: the chip at its specified maximum load, default sizes, one link.
// All 64 channels receive random hits at 40 kHz each (probability 1/4000 per 160 MHz
// clock while the channel is quiet), with times over threshold spread over
// 0.1-3.2 us, the range the front end produces for 1-54 fC. The chip is configured
// over the command link for double threshold mode with link 0 only, and runs for
// 16 frames (about 410 us, some 1000 hits). Every hit must arrive on the link with
// the right channel, Le and Te; none may be lost; the trailers must count the data
// words of their frames. The testbench also reports the peak fill of the global FIFO
// and the share of link words that carried data.
module tb_rate_40khz;
  import toast_pkg::*;
  logic clk = 0, pon_rst_n = 1, sync_reset = 0, test_pulse = 0, cfg_rx = 0;
  logic [6:0] chip_addr = 7'h03;
  logic cfg_tx, tx_out_0, tx_out_1;
  logic [63:0] hit_t = '0, hit_e = '0;
  logic fe_polarity, fe_test_pulse;
  logic [11:0] fe_ccr [128];
  logic [11:0] fe_gcr [14];
  int checks = 0, failures = 0, cyc = 0;

  toast_top dut (.*);
  always #3.125ns clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // command link with idle fill
  logic [15:0] cmdq[$];
  int n_queued = 0, n_done = 0;
  initial begin
    logic [15:0] w;
    bit is_cmd;
    @(posedge pon_rst_n);
    repeat (4) @(negedge clk);
    forever begin
      is_cmd = cmdq.size() > 0;
      w = is_cmd ? cmdq.pop_front() : CFG_IDLE;
      for (int i = 15; i >= 0; i--) begin
        cfg_rx = w[i];
        @(negedge clk); @(negedge clk);
      end
      if (is_cmd) n_done++;
    end
  end
  task automatic send(input logic [15:0] w);
    int id;
    cmdq.push_back(w);
    id = ++n_queued;
    wait (n_done >= id);
  endtask

  // hits
  int ts_ref = 0;
  bit run = 0;
  typedef struct { logic [11:0] le, te; } exp_t;
  exp_t exp_q [64][$];
  int ph [64], e_off [64], t_off [64], r_cyc [64];
  int n_hits = 0, n_recv = 0, n_words = 0, n_frames_checked = 0, max_level = 0, n_lost = 0;
  initial for (int c = 0; c < 64; c++) ph[c] = -1;

  always @(negedge clk) if (run) begin
    for (int c = 0; c < 64; c++) begin
      if (ph[c] < 0 && ($urandom % 4000) == 0) begin
        ph[c] = 0;
        e_off[c] = 2 + 16 + $urandom % 497;     // ToT of 16-512 clocks
        t_off[c] = e_off[c] + 1 + $urandom % 8;
      end
      if (ph[c] >= 0) begin
        if (ph[c] == 0) begin hit_t[c] = 1; r_cyc[c] = cyc; end
        if (ph[c] == 2) hit_e[c] = 1;
        if (ph[c] == e_off[c]) begin
          exp_t e;
          hit_e[c] = 0;
          e.le = 12'(r_cyc[c] - ts_ref);
          e.te = 12'(cyc - ts_ref);
          exp_q[c].push_back(e);
          n_hits++;
        end
        if (ph[c] == t_off[c]) begin hit_t[c] = 0; ph[c] = -20; end   // short quiet time
        else ph[c]++;
      end else if (ph[c] < -1) ph[c]++;
    end
  end

  // link 0 decoder
  logic [31:0] rx0 = '0;
  int frame_cnt = 0;
  bit in_frame = 0;
  always @(posedge clk) begin
    rx0 = {rx0[30:0], tx_out_0};
    if (dut.u_tx0.word_end) begin
      n_words++;
      case (rx0[31:30])
        PKT_HEADER: begin in_frame = 1; frame_cnt = 0; end
        PKT_TRAILER: if (in_frame) begin
          n_frames_checked++;
          check(rx0[27:16] == 12'(frame_cnt), "trailer data count");
        end
        PKT_DATA: begin
          int c;
          c = 8 * int'(rx0[29:27]) + int'(rx0[26:24]);
          frame_cnt++;
          n_recv++;
          if (exp_q[c].size() == 0) begin
            checks++; failures++; $display("FAIL unexpected hit on channel %0d", c);
          end else begin
            exp_t e;
            e = exp_q[c].pop_front();
            check(rx0[23:12] == e.le && rx0[11:0] == e.te, $sformatf("channel %0d Le/Te", c));
          end
        end
        default: ;
      endcase
    end
    if (dut.rst_n && 32'(dut.g_level) > max_level) max_level = 32'(dut.g_level);
  end
  for (genvar r = 0; r < 8; r++) begin : g_obs
    always @(posedge clk) if (dut.rst_n) n_lost += $countones(dut.g_region[r].u_region.lost_hit);
  end

  initial begin
    #5ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [11:0] gcr0;
    #1 pon_rst_n = 0;
    #50ns pon_rst_n = 1;
    repeat (10) @(negedge clk);
    send({4'b1101, 2'b01, 1'b0, chip_addr, 2'b00});
    gcr0 = '0; gcr0[GCR0_TS_EN] = 1; gcr0[GCR0_TX0_EN] = 1;
    send({4'b0100, 5'b00010, 7'd0});
    send({4'b0101, gcr0});
    // time stamp reset: Le = clock of the rise minus clock at the end of the pulse
    sync_reset = 1; repeat (2) @(negedge clk); sync_reset = 0; ts_ref = cyc;
    run = 1;
    repeat (16 * 4096) @(negedge clk);
    run = 0;
    repeat (3000) @(negedge clk);
    for (int c = 0; c < 64; c++) check(exp_q[c].size() == 0, $sformatf("all hits of channel %0d delivered", c));
    check(n_lost == 0, "no hit lost");
    check(n_hits > 800 && n_recv == n_hits, $sformatf("%0d hits sent, %0d received", n_hits, n_recv));
    check(n_frames_checked >= 15, "trailers checked");
    $display("40 kHz/strip: %0d hits in %0d frames, peak global FIFO level %0d of 64, data in %0d of %0d link words",
             n_hits, 16, max_level, n_recv, n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
