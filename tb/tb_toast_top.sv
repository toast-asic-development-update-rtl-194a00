// tb_toast_top: end-to-end test of the whole chip at its default sizes.
// The chip is configured only through the 80 Mb/s command link; hits are produced
// as discriminator pulses on the 64 channel inputs; the output is recovered from
// the two serial data links and decoded word by word. A 2-cycle SyncReset pulse
// resets the time stamp, after which a hit raised at clock R must carry
// Le = R - F (mod 4096), F being the clock at which the pulse ended (the 2-clock
// synchroniser delay and the 2-clock reset delay cancel), and Te likewise from the
// energy (or time) discriminator fall. Phases:
//   A  one link, double threshold, channel 9 masked, region 6 disabled, dark pulses
//   B  one link, single threshold mode and Gray-coded time stamps
//   C  both links, leading-edge-only mode
//   D  both links off, high hit rate: FIFOs fill, hits are lost; then drained
//   E  global reset (5-cycle SyncReset) with full FIFOs: buffers cleared, registers kept
// Every hit is matched to its data word; trailers are checked for count and CRC in
// one-link phases; header frame numbers must count up. Each mechanism is counted and
// a mechanism that never happened counts as a failure.
module tb_toast_top;
  import toast_pkg::*;
  logic clk = 0, pon_rst_n = 1, sync_reset = 0, test_pulse = 0, cfg_rx = 0;
  logic [6:0] chip_addr = 7'h11;
  logic cfg_tx, tx_out_0, tx_out_1;
  logic [63:0] hit_t = '0, hit_e = '0;
  logic fe_polarity, fe_test_pulse;
  logic [11:0] fe_ccr [128];
  logic [11:0] fe_gcr [14];
  int checks = 0, failures = 0;

  toast_top dut (.*);
  always #3.125ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_data = 0, n_hdr = 0, n_trl = 0, n_sync = 0, n_trl_checked = 0;
  int n_dark = 0, n_masked = 0, n_disabled = 0, n_single = 0, n_gray = 0, n_leonly = 0;
  int n_link1 = 0, n_lost = 0, n_gfull = 0, n_rfull = 0, n_tsrst = 0, n_grst = 0, n_readback = 0;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------------ configuration link
  // the line never falls silent: idle words are sent whenever no command is queued
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
  logic [15:0] cfg_txw = '0, cfg_last = '0;
  always @(posedge clk) if (dut.u_cfg.bit_en) begin
    cfg_txw = {cfg_txw[14:0], cfg_tx};
    if (dut.u_cfg.cmd_valid) cfg_last = cfg_txw;
  end
  task automatic wr_gcr(input int n, input logic [11:0] v);
    send({4'b0100, 5'b00010, 7'(n)});
    send({4'b0101, v});
  endtask
  task automatic wr_ccr(input int ch, input int a0, input logic [11:0] v);
    send({4'b0100, 4'b0000, 3'(ch / 8), 1'b0, 3'(ch % 8), 1'(a0)});
    send({4'b0101, v});
  endtask
  task automatic rd_gcr(input int n, output logic [11:0] v);
    send({4'b0100, 5'b00010, 7'(n)});
    cfg_last = '0;
    send({4'b0110, 12'h000});
    // the reply follows the echo of the read command
    for (int i = 0; i < 200 && cfg_last[15:12] != 4'b1000; i++) @(negedge clk);
    v = cfg_last[11:0];
    check(cfg_last[15:12] == 4'b1000, "read reply code");
  endtask

  // ------------------------------------------------------------ time reference
  int  ts_ref = 0;            // clock at which the last time stamp reset pulse ended
  bit  gray = 0, single = 0, leonly = 0, count_only = 0;
  logic [7:0]  masked_ch_mask [8];
  logic [7:0]  region_dis = '0;
  function automatic logic [11:0] stamp(int c);
    logic [11:0] b;
    b = 12'(c - ts_ref);
    return gray ? (b ^ (b >> 1)) : b;
  endfunction

  task automatic sync_pulse(input int len);
    sync_reset = 1;
    repeat (len) @(negedge clk);
    sync_reset = 0;
    if (len == 2 || len >= 4) ts_ref = cyc;
    repeat (3) @(negedge clk);
  endtask

  // ------------------------------------------------------------ hit generator
  typedef struct { logic [11:0] le, te; } exp_t;
  exp_t exp_q [64][$];
  int   rate = 0;             // pulses per channel per 100000 clocks
  int   ph [64];              // pulse phase counter, -1 idle
  int   e_on [64], e_off [64], t_off [64], dead [64];
  bit   dark [64];
  int   r_cyc [64], ef_cyc [64], tf_cyc [64];
  int   n_sent_valid = 0;

  initial for (int c = 0; c < 64; c++) begin ph[c] = -1; dead[c] = 0; end

  always @(negedge clk) begin
    for (int c = 0; c < 64; c++) begin
      if (ph[c] < 0) begin
        if (dead[c] > 0) dead[c]--;
        else if (rate > 0 && ($urandom % 100000) < rate) begin
          ph[c] = 0;
          dark[c]  = !count_only && ($urandom % 6 == 0);
          e_on[c]  = 1 + $urandom % 3;
          e_off[c] = e_on[c] + 2 + $urandom % 60;
          t_off[c] = e_off[c] + 1 + $urandom % 5;
        end
      end
      if (ph[c] >= 0) begin
        if (ph[c] == 0)  begin hit_t[c] = 1; r_cyc[c] = cyc; end
        if (ph[c] == e_on[c] && !dark[c]) hit_e[c] = 1;
        if (ph[c] == e_off[c] && !dark[c]) begin hit_e[c] = 0; ef_cyc[c] = cyc; end
        if (ph[c] == t_off[c]) begin
          hit_t[c] = 0; tf_cyc[c] = cyc;
          ph[c] = -1; dead[c] = 10;
          // what the chip should report for this pulse
          if (region_dis[c / 8]) n_disabled++;
          else if (masked_ch_mask[c / 8][c % 8]) n_masked++;
          else if (dark[c] && !single) n_dark++;
          else begin
            exp_t e;
            e.le = stamp(r_cyc[c]);
            e.te = leonly ? 12'd0 : stamp(single ? tf_cyc[c] : ef_cyc[c]);
            n_sent_valid++;
            if (!count_only) exp_q[c].push_back(e);
            if (single) n_single++;
            if (gray)   n_gray++;
            if (leonly) n_leonly++;
          end
        end else ph[c]++;
      end
    end
  end

  // ------------------------------------------------------------ link decoders
  bit  frame_ok = 0;          // trailer of the current frame can be checked
  bit  two_links = 0;
  int  frame_cnt = 0;
  logic [15:0] frame_crc = 16'hFFFF;
  int  last_frame = -1;
  int  n_data_count_only = 0;

  function automatic logic [15:0] crc_serial(logic [15:0] c, logic [31:0] w);
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb = c[15] ^ w[i];
      c = c << 1;
      if (fb) c = c ^ 16'b0001_0000_0010_0001;
    end
    return c;
  endfunction

  task automatic decode(input logic [31:0] w, input int link);
    if (link == 1) n_link1++;
    case (w[31:30])
      PKT_HEADER: begin
        n_hdr++;
        check(w[29:28] == 2'b11 && w[27:21] == chip_addr && w[20:8] == 0, "header fields");
        if (last_frame >= 0) check(w[7:0] == 8'(last_frame + 1), "frame number counts up");
        last_frame = w[7:0];
        frame_ok = !two_links; frame_cnt = 0; frame_crc = 16'hFFFF;
      end
      PKT_TRAILER: begin
        n_trl++;
        check(w[29:28] == 2'b00, "trailer marker");
        if (frame_ok && !two_links) begin
          n_trl_checked++;
          check(w[27:16] == 12'(frame_cnt), $sformatf("trailer count %0d, %0d seen", w[27:16], frame_cnt));
          check(w[15:0] == frame_crc, "trailer CRC");
        end
      end
      PKT_DATA: begin
        int c;
        exp_t e;
        n_data++;
        frame_cnt++;
        frame_crc = crc_serial(frame_crc, w);
        c = 8 * int'(w[29:27]) + int'(w[26:24]);
        if (count_only) n_data_count_only++;
        else if (exp_q[c].size() == 0) begin
          checks++; failures++; $display("FAIL unexpected hit on channel %0d: %h", c, w);
        end else begin
          e = exp_q[c].pop_front();
          check(w[23:12] == e.le, $sformatf("ch %0d Le %0d expected %0d", c, w[23:12], e.le));
          check(w[11:0] == e.te, $sformatf("ch %0d Te %0d expected %0d", c, w[11:0], e.te));
        end
      end
      default: begin
        n_sync++;
        check(w == SYNC_WORD, "sync word pattern");
      end
    endcase
  endtask

  logic [31:0] rx0 = '0, rx1 = '0;
  always @(posedge clk) begin
    rx0 = {rx0[30:0], tx_out_0};
    rx1 = {rx1[30:0], tx_out_1};
    if (dut.u_tx0.word_end) decode(rx0, 0);
    if (dut.u_tx1.word_end) decode(rx1, 1);
  end

  // ------------------------------------------------------------ buffer observers
  for (genvar r = 0; r < 8; r++) begin : g_obs
    always @(posedge clk) if (dut.rst_n) begin
      n_lost += $countones(dut.g_region[r].u_region.lost_hit);
      if (dut.g_region[r].u_region.level == 8) n_rfull++;
    end
  end
  always @(posedge clk) if (dut.rst_n) begin
    if (dut.g_level == 64) n_gfull <= n_gfull + 1;
    if (dut.rst_n && dut.ts_rst) n_tsrst <= n_tsrst + 1;
    if (dut.rst_n && dut.global_rst) n_grst <= n_grst + 1;
  end

  task automatic drain(input int clocks, input string what);
    rate = 0;
    repeat (clocks) @(negedge clk);
    for (int c = 0; c < 64; c++)
      check(exp_q[c].size() == 0, $sformatf("%s: hits of channel %0d delivered (%0d left)", what, c, exp_q[c].size()));
  endtask

  initial begin
    #50ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [11:0] v, gcr0;
    int lost0, sent0;
    foreach (masked_ch_mask[r]) masked_ch_mask[r] = '0;
    #1 pon_rst_n = 0;
    #50ns pon_rst_n = 1;
    repeat (10) @(negedge clk);
    check(fe_gcr[7] == 12'b00_01010_01110, "GCR7 power-on default on the analog controls");
    send({4'b1101, 2'b01, 1'b0, chip_addr, 2'b00});     // chip select
    // channel registers: mask channel 9, threshold DACs of channel 20
    wr_ccr(9, 0, 12'h080);
    wr_ccr(20, 1, {2'b00, 5'd19, 5'd7});
    check(fe_ccr[2*9][CCR0_MASK] && fe_ccr[2*20 + 1] == {2'b00, 5'd19, 5'd7}, "channel registers written");
    masked_ch_mask[1] = 8'h02;
    gcr0 = 12'h0;
    gcr0[GCR0_TS_EN] = 1; gcr0[GCR0_TX0_EN] = 1; gcr0[GCR0_POLARITY] = 1;
    wr_gcr(0, gcr0);
    wr_gcr(1, 12'h040); region_dis = 8'h40;
    rd_gcr(0, v);
    check(v == gcr0 && fe_polarity, "GCR0 read back over the link");
    if (v == gcr0) n_readback++;
    test_pulse = 1; #1 check(fe_test_pulse, "test pulse reaches the front end"); test_pulse = 0;
    sync_pulse(1);
    sync_pulse(3);
    check(n_tsrst == 0, "1- and 3-cycle pulses ignored");
    sync_pulse(2);                                          // time stamp reference
    // ---- phase A
    rate = 40;
    repeat (14000) @(negedge clk);
    drain(2000, "A");
    // ---- phase B: single threshold, Gray time stamps, all regions
    gcr0[GCR0_SINGLE_TH] = 1; gcr0[GCR0_TS_GRAY] = 1;
    wr_gcr(1, 12'h000); region_dis = 8'h00;
    wr_gcr(0, gcr0); single = 1; gray = 1;
    rate = 40;
    repeat (8000) @(negedge clk);
    drain(2000, "B");
    // ---- phase C: leading edge only, both links
    gcr0[GCR0_SINGLE_TH] = 0; gcr0[GCR0_TS_GRAY] = 0; gcr0[GCR0_LE_ONLY] = 1; gcr0[GCR0_TX1_EN] = 1;
    two_links = 1; frame_ok = 0;
    wr_gcr(0, gcr0); single = 0; gray = 0; leonly = 1;
    rate = 60;
    repeat (8000) @(negedge clk);
    drain(2000, "C");
    // ---- phase D: links off, high rate, then drain
    gcr0[GCR0_LE_ONLY] = 0; gcr0[GCR0_TX0_EN] = 0; gcr0[GCR0_TX1_EN] = 0;
    wr_gcr(0, gcr0); leonly = 0;
    repeat (200) @(negedge clk);
    last_frame = -1;            // frames pass unsent while the links are off
    count_only = 1; lost0 = n_lost; sent0 = n_sent_valid; n_data_count_only = 0;
    rate = 1000;
    repeat (4000) @(negedge clk);
    rate = 0;
    repeat (200) @(negedge clk);
    check(n_gfull > 0 && n_rfull > 0, "global and region FIFOs filled");
    check(n_lost > lost0, "hits lost while buffers full");
    gcr0[GCR0_TX0_EN] = 1; gcr0[GCR0_TX1_EN] = 1;
    wr_gcr(0, gcr0);
    repeat (6000) @(negedge clk);
    check(n_data_count_only == (n_sent_valid - sent0) - (n_lost - lost0),
          $sformatf("D: %0d words = %0d hits - %0d lost", n_data_count_only, n_sent_valid - sent0, n_lost - lost0));
    // ---- phase E: global reset clears the buffers, keeps the configuration
    gcr0[GCR0_TX0_EN] = 0; gcr0[GCR0_TX1_EN] = 0;
    wr_gcr(0, gcr0);
    repeat (100) @(negedge clk);
    rate = 1000;
    repeat (1000) @(negedge clk);
    rate = 0;
    repeat (200) @(negedge clk);
    n_data_count_only = 0;
    sync_pulse(5);
    repeat (5) @(negedge clk);
    check(n_grst == 1 && fe_gcr[0] == gcr0 && fe_gcr[1] == 12'h000, "global reset keeps the registers");
    count_only = 0;
    two_links = 0; last_frame = -1;
    gcr0[GCR0_TX0_EN] = 1;
    wr_gcr(0, gcr0);
    repeat (2000) @(negedge clk);
    check(n_data_count_only == 0, "no hits left after global reset");
    check(last_frame == 0, "frame number restarts after global reset");
    // ---- every mechanism must have happened
    check(n_data > 500, $sformatf("data words: %0d", n_data));
    check(n_hdr > 5 && n_trl > 4 && n_trl_checked > 2, $sformatf("headers %0d, trailers %0d (%0d checked)", n_hdr, n_trl, n_trl_checked));
    check(n_sync > 100, $sformatf("sync words: %0d", n_sync));
    check(n_dark > 0, $sformatf("dark pulses rejected: %0d", n_dark));
    check(n_masked > 0, $sformatf("masked channel hits: %0d", n_masked));
    check(n_disabled > 0, $sformatf("disabled region hits: %0d", n_disabled));
    check(n_single > 0, $sformatf("single threshold hits: %0d", n_single));
    check(n_gray > 0, $sformatf("Gray-coded hits: %0d", n_gray));
    check(n_leonly > 0, $sformatf("leading-edge-only hits: %0d", n_leonly));
    check(n_link1 > 0, $sformatf("words on link 1: %0d", n_link1));
    check(n_lost > 0, $sformatf("lost hits: %0d", n_lost));
    check(n_gfull > 0 && n_rfull > 0, $sformatf("FIFO full cycles: global %0d, region %0d", n_gfull, n_rfull));
    check(n_tsrst == 2 && n_grst == 1, $sformatf("time stamp resets %0d, global resets %0d", n_tsrst, n_grst));
    check(n_readback > 0, "register read back");
    $display("mechanisms: data=%0d hdr=%0d trl=%0d(%0d) sync=%0d dark=%0d masked=%0d disabled=%0d single=%0d gray=%0d leonly=%0d link1=%0d lost=%0d gfull=%0d rfull=%0d tsrst=%0d grst=%0d",
             n_data, n_hdr, n_trl, n_trl_checked, n_sync, n_dark, n_masked, n_disabled, n_single, n_gray, n_leonly, n_link1, n_lost, n_gfull, n_rfull, n_tsrst, n_grst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
