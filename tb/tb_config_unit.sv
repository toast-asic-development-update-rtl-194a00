// tb_config_unit: checks the configuration unit through its serial link only.
// The testbench sends a long random stream of 16-bit commands at 80 Mb/s (one bit
// per two clocks, MSB first): chip selects for this chip, another chip and broadcast,
// deselects, global, channel and region register selects (including global addresses
// beyond GCR13), writes and reads, with an idle word or sometimes a write right after
// a read. It keeps its own model of selection, of the registers and of the reply
// rule, and acts as the eight regions' channel registers on the ccr_* port. It
// checks: the power-on defaults of GCR2-13; every word sent back on cfg_tx (the echo
// of each command, or the read reply 1000+data in place of the echo of the word after
// a read); the global registers after every command; the channel registers at the
// end. It also silences the line for 40 bit periods and checks that the link
// realigns on the next idle word.
module tb_config_unit;
  import toast_pkg::*;
  logic clk = 0, rst_n = 1;
  logic [6:0] chip_addr = 7'h2A;
  logic cfg_rx = 0, cfg_tx;
  logic [REG_W-1:0] gcr [N_GCR];
  logic ccr_we;
  logic [2:0] ccr_region;
  logic [3:0] ccr_addr;
  logic [REG_W-1:0] ccr_wdata;
  logic [REG_W-1:0] ccr_rdata [8];
  logic cmd_valid, selected;
  int checks = 0, failures = 0;
  int n_reads = 0, n_busy_ignored = 0, n_ccr_writes = 0;

  config_unit dut (.*);
  always #5 clk = ~clk;

  // power-on defaults as printed in the register tables
  localparam logic [11:0] DEFAULTS [14] = '{12'h000, 12'h000,
    12'b00_01101_10111, 12'b00_01110_01110, 12'b00_10001_10101, 12'b00_01110_01110,
    12'b00_01110_10101, 12'b00_01010_01110, 12'b00_11110_10110, 12'b00_01000_01110,
    12'b0_01000_011111, 12'b0000_1111_1001, 12'b00_01101_10101, 12'b000000_000000};

  // the regions' channel registers, written by the unit under test
  logic [11:0] region_mem [8][16];
  always_comb for (int r = 0; r < 8; r++) ccr_rdata[r] = region_mem[r][ccr_addr];
  always @(posedge clk) if (ccr_we) begin
    region_mem[ccr_region][ccr_addr] <= ccr_wdata;
    n_ccr_writes++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // words sent back, cut at the word boundaries of the receiver
  logic [15:0] txw = '0;
  logic [15:0] tx_seen[$];
  always @(posedge clk) if (dut.bit_en) begin
    txw = {txw[14:0], cfg_tx};
    if (cmd_valid) tx_seen.push_back(txw);
  end

  task automatic send(input logic [15:0] w);
    for (int i = 15; i >= 0; i--) begin
      cfg_rx = w[i];
      @(negedge clk); @(negedge clk);
    end
  endtask

  // reference model
  bit m_sel = 0, m_busy = 0;
  int m_type = 0;             // 0 none, 1 channel, 2 region, 3 global
  int m_region = 0, m_addr = 0;
  logic [11:0] m_gcr [14];
  logic [11:0] m_ccr [8][16];
  logic [15:0] m_reply;
  logic [15:0] m_loaded[$];   // word the unit should load into its transmitter

  function automatic logic [11:0] m_read();
    case (m_type)
      1: return m_ccr[m_region][m_addr];
      3: return (m_addr < 14) ? m_gcr[m_addr] : '0;
      default: return '0;
    endcase
  endfunction

  task automatic model(input logic [15:0] w);
    logic [3:0] fn; logic [11:0] op;
    fn = w[15:12]; op = w[11:0];
    if (m_busy) begin
      m_loaded.push_back(m_reply);
      m_busy = 0;
      n_busy_ignored++;
      return;
    end
    m_loaded.push_back(w);
    case (fn)
      4'b1101: if (op[11:10] == 2'b01 && op[1:0] == 0) m_sel = op[9] || (op[8:2] == chip_addr);
      4'b0000: m_sel = 0;
      4'b0100: if (m_sel) begin
        if (op[11:7] == 5'b00010) begin m_type = 3; m_addr = op[6:0]; end
        else if (op[11:8] == 0) begin
          m_region = op[7:5];
          m_type = op[4] ? 2 : 1;
          m_addr = op[3:0];
        end else m_type = 0;
      end
      4'b0101: if (m_sel) begin
        if (m_type == 3 && m_addr < 14) m_gcr[m_addr] = op;
        if (m_type == 1) m_ccr[m_region][m_addr] = op;
      end
      4'b0110: if (m_sel) begin
        m_busy = 1; m_reply = {4'b1000, m_read()}; n_reads++;
      end
      default: ;
    endcase
  endtask

  task automatic cmd(input logic [15:0] w);
    model(w);
    send(w);
    for (int g = 0; g < 14; g++) check(gcr[g] == m_gcr[g], $sformatf("GCR%0d after command %h", g, w));
  endtask

  function automatic logic [15:0] random_cmd();
    case ($urandom % 12)
      0:  return CFG_IDLE;
      1:  return {4'b1101, 2'b01, 1'b0, chip_addr, 2'b00};
      2:  return {4'b1101, 2'b01, 1'b0, 7'($urandom), 2'b00};
      3:  return {4'b1101, 2'b01, 1'b1, 7'($urandom), 2'b00};
      4:  return 16'h0000 | 16'(($urandom % 2) << 9);
      5:  return {4'b0100, 5'b00010, 7'($urandom % 16)};
      6, 7: return {4'b0100, 4'b0000, 3'($urandom), 1'b0, 3'($urandom), 1'($urandom)};
      8:  return {4'b0100, 4'b0000, 3'($urandom), 1'b1, 4'($urandom)};
      9, 10: return {4'b0101, 12'($urandom)};
      default: return {4'b0110, 12'h000};
    endcase
  endfunction

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] w;
    foreach (region_mem[r, a]) begin region_mem[r][a] = '0; m_ccr[r][a] = '0; end
    foreach (m_gcr[g]) m_gcr[g] = DEFAULTS[g];
    #1 rst_n = 0; #1 rst_n = 1;
    repeat (4) @(negedge clk);
    for (int g = 0; g < 14; g++) check(gcr[g] == DEFAULTS[g], $sformatf("GCR%0d default", g));
    cmd(CFG_IDLE);
    cmd(CFG_IDLE);
    for (int i = 0; i < 1500; i++) begin
      w = random_cmd();
      // keep the chip selected most of the time
      if (!m_sel && $urandom % 3 == 0) w = {4'b1101, 2'b01, 1'b0, chip_addr, 2'b00};
      cmd(w);
      if (w[15:12] == 4'b0100 && $urandom % 2 == 0) cmd({4'b0101, 12'($urandom)});
      if (w[15:12] == 4'b0110 && m_busy)
        cmd(($urandom % 4 == 0) ? {4'b0101, 12'($urandom)} : CFG_IDLE);
      if (i == 700) begin
        // silent line: link reset, then realignment on the next idle word
        cfg_rx = 0;
        repeat (80) @(negedge clk);
        m_loaded.delete(); tx_seen.delete();
        cmd(CFG_IDLE);
      end
    end
    cmd(CFG_IDLE);
    cmd(CFG_IDLE);
    // the transmitter sends loaded word k while word k+1 arrives
    check(tx_seen.size() == m_loaded.size(), $sformatf("%0d words sent back, %0d expected", tx_seen.size(), m_loaded.size()));
    for (int k = 1; k < tx_seen.size(); k++)
      check(tx_seen[k] == m_loaded[k-1], $sformatf("sent back word %0d: %h expected %h", k, tx_seen[k], m_loaded[k-1]));
    foreach (m_ccr[r, a]) check(region_mem[r][a] == m_ccr[r][a], $sformatf("CCR region %0d addr %0d", r, a));
    check(n_reads > 50 && n_busy_ignored > 50 && n_ccr_writes > 30,
          $sformatf("%0d reads, %0d words ignored after a read, %0d CCR writes", n_reads, n_busy_ignored, n_ccr_writes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
