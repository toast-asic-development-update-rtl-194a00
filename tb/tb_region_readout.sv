// tb_region_readout: checks one region of eight channels.
// The channel control registers are written with random values and read back through
// the register port. Then, in rounds, a random set of channels receives a validated
// pulse each, at random offsets; the testbench predicts every hit (channel, leading
// edge = time stamp at the time threshold rise + 2, trailing edge = time stamp at the
// energy threshold fall + 2) and matches the hits read from the region FIFO against
// the prediction. Some rounds stall the FIFO output so that both the FIFO and the
// channel buffers fill up (16 hits held) before draining. Masked channels and a
// disabled region must deliver nothing.
module tb_region_readout;
  import toast_pkg::*;
  logic clk = 0, rst_n = 1, clr = 0, disable_region = 0, single_th = 0, le_only = 0;
  logic [TS_W-1:0] ts = '0;
  logic [7:0] hit_t = '0, hit_e = '0;
  logic ccr_we = 0;
  logic [3:0] ccr_addr = '0;
  logic [REG_W-1:0] ccr_wdata = '0, ccr_rdata;
  logic [REG_W-1:0] ccr [16];
  logic out_valid, out_ready = 0;
  region_event_t out_data;
  logic [7:0] lost_hit;
  int checks = 0, failures = 0, max_level = 0;

  region_readout dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) ts <= ts + 1'b1;

  region_event_t got[$];
  always @(posedge clk) if (out_valid && out_ready) got.push_back(out_data);
  always @(posedge clk) if (32'(dut.level) > max_level) max_level = 32'(dut.level);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one round: channels in `chans` get a pulse; returns the expected hits
  task automatic round(input logic [7:0] chans, ref region_event_t exp[$]);
    int t_on[8], e_off[8];
    logic [TS_W-1:0] le[8], te[8];
    for (int c = 0; c < 8; c++) begin
      t_on[c]  = $urandom % 6;
      e_off[c] = t_on[c] + 3 + $urandom % 20;
    end
    for (int k = 0; k < 40; k++) begin
      for (int c = 0; c < 8; c++) if (chans[c]) begin
        if (k == t_on[c])      begin hit_t[c] = 1; le[c] = ts + TS_W'(2); end
        if (k == t_on[c] + 1)  hit_e[c] = 1;
        if (k == e_off[c])     begin hit_e[c] = 0; te[c] = ts + TS_W'(2); end
        if (k == e_off[c] + 2) hit_t[c] = 0;
      end
      @(negedge clk);
    end
    for (int c = 0; c < 8; c++)
      if (chans[c]) exp.push_back('{channel: 3'(c), le: le[c], te: te[c]});
  endtask

  task automatic compare(ref region_event_t exp[$], input string what);
    check(got.size() == exp.size(), $sformatf("%s: %0d hits read, %0d expected", what, got.size(), exp.size()));
    foreach (exp[i]) begin
      bit found = 0;
      foreach (got[j]) if (got[j] == exp[i]) found = 1;
      check(found, $sformatf("%s: hit of channel %0d le=%0d te=%0d", what, exp[i].channel, exp[i].le, exp[i].te));
    end
    got.delete(); exp.delete();
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [REG_W-1:0] model [16];
    region_event_t exp[$];
    #1 rst_n = 0; #1 rst_n = 1;
    @(negedge clk);
    // channel control registers
    for (int r = 0; r < 16; r++) begin
      model[r] = REG_W'($urandom) & ~(REG_W'(1) << CCR0_MASK);  // leave channels unmasked
      ccr_we = 1; ccr_addr = 4'(r); ccr_wdata = model[r];
      @(negedge clk);
    end
    ccr_we = 0;
    for (int r = 0; r < 16; r++) begin
      ccr_addr = 4'(r); #1;
      check(ccr_rdata == model[r] && ccr[r] == model[r], $sformatf("CCR %0d readback", r));
      @(negedge clk);
    end
    // free-flowing rounds
    out_ready = 1;
    for (int i = 0; i < 30; i++) begin
      round(8'($urandom), exp);
      repeat (20) @(negedge clk);
      compare(exp, "flowing");
    end
    // stalled output: 16 hits held, then drained
    out_ready = 0;
    round(8'hFF, exp);
    repeat (10) @(negedge clk);
    round(8'hFF, exp);
    repeat (10) @(negedge clk);
    check(max_level == 8, $sformatf("region FIFO filled (max level %0d)", max_level));
    check(got.size() == 0, "nothing read while stalled");
    out_ready = 1;
    repeat (40) @(negedge clk);
    compare(exp, "after stall");
    // masked channels 2 and 5
    for (int c = 0; c < 8; c++) begin
      ccr_we = 1; ccr_addr = 4'(2 * c);
      ccr_wdata = model[2*c] | ((c == 2 || c == 5) ? (REG_W'(1) << CCR0_MASK) : '0);
      @(negedge clk);
    end
    ccr_we = 0;
    round(8'hFF, exp);
    repeat (20) @(negedge clk);
    for (int i = exp.size() - 1; i >= 0; i--) if (exp[i].channel == 2 || exp[i].channel == 5) exp.delete(i);
    compare(exp, "masked");
    // disabled region
    disable_region = 1;
    round(8'hFF, exp);
    repeat (20) @(negedge clk);
    exp.delete();
    compare(exp, "disabled region");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
