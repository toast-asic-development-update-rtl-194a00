// tb_reset_manager: checks the pulse-length decoding of the synchronous reset line.
// Pulses of 1 to 7 clock cycles are sent in random order; after each, the number
// of global and time stamp reset pulses is compared with the rule: 2 cycles -> time
// stamp reset only, 4 or more -> both, 1 and 3 -> nothing. It also checks that the
// power-on reset is released two clocks after pon_rst_n rises and that each
// decoded reset arrives exactly one clock after the line falls.
module tb_reset_manager;
  logic clk = 0, pon_rst_n = 1, sync_reset = 0;
  logic rst_n, global_rst, ts_rst;
  int checks = 0, failures = 0;
  int n_glob = 0, n_ts = 0, cyc = 0, glob_cyc = 0, ts_cyc = 0;

  reset_manager dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (global_rst) begin n_glob <= n_glob + 1; glob_cyc <= cyc; end
    if (ts_rst)     begin n_ts   <= n_ts + 1;   ts_cyc   <= cyc; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int len, g0, t0, fall_cyc;
    #1 pon_rst_n = 0;
    #1 check(rst_n == 0, "power-on reset asserted at once");
    repeat (3) @(negedge clk);
    pon_rst_n = 1;
    @(negedge clk); check(rst_n == 0, "reset held one clock");
    @(negedge clk); check(rst_n == 1, "reset released after two clocks");
    repeat (3) @(negedge clk);
    for (int i = 0; i < 60; i++) begin
      len = 1 + ($urandom % 7);
      g0 = n_glob; t0 = n_ts;
      sync_reset = 1;
      repeat (len) @(negedge clk);
      sync_reset = 0;
      fall_cyc = cyc;
      repeat (4) @(negedge clk);
      check(n_glob - g0 == ((len >= 4) ? 1 : 0), $sformatf("global reset for length %0d", len));
      check(n_ts - t0 == ((len == 2 || len >= 4) ? 1 : 0), $sformatf("ts reset for length %0d", len));
      if (len == 2 || len >= 4)
        check(ts_cyc == fall_cyc + 1, $sformatf("ts reset latency for length %0d", len));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
