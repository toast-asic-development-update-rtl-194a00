// tb_channel_logic: checks the double threshold logic of one channel.
// The testbench runs its own time stamp counter and drives the two discriminator
// outputs with pulses of random position and length. The reference: the leading
// edge is the time stamp when the time discriminator rose, the trailing edge the
// time stamp when the energy discriminator fell, both plus the fixed 2-clock
// synchroniser latency. Cases: validated hits, dark pulses (no energy crossing,
// must be dropped), single threshold mode (Te from the time discriminator),
// leading-edge-only mode (Te = 0, hit ready at validation), the mask bit, and a
// second hit arriving while the first is still unread (lost, flagged).
module tb_channel_logic;
  import toast_pkg::*;
  logic clk = 0, rst_n = 1, clr = 0, hit_t = 0, hit_e = 0, mask = 0, single_th = 0, le_only = 0;
  logic [TS_W-1:0] ts = '0;
  logic ev_valid, ev_ready = 0, lost_hit;
  logic [TS_W-1:0] ev_le, ev_te;
  int checks = 0, failures = 0, cyc = 0, n_lost = 0;

  channel_logic dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    ts  <= ts + 1'b1;
    cyc <= cyc + 1;
    if (lost_hit) n_lost <= n_lost + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (le=%0d te=%0d)", what, ev_le, ev_te); end
  endtask

  // drive: time rises at t_on, energy from e_on to e_off, time falls at t_off (clock counts
  // after the start); e_on < 0 means no energy crossing
  task automatic pulse(input int t_on, input int e_on, input int e_off, input int t_off,
                       output logic [TS_W-1:0] le_exp, output logic [TS_W-1:0] te_exp,
                       output logic [TS_W-1:0] tt_exp);
    for (int k = 0; k <= t_off + 1; k++) begin
      if (k == t_on)  begin hit_t = 1; le_exp = ts + TS_W'(2); end
      if (k == e_on)  hit_e = 1;
      if (k == e_off) begin hit_e = 0; te_exp = ts + TS_W'(2); end
      if (k == t_off) begin hit_t = 0; tt_exp = ts + TS_W'(2); end
      @(negedge clk);
    end
    repeat (4) @(negedge clk);
  endtask

  task automatic read_event(input bit expect_ev, input logic [TS_W-1:0] le, input logic [TS_W-1:0] te,
                            input string what);
    check(ev_valid == expect_ev, {what, ": event present"});
    if (expect_ev && ev_valid) begin
      check(ev_le == le, {what, ": leading edge"});
      check(ev_te == te, {what, ": trailing edge"});
      ev_ready = 1; @(negedge clk); ev_ready = 0;
      check(!ev_valid, {what, ": cleared after read"});
    end
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [TS_W-1:0] le, te, tt;
    int a, b, c, d;
    #1 rst_n = 0; #1 rst_n = 1;
    repeat (3) @(negedge clk);
    check(!ev_valid, "idle after reset");
    for (int i = 0; i < 200; i++) begin
      a = 1 + $urandom % 3; b = a + 1 + $urandom % 4; c = b + 2 + $urandom % 40; d = c + 1 + $urandom % 10;
      case (i % 5)
        0, 1: begin   // validated hit, double threshold
          single_th = 0; le_only = 0;
          pulse(a, b, c, d, le, te, tt);
          read_event(1, le, te, "double threshold");
        end
        2: begin      // dark pulse
          single_th = 0; le_only = 0;
          pulse(a, -5, -5, d, le, te, tt);
          read_event(0, le, te, "dark pulse dropped");
        end
        3: begin      // single threshold mode: dark pulse is kept, Te from time discriminator
          single_th = 1; le_only = 0;
          pulse(a, ($urandom % 2) ? b : -5, c, d, le, te, tt);
          read_event(1, le, tt, "single threshold");
        end
        default: begin // leading edge only
          single_th = 0; le_only = 1;
          pulse(a, b, c, d, le, te, tt);
          read_event(1, le, '0, "leading edge only");
        end
      endcase
    end
    single_th = 0; le_only = 0;
    // mask
    mask = 1;
    pulse(1, 3, 10, 12, le, te, tt);
    read_event(0, le, te, "masked channel");
    mask = 0;
    // lost hit: the first event is not read before the second pulse
    pulse(1, 3, 10, 12, le, te, tt);
    check(ev_valid, "first hit held");
    pulse(1, 3, 9, 11, le, te, tt);
    check(n_lost == 1, "second hit flagged as lost");
    ev_ready = 1; @(negedge clk); ev_ready = 0;
    // synchronous clear drops a held hit
    pulse(1, 3, 10, 12, le, te, tt);
    clr = 1; @(negedge clk); clr = 0;
    check(!ev_valid, "clear drops held hit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
