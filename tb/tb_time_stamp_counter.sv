// tb_time_stamp_counter: checks the time base against a reference count kept in the
// testbench: one count per clock while enabled, holding while disabled, Gray coding
// (each step changes exactly one bit and decodes back to the binary count), the frame
// counter advancing and frame_start pulsing on every wrap of the 12-bit count, and the
// effect of the time stamp reset, the global reset and the frame reset bit.
module tb_time_stamp_counter;
  import toast_pkg::*;
  logic clk = 0, rst_n = 1, global_rst = 0, ts_rst = 0, ts_en = 0, gray_mode = 0, frame_rst = 0;
  logic [TS_W-1:0] ts;
  logic [FRAME_W-1:0] frame_n;
  logic frame_start;
  int checks = 0, failures = 0;

  time_stamp_counter dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s ts=%0d frame=%0d", what, ts, frame_n); end
  endtask

  function automatic logic [TS_W-1:0] gray2bin(logic [TS_W-1:0] g);
    logic [TS_W-1:0] b;
    b[TS_W-1] = g[TS_W-1];
    for (int i = TS_W-2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ref_cnt, ref_frame, starts;
    logic [TS_W-1:0] prev;
    #1 rst_n = 0; #1 rst_n = 1;
    @(negedge clk);
    check(ts == 0 && frame_n == 0, "reset values");
    repeat (5) @(negedge clk);
    check(ts == 0, "holds while disabled");
    ts_en = 1; ref_cnt = 0; ref_frame = 0; starts = 0;
    for (int i = 0; i < 3 * 4096 + 100; i++) begin
      @(negedge clk);
      ref_cnt = (ref_cnt + 1) % 4096;
      if (ref_cnt == 0) ref_frame++;
      if (frame_start) starts++;
      if (i % 97 == 0 || ref_cnt < 2) begin
        check(ts == TS_W'(ref_cnt), "binary count");
        check(frame_n == FRAME_W'(ref_frame), "frame count");
      end
      check(frame_start == (ref_cnt == 0), "frame_start on wrap");
    end
    check(starts == 3, "three frame starts");
    // Gray mode
    gray_mode = 1;
    @(negedge clk); ref_cnt++;
    prev = ts;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk); ref_cnt = (ref_cnt + 1) % 4096;
      check($countones(ts ^ prev) == 1, "gray step changes one bit");
      if (i % 50 == 0) check(gray2bin(ts) == TS_W'(ref_cnt), "gray decodes to count");
      prev = ts;
    end
    gray_mode = 0;
    // time stamp reset keeps the frame number
    ts_rst = 1; @(negedge clk); ts_rst = 0;
    check(ts == 0 && frame_n == FRAME_W'(4), "ts reset clears ts only");
    @(negedge clk); check(ts == 1, "counts after ts reset");
    // frame reset bit
    frame_rst = 1; @(negedge clk); frame_rst = 0;
    check(frame_n == 0, "frame reset");
    repeat (50) @(negedge clk);
    global_rst = 1; @(negedge clk); global_rst = 0;
    check(ts == 0 && frame_n == 0, "global reset");
    ts_en = 0; repeat (3) @(negedge clk);
    check(ts == 0, "holds when disabled again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
