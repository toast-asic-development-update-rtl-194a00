// tb_global_readout: checks the second-level buffer.
// Eight testbench sources, one per region, offer random hits with random gaps; the
// output is read with a random ready pattern and, in one phase, stalled long enough
// to fill the 64-cell FIFO. Every hit must come out exactly once, tagged with the
// region it came from, and in order within each region. While stalled, the FIFO must
// reach 64 entries and accept nothing more.
module tb_global_readout;
  import toast_pkg::*;
  logic clk = 0, rst_n = 1, clr = 0;
  logic reg_valid [8];
  logic reg_ready [8];
  region_event_t reg_data [8];
  logic out_valid, out_ready = 0;
  chip_event_t out_data;
  logic [6:0] level;
  int checks = 0, failures = 0, max_level = 0;

  global_readout dut (.*);
  always #5 clk = ~clk;

  region_event_t src [8][$];
  region_event_t sent[8][$];
  int sent_total = 0, recv_total = 0;
  bit stall = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // sources present the head of their queue
  always_comb for (int r = 0; r < 8; r++) begin
    reg_valid[r] = src[r].size() > 0;
    reg_data[r]  = (src[r].size() > 0) ? src[r][0] : '0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int r = 0; r < 8; r++) if (reg_valid[r] && reg_ready[r]) begin
        sent[r].push_back(src[r].pop_front());
        sent_total++;
      end
      if (out_valid && out_ready) begin
        region_event_t e;
        recv_total++;
        if (sent[out_data.region].size() == 0) begin
          checks++; failures++; $display("FAIL hit from region %0d never sent", out_data.region);
        end else begin
          e = sent[out_data.region].pop_front();
          check(e == '{channel: out_data.channel, le: out_data.le, te: out_data.te},
                $sformatf("region %0d hit in order and intact", out_data.region));
        end
      end
      if (32'(level) > max_level) max_level = 32'(level);
      check(level <= 64, "level within depth");
    end
  end

  always @(negedge clk) out_ready <= !stall && ($urandom % 4 != 0);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 rst_n = 0; #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int r = 0; r < 8; r++)
        if ($urandom % 16 == 0 && src[r].size() < 4)
          src[r].push_back('{channel: 3'($urandom), le: 12'($urandom), te: 12'($urandom)});
      if (i == 1000) stall = 1;
      if (i == 1400) begin
        check(level == 64, $sformatf("FIFO full while stalled (level %0d)", level));
        stall = 0;
      end
    end
    repeat (200) @(negedge clk);
    for (int r = 0; r < 8; r++) check(src[r].size() == 0 && sent[r].size() == 0, $sformatf("region %0d drained", r));
    check(recv_total == sent_total && recv_total > 1000, $sformatf("%0d hits in, %0d out", sent_total, recv_total));
    check(max_level == 64, "reached 64 entries");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
