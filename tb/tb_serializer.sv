// tb_serializer: checks one output link.
// Words are handed over whenever the link requests one, with random delays and
// random gaps; the serial line is sampled every clock and cut into 32-bit words at
// the link's word boundaries. The recovered stream must be the handed-over words in
// order, MSB first, with sync words filling exactly the slots where no word was
// ready, and one word every 32 clocks (160 Mb/s at 160 MHz). A disabled link must
// stay at 0 and request nothing.
module tb_serializer;
  import toast_pkg::*;
  logic clk = 0, rst_n = 1, enable = 0, load = 0, tx, req, word_end;
  logic [31:0] word = '0;
  int checks = 0, failures = 0, n_sync = 0, n_words = 0, last_end = -1, cyc = 0;

  serializer dut (.*);
  always #5 clk = ~clk;

  logic [31:0] sent[$];
  logic [31:0] rx = '0;
  int nbits = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (load) sent.push_back(word);
    if (enable) begin
      rx = {rx[30:0], tx};
      if (word_end) begin
        if (last_end >= 0) check(cyc - last_end == 32, "one word per 32 clocks");
        last_end <= cyc;
        if (sent.size() > 0 && rx == sent[0]) begin
          void'(sent.pop_front()); n_words++;
        end else begin
          check(rx == SYNC_WORD, $sformatf("word %h is neither next data nor sync", rx));
          n_sync++;
        end
      end
    end
  end

  always @(negedge clk) begin
    load <= req && ($urandom % 8 == 0) && !(cyc % 3000 > 2500);
    word <= $urandom;
  end

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 rst_n = 0; #1 rst_n = 1;
    repeat (10) @(negedge clk);
    check(!tx && !req, "disabled link idle");
    enable = 1;
    repeat (12000) @(negedge clk);
    check(n_words > 300 && n_sync > 10, $sformatf("%0d words, %0d sync", n_words, n_sync));
    check(sent.size() <= 2, "no word lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
