// tb_data_framer: checks the output word stream.
// Hits are offered from a testbench queue and words are taken with a random pattern
// (as the links would). Each taken word is decoded independently: a header after
// reset and after every frame start, carrying chip id and frame number; data words
// carrying the hits in order; a trailer before every new header whose count equals
// the data words seen in the frame and whose CRC equals a bit-serial CRC-16-CCITT
// computed here over those words; sync words exactly when nothing else is pending.
module tb_data_framer;
  import toast_pkg::*;
  logic clk = 0, rst_n = 1, clr = 0;
  logic [6:0] chip_id = 7'h5B;
  logic [7:0] frame_n = '0;
  logic frame_start = 0;
  logic ev_valid, ev_ready;
  chip_event_t ev_data;
  logic [31:0] word;
  logic take = 0;
  logic [1:0] word_type;
  int checks = 0, failures = 0;
  int n_hdr = 0, n_trl = 0, n_sync = 0, n_data = 0;

  data_framer dut (.*);
  always #5 clk = ~clk;

  chip_event_t q[$];
  assign ev_valid = q.size() > 0;
  assign ev_data  = (q.size() > 0) ? q[0] : '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s word=%h", what, word); end
  endtask

  function automatic logic [15:0] crc_serial(logic [15:0] c, logic [31:0] w);
    // Galois LFSR, polynomial x^16 + x^12 + x^5 + 1
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb = c[15] ^ w[i];
      c = c << 1;
      if (fb) begin c[0] = ~c[0]; c[5] = ~c[5]; c[12] = ~c[12]; end
    end
    return c;
  endfunction

  chip_event_t expq[$];
  int frame_words = 0;
  logic [15:0] crc = 16'hFFFF;
  bit expect_header = 1;
  logic [7:0] expect_frame = 0;

  always @(posedge clk) if (rst_n) begin
    if (ev_valid && ev_ready) void'(q.pop_front());
    if (take) begin
      case (word[31:30])
        PKT_HEADER: begin
          n_hdr++;
          check(expect_header, "header expected");
          check(word[29:28] == 2'b11 && word[27:21] == chip_id && word[20:8] == 0 && word[7:0] == expect_frame,
                "header fields");
          expect_header = 0; frame_words = 0; crc = 16'hFFFF;
        end
        PKT_TRAILER: begin
          n_trl++;
          check(word[29:28] == 2'b00, "trailer marker");
          check(word[27:16] == 12'(frame_words), $sformatf("trailer count %0d vs %0d", word[27:16], frame_words));
          check(word[15:0] == crc, "trailer CRC");
          expect_header = 1;
        end
        PKT_DATA: begin
          chip_event_t e;
          n_data++;
          check(!expect_header, "no data before header");
          e = expq.pop_front();
          check(word[29:0] == e, "data word payload");
          frame_words++;
          crc = crc_serial(crc, word);
        end
        default: begin
          n_sync++;
          check(word == 32'h9966_9966 && q.size() == 0 && !expect_header, "sync only when idle");
        end
      endcase
    end
  end

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 rst_n = 0; #1 rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      take = ($urandom % 3 == 0);
      frame_start = 0;
      if ($urandom % 5 == 0 && q.size() < 10 && (i % 2000) < 1500) begin
        chip_event_t e;
        e = chip_event_t'($urandom);
        q.push_back(e); expq.push_back(e);
      end
      if (i % 1000 == 500) begin
        frame_start = 1;
        frame_n = frame_n + 1;
        expect_frame = frame_n;
      end
    end
    take = 1; frame_start = 0;
    repeat (50) @(negedge clk);
    check(n_hdr == 21 && n_trl == 20, $sformatf("%0d headers, %0d trailers", n_hdr, n_trl));
    check(n_sync > 0 && n_data > 1000, $sformatf("%0d sync, %0d data words", n_sync, n_data));
    check(expq.size() == 0, "all hits sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
