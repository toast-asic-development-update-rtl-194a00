// tb_tmr_reg: checks the triplicated register: reset value, loading, holding, and
// that an upset in any single copy is outvoted at the output and repaired on the
// next clock edge. The upset is injected by writing one copy hierarchically.
module tb_tmr_reg;
  localparam int W = 12;
  logic clk = 0, rst_n = 1, en = 0;
  logic [W-1:0] d = '0, q;
  int checks = 0, failures = 0;

  tmr_reg #(.W(W), .RESET_VAL(12'h5A3)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin failures++; $display("FAIL %s: q=%h exp=%h", what, q, exp); end
  endtask

  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [W-1:0] v;
    #1 rst_n = 0;
    #1 check(12'h5A3, "reset value");
    @(negedge clk); rst_n = 1;
    @(negedge clk); check(12'h5A3, "hold after reset");
    for (int i = 0; i < 20; i++) begin
      v = W'($urandom);
      d = v; en = 1; @(negedge clk); en = 0; d = ~v;
      check(v, "load");
      @(negedge clk); check(v, "hold");
      // single event upset in one copy, chosen in turn
      case (i % 3)
        0: dut.copy_a = dut.copy_a ^ W'($urandom | 1);
        1: dut.copy_b = dut.copy_b ^ W'($urandom | 1);
        default: dut.copy_c = dut.copy_c ^ W'($urandom | 1);
      endcase
      #1 check(v, "outvoted upset");
      @(negedge clk);
      checks++;
      if (!(dut.copy_a == v && dut.copy_b == v && dut.copy_c == v)) begin
        failures++; $display("FAIL upset not repaired");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
