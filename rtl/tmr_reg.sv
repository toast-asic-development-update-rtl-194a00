// tmr_reg: a register protected against single event upsets by triplication.
// Three copies hold the same value and the output is their bitwise majority. Each
// clock every copy is written either with new data (en=1) or with the voted value,
// so an upset in one copy is outvoted at once and repaired on the next edge.
// Interface: async active-low reset to RESET_VAL, synchronous load enable `en`.
// Timing: q follows d one clock after en. The chip specification asks for SEU
// protection of registers and state machines without saying how; triplication with
// voting and scrubbing is this design's choice.
module tmr_reg #(
  parameter int unsigned          W         = 12,
  parameter logic [W-1:0]         RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] copy_a, copy_b, copy_c;
  logic [W-1:0] next;

  assign q    = (copy_a & copy_b) | (copy_a & copy_c) | (copy_b & copy_c);
  assign next = en ? d : q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      copy_a <= RESET_VAL;
      copy_b <= RESET_VAL;
      copy_c <= RESET_VAL;
    end else begin
      copy_a <= next;
      copy_b <= next;
      copy_c <= next;
    end
  end
endmodule
