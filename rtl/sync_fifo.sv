// sync_fifo: single-clock first-in first-out buffer, written as a register array.
// Valid/ready handshake on both sides: a word is written when in_valid && in_ready
// and read when out_valid && out_ready. The head word is presented combinationally
// from the array (first-word fall-through), so a written word can be read the next
// cycle. A synchronous clear empties it. Depth must be a power of two.
module sync_fifo #(
  parameter int unsigned W     = 27,
  parameter int unsigned DEPTH = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic [$clog2(DEPTH):0] level
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW:0]   wp, rp;
  logic          push, pop;

  assign level     = wp - rp;
  assign in_ready  = (level != DEPTH[AW:0]);
  assign out_valid = (level != '0);
  assign out_data  = mem[rp[AW-1:0]];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wp[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else if (clr) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
    end
  end

  // the pointers never run further apart than the depth
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) 32'(level) <= DEPTH);
endmodule
