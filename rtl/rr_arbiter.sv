// rr_arbiter: round-robin arbiter for N requesters.
// grant is one-hot (or zero when nothing requests) and is computed combinationally
// from req, starting the search one position after the last granted requester, so
// every requester is served within N grants. The pointer moves only when `advance`
// is high (the granted request was accepted downstream).
module rr_arbiter #(
  parameter int unsigned N = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] grant_idx
);
  localparam int unsigned IW = $clog2(N);
  logic [IW-1:0] last;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    for (int k = N; k >= 1; k--) begin
      // k = N is checked first but loses to smaller k: the nearest one after `last` wins
      int unsigned idx;
      idx = (32'(last) + 32'(k)) % N;
      if (req[idx]) begin
        grant     = '0;
        grant[idx] = 1'b1;
        grant_idx = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    last <= IW'(N - 1);
    else if (advance && |req)      last <= grant_idx;
  end
endmodule
