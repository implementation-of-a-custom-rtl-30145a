// Round-robin arbiter over N requesters.
//
// `grant` is one-hot (or zero when nothing requests) and is combinational in
// `req`. The search starts at the requester after the one last served, so
// every requester is served within N accepted grants. When `accept` is high
// the current winner is recorded as last served. `grant_idx` is the binary
// index of the winner. A helper of the interconnection network.
module rr_arbiter #(
  parameter int unsigned N = 128
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N-1:0]                 req,
  input  logic                         accept,
  output logic [N-1:0]                 grant,
  output logic [$clog2(N)-1:0]         grant_idx,
  output logic                         any
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;   // first requester to look at

  always_comb begin
    int unsigned idx;
    logic        found;
    grant     = '0;
    grant_idx = '0;
    found     = 1'b0;
    for (int unsigned o = 0; o < N; o++) begin
      idx = int'(ptr) + o;
      if (idx >= N) idx = idx - N;
      if (!found && req[idx]) begin
        found          = 1'b1;
        grant[idx]     = 1'b1;
        grant_idx      = IW'(idx);
      end
    end
    any = found;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             ptr <= '0;
    else if (accept && any) ptr <= (int'(grant_idx) == N - 1) ? '0 : grant_idx + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
