// gx_rr_arb: round-robin arbiter. Grants one of N requesters per cycle,
// starting the search after the last requester that was granted and
// accepted. Combinational grant; the pointer moves when `advance` is high.
module gx_rr_arb #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,   // the granted request was accepted
  output logic [N-1:0] grant,
  output logic [$clog2(N > 1 ? N : 2)-1:0] grant_idx,
  output logic         any
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);
  logic [IW-1:0] last;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    any       = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned i;
      i = (int'(last) + k) % N;
      if (!any && req[i]) begin
        any       = 1'b1;
        grant[i]  = 1'b1;
        grant_idx = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                last <= IW'(N - 1);
    else if (any && advance)   last <= grant_idx;
  end
endmodule
