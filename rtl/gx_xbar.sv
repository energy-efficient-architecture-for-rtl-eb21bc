// gx_xbar: N x N crossbar between accelerator units.
//
// Each input carries a message of type T and the number of the AU it is
// for. Each output has its own round-robin arbiter over the inputs that
// address it and a one-entry output register, so every message takes one
// cycle to cross and an output can take a new message each cycle while its
// register drains. Inputs that lose arbitration, or whose output is full,
// are held (valid/ready). The document names the crossbar and its traffic
// (neighbour-data requests and responses, activations and their acks); the
// registered single-stage switch is this design's choice. The top uses four
// instances, one per kind of message.
module gx_xbar #(
  parameter int unsigned N = 4,
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [N-1:0] in_valid,
  output logic [N-1:0] in_ready,
  input  logic [$clog2(N > 1 ? N : 2)-1:0] in_dest [N],
  input  T     in_data [N],
  output logic [N-1:0] out_valid,
  input  logic [N-1:0] out_ready,
  output T     out_data [N]
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic [N-1:0]  req   [N];   // req[o][i]: input i wants output o
  logic [N-1:0]  grant [N];
  logic [IW-1:0] gidx  [N];
  logic [N-1:0]  gany;
  logic [N-1:0]  take;        // output o loads its register this cycle

  for (genvar o = 0; o < N; o++) begin : g_out
    always_comb
      for (int unsigned i = 0; i < N; i++)
        req[o][i] = in_valid[i] && (in_dest[i] == IW'(o));

    assign take[o] = gany[o] && (!out_valid[o] || out_ready[o]);

    gx_rr_arb #(.N(N)) u_arb (
      .clk, .rst_n, .req(req[o]), .advance(take[o]),
      .grant(grant[o]), .grant_idx(gidx[o]), .any(gany[o])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid[o] <= 1'b0;
      end else if (take[o]) begin
        out_valid[o] <= 1'b1;
        out_data[o]  <= in_data[gidx[o]];
      end else if (out_ready[o]) begin
        out_valid[o] <= 1'b0;
      end
    end
  end

  always_comb begin
    in_ready = '0;
    for (int unsigned o = 0; o < N; o++)
      if (take[o]) in_ready = in_ready | grant[o];
  end
endmodule
