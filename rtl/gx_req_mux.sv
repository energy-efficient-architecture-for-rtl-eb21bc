// gx_req_mux: N-to-1 request multiplexer with response return path.
//
// Requests from N sources are arbitrated round-robin onto one mem_req_t
// channel. The source number is written into the tag field starting at bit
// SRC_LSB (the sources must leave those tag bits zero); a response is sent
// back to the source named in its tag, with those bits cleared again.
// Responses use valid/ready so a busy source holds the response back.
// Zero-latency (combinational) in both directions.
module gx_req_mux
  import gx_pkg::*;
#(
  parameter int unsigned N       = 2,
  parameter int unsigned SRC_LSB = 14
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     [N-1:0] in_req_valid,
  output logic     [N-1:0] in_req_ready,
  input  mem_req_t in_req [N],
  output logic     [N-1:0] in_rsp_valid,
  input  logic     [N-1:0] in_rsp_ready,
  output mem_rsp_t in_rsp [N],
  output logic     out_req_valid,
  input  logic     out_req_ready,
  output mem_req_t out_req,
  input  logic     out_rsp_valid,
  output logic     out_rsp_ready,
  input  mem_rsp_t out_rsp
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic [N-1:0]  grant;
  logic [IW-1:0] gidx;
  logic          any;

  gx_rr_arb #(.N(N)) u_arb (
    .clk, .rst_n, .req(in_req_valid), .advance(out_req_ready),
    .grant, .grant_idx(gidx), .any
  );

  always_comb begin
    out_req_valid = any;
    out_req       = in_req[gidx];
    out_req.tag   = in_req[gidx].tag | (tag_t'(gidx) << SRC_LSB);
    in_req_ready  = grant & {N{out_req_ready}};
  end

  logic [IW-1:0] rsrc;
  assign rsrc = IW'(out_rsp.tag >> SRC_LSB);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      in_rsp[i]     = out_rsp;
      in_rsp[i].tag = out_rsp.tag & ((tag_t'(1) << SRC_LSB) - 1'b1);
      in_rsp_valid[i] = out_rsp_valid && (rsrc == IW'(i));
    end
    out_rsp_ready = in_rsp_ready[rsrc];
  end
endmodule
