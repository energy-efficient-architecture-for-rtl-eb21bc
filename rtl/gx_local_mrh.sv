// gx_local_mrh: Local Memory Request Handler of one accelerator unit.
//
// Serves the data structures only this AU reads, VertexInfo and EdgeInfo
// (document Sec. IV-H, Fig. 4). Requests from the Gather Unit (port 0) and
// the Scatter Unit (port 1) are arbitrated round-robin onto the VertexInfo
// cache and, separately, onto the EdgeInfo buffer; the requester number
// rides in tag bits [15:14] and routes each response back. The two caches
// work independently, so a VertexInfo and an EdgeInfo request can both be
// accepted in the same cycle.
module gx_local_mrh
  import gx_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // index 0: Gather Unit, 1: Scatter Unit
  input  logic     [1:0] vi_req_valid,
  output logic     [1:0] vi_req_ready,
  input  mem_req_t vi_req [2],
  output logic     [1:0] vi_rsp_valid,
  input  logic     [1:0] vi_rsp_ready,
  output mem_rsp_t vi_rsp [2],
  input  logic     [1:0] ei_req_valid,
  output logic     [1:0] ei_req_ready,
  input  mem_req_t ei_req [2],
  output logic     [1:0] ei_rsp_valid,
  input  logic     [1:0] ei_rsp_ready,
  output mem_rsp_t ei_rsp [2],
  // VertexInfo cache
  output logic     vic_req_valid,
  input  logic     vic_req_ready,
  output mem_req_t vic_req,
  input  logic     vic_rsp_valid,
  output logic     vic_rsp_ready,
  input  mem_rsp_t vic_rsp,
  // EdgeInfo buffer
  output logic     eic_req_valid,
  input  logic     eic_req_ready,
  output mem_req_t eic_req,
  input  logic     eic_rsp_valid,
  output logic     eic_rsp_ready,
  input  mem_rsp_t eic_rsp
);
  gx_req_mux #(.N(2), .SRC_LSB(14)) u_vi (
    .clk, .rst_n,
    .in_req_valid(vi_req_valid), .in_req_ready(vi_req_ready), .in_req(vi_req),
    .in_rsp_valid(vi_rsp_valid), .in_rsp_ready(vi_rsp_ready), .in_rsp(vi_rsp),
    .out_req_valid(vic_req_valid), .out_req_ready(vic_req_ready), .out_req(vic_req),
    .out_rsp_valid(vic_rsp_valid), .out_rsp_ready(vic_rsp_ready), .out_rsp(vic_rsp)
  );
  gx_req_mux #(.N(2), .SRC_LSB(14)) u_ei (
    .clk, .rst_n,
    .in_req_valid(ei_req_valid), .in_req_ready(ei_req_ready), .in_req(ei_req),
    .in_rsp_valid(ei_rsp_valid), .in_rsp_ready(ei_rsp_ready), .in_rsp(ei_rsp),
    .out_req_valid(eic_req_valid), .out_req_ready(eic_req_ready), .out_req(eic_req),
    .out_rsp_valid(eic_rsp_valid), .out_rsp_ready(eic_rsp_ready), .out_rsp(eic_rsp)
  );
endmodule
