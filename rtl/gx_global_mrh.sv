// gx_global_mrh: Global Memory Request Handler of one accelerator unit.
//
// Serves the data structures that any AU may reach through this AU's Sync
// Unit or ALM (document Sec. IV-H, Fig. 4): VertexData and ActiveList.
//  * VertexData cache: neighbour-data reads forwarded by the Sync Unit
//    (port 0) and vertex-data writes of this AU's Scatter Unit (port 1) are
//    arbitrated round-robin. A read response is turned into a crossbar
//    message for the requesting AU, whose number the Sync Unit placed in
//    tag bits [13:10] (bits [9:0] are the Gather Unit's own tag). A write
//    acknowledgement returns to the Scatter Unit.
//  * ActiveList cache: used by the ALM alone, so its channel is connected
//    straight through.
module gx_global_mrh
  import gx_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // Sync Unit neighbour-data reads
  input  logic     syu_req_valid,
  output logic     syu_req_ready,
  input  mem_req_t syu_req,
  // read responses towards the crossbar
  output logic     nrsp_valid,
  input  logic     nrsp_ready,
  output au_t      nrsp_dest,
  output nvd_rsp_t nrsp,
  // Scatter Unit writes
  input  logic     scu_req_valid,
  output logic     scu_req_ready,
  input  mem_req_t scu_req,
  output logic     scu_rsp_valid,
  input  logic     scu_rsp_ready,
  output mem_rsp_t scu_rsp,
  // ALM
  input  logic     alm_req_valid,
  output logic     alm_req_ready,
  input  mem_req_t alm_req,
  output logic     alm_rsp_valid,
  input  logic     alm_rsp_ready,
  output mem_rsp_t alm_rsp,
  // VertexData cache
  output logic     vdc_req_valid,
  input  logic     vdc_req_ready,
  output mem_req_t vdc_req,
  input  logic     vdc_rsp_valid,
  output logic     vdc_rsp_ready,
  input  mem_rsp_t vdc_rsp,
  // ActiveList cache
  output logic     alc_req_valid,
  input  logic     alc_req_ready,
  output mem_req_t alc_req,
  input  logic     alc_rsp_valid,
  output logic     alc_rsp_ready,
  input  mem_rsp_t alc_rsp
);
  logic     [1:0] in_valid, in_ready, rsp_valid, rsp_ready;
  mem_req_t in_req  [2];
  mem_rsp_t rsp     [2];

  assign in_valid      = {scu_req_valid, syu_req_valid};
  assign in_req[0]     = syu_req;
  assign in_req[1]     = scu_req;
  assign syu_req_ready = in_ready[0];
  assign scu_req_ready = in_ready[1];

  gx_req_mux #(.N(2), .SRC_LSB(14)) u_vd (
    .clk, .rst_n,
    .in_req_valid(in_valid), .in_req_ready(in_ready), .in_req(in_req),
    .in_rsp_valid(rsp_valid), .in_rsp_ready(rsp_ready), .in_rsp(rsp),
    .out_req_valid(vdc_req_valid), .out_req_ready(vdc_req_ready), .out_req(vdc_req),
    .out_rsp_valid(vdc_rsp_valid), .out_rsp_ready(vdc_rsp_ready), .out_rsp(vdc_rsp)
  );

  assign nrsp_valid  = rsp_valid[0];
  assign nrsp_dest   = au_t'(rsp[0].tag[13:10]);
  assign nrsp.tag    = tag_t'(rsp[0].tag[9:0]);
  assign nrsp.data   = rsp[0].rdata;
  assign rsp_ready[0] = nrsp_ready;

  assign scu_rsp_valid = rsp_valid[1];
  assign scu_rsp       = rsp[1];
  assign rsp_ready[1]  = scu_rsp_ready;

  assign alc_req_valid = alm_req_valid;
  assign alm_req_ready = alc_req_ready;
  assign alc_req       = alm_req;
  assign alm_rsp_valid = alc_rsp_valid;
  assign alc_rsp_ready = alm_rsp_ready;
  assign alm_rsp       = alc_rsp;
endmodule
