// gx_mem_if: the accelerator's single memory interface to system DRAM.
//
// All data caches of all accelerator units share one DRAM port, as the
// document states. Requests are taken round-robin, one per cycle; the cache
// number travels in the tag and selects which cache receives the response.
// Caches always accept their response (each has one request in flight), so
// the DRAM side needs no response back-pressure.
// Interface: NPORTS cache-side request channels (valid/ready) and response
// strobes; one DRAM request channel (valid/ready) and response strobe.
module gx_mem_if
  import gx_pkg::*;
#(
  parameter int unsigned NPORTS = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     [NPORTS-1:0] c_req_valid,
  output logic     [NPORTS-1:0] c_req_ready,
  input  mem_req_t c_req [NPORTS],
  output logic     [NPORTS-1:0] c_rsp_valid,
  output mem_rsp_t c_rsp [NPORTS],
  output logic     dram_req_valid,
  input  logic     dram_req_ready,
  output mem_req_t dram_req,
  input  logic     dram_rsp_valid,
  input  mem_rsp_t dram_rsp
);
  logic              out_rsp_ready;

  gx_req_mux #(.N(NPORTS), .SRC_LSB(0)) u_mux (
    .clk, .rst_n,
    .in_req_valid(c_req_valid), .in_req_ready(c_req_ready), .in_req(c_req),
    .in_rsp_valid(c_rsp_valid), .in_rsp_ready({NPORTS{1'b1}}), .in_rsp(c_rsp),
    .out_req_valid(dram_req_valid), .out_req_ready(dram_req_ready), .out_req(dram_req),
    .out_rsp_valid(dram_rsp_valid), .out_rsp_ready(out_rsp_ready), .out_rsp(dram_rsp)
  );

  // Cache responses cannot be refused.
  assert property (@(posedge clk) disable iff (!rst_n) dram_rsp_valid |-> out_rsp_ready);
endmodule
