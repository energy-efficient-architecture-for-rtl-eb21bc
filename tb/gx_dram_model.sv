// gx_dram_model: behavioural model of the system DRAM, for testbenches.
//
// Not synthesizable hardware: a word-addressed array with a fixed access
// latency. One request is accepted per cycle (optionally refused at random
// to exercise back-pressure); the access takes effect when it is accepted,
// and its response (read data, or the written data for a write) appears
// LAT cycles later, in acceptance order. Testbenches load and inspect the
// array `mem` directly.
module gx_dram_model
  import gx_pkg::*;
#(
  parameter int unsigned WORDS     = 65536,
  parameter int unsigned LAT       = 20,
  parameter int unsigned READY_PCT = 100    // chance of accepting, percent
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     rsp_valid,
  output mem_rsp_t rsp
);
  data_t mem [WORDS];

  typedef struct packed {
    logic     v;
    mem_rsp_t r;
  } slot_t;
  slot_t pipe [LAT];

  logic rdy_q;
  assign req_ready = rdy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdy_q <= 1'b0;
      for (int i = 0; i < LAT; i++) pipe[i] <= '0;
    end else begin
      rdy_q <= ($urandom_range(99) < READY_PCT);
      for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
      pipe[0] <= '0;
      if (req_valid && req_ready) begin
        if (req.addr >= WORDS) $fatal(1, "DRAM model: address %0h out of range", req.addr);
        pipe[0].v   <= 1'b1;
        pipe[0].r.tag <= req.tag;
        if (req.we) begin
          mem[req.addr]   <= req.wdata;
          pipe[0].r.rdata <= req.wdata;
        end else begin
          pipe[0].r.rdata <= mem[req.addr];
        end
      end
    end
  end

  assign rsp_valid = pipe[LAT-1].v;
  assign rsp       = pipe[LAT-1].r;
endmodule
