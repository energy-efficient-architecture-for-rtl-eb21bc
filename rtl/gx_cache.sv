// gx_cache: one of the per-object-type data caches of an accelerator unit
// (VertexInfo cache, EdgeInfo buffer, VertexData cache, ActiveList cache).
//
// The document gives each graph object type its own cache with its own
// parameters but not their organisation. This design uses the simplest cache
// that does the job: direct mapped, one 64-bit word per line, write-through
// with write-allocate, one request handled at a time. A write updates the
// line and is then passed to memory; its response is returned only after
// memory has acknowledged it, so a later miss can never read stale data.
//
// Interface: request and response are valid/ready channels of mem_req_t /
// mem_rsp_t; every request gets exactly one response with its tag (a write
// returns its write data). The memory side issues one request at a time
// (tag 0) and takes the response without back-pressure.
// Timing: a read hit answers 2 cycles after acceptance (accept, respond);
// a miss or a write adds the memory round trip.
module gx_cache
  import gx_pkg::*;
#(
  parameter int unsigned LINES = 256   // number of one-word lines (power of 2)
) (
  input  logic     clk,
  input  logic     rst_n,
  // requester side
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     rsp_valid,
  input  logic     rsp_ready,
  output mem_rsp_t rsp,
  // memory side
  output logic     mem_req_valid,
  input  logic     mem_req_ready,
  output mem_req_t mem_req,
  input  logic     mem_rsp_valid,
  input  mem_rsp_t mem_rsp,
  // event pulses for statistics
  output logic     hit_o,
  output logic     miss_o
);
  localparam int unsigned IDX_W = (LINES > 1) ? $clog2(LINES) : 1;
  localparam int unsigned TAGB_W = ADDR_W - IDX_W;

  typedef enum logic [2:0] {S_IDLE, S_MREQ, S_MWAIT, S_RESP} state_e;
  state_e state;

  logic [LINES-1:0]   line_valid;
  logic [TAGB_W-1:0]  line_tag  [LINES];
  data_t              line_data [LINES];

  mem_req_t cur;
  data_t    rdata;

  logic [IDX_W-1:0]  in_idx;
  logic [TAGB_W-1:0] in_tagb;
  logic              in_hit;
  assign in_idx  = req.addr[IDX_W-1:0];
  assign in_tagb = req.addr[ADDR_W-1:IDX_W];
  assign in_hit  = line_valid[in_idx] && (line_tag[in_idx] == in_tagb);

  assign req_ready = (state == S_IDLE);
  assign rsp_valid = (state == S_RESP);
  assign rsp.rdata = rdata;
  assign rsp.tag   = cur.tag;

  assign mem_req_valid = (state == S_MREQ);
  always_comb begin
    mem_req     = cur;
    mem_req.tag = '0;
  end

  assign hit_o  = req_valid && req_ready && !req.we && in_hit;
  assign miss_o = req_valid && req_ready && !req.we && !in_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      line_valid <= '0;
      cur        <= '0;
      rdata      <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req_valid) begin
          cur <= req;
          if (req.we) begin
            line_valid[in_idx] <= 1'b1;
            line_tag[in_idx]   <= in_tagb;
            line_data[in_idx]  <= req.wdata;
            rdata              <= req.wdata;
            state              <= S_MREQ;
          end else if (in_hit) begin
            rdata <= line_data[in_idx];
            state <= S_RESP;
          end else begin
            state <= S_MREQ;
          end
        end
        S_MREQ: if (mem_req_ready) state <= S_MWAIT;
        S_MWAIT: if (mem_rsp_valid) begin
          if (!cur.we) begin
            line_valid[cur.addr[IDX_W-1:0]] <= 1'b1;
            line_tag[cur.addr[IDX_W-1:0]]   <= cur.addr[ADDR_W-1:IDX_W];
            line_data[cur.addr[IDX_W-1:0]]  <= mem_rsp.rdata;
            rdata                           <= mem_rsp.rdata;
          end
          state <= S_RESP;
        end
        S_RESP: if (rsp_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A response may only be dropped by the requester if it was never valid.
  assert property (@(posedge clk) disable iff (!rst_n)
                   rsp_valid && !rsp_ready |=> rsp_valid && $stable(rsp));

endmodule
