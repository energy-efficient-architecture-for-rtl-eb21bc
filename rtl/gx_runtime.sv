// gx_runtime: Runtime (RT) of one accelerator unit.
//
// RT moves vertices from the Active List Manager to the Sync Unit when the
// AU has room for them, and detects when the AU has finished. As in the
// document it is built around two counters: vertices in the gather stage
// (admitted, gather not yet done) and vertices in the scatter stage (gather
// done, scatter not yet done; this includes the apply pipeline). A vertex is
// admitted only while the gather count is below GV, the number of vertex
// slots in the Gather Unit, and the total is below NT, the number of rows in
// the Sync Unit table, so neither can overflow.
//
// Interface: the ALM->SYU vertex channel passes through combinationally,
// gated by the admission test; gather_done and scatter_done are one-cycle
// strobes. `idle` is high when nothing is in flight and the ALM is empty.
module gx_runtime
  import gx_pkg::*;
#(
  parameter int unsigned GV = 32,   // Gather Unit vertex slots
  parameter int unsigned NT = 16    // Sync Unit table rows
) (
  input  logic clk,
  input  logic rst_n,
  // ALM -> RT
  input  logic alm_valid,
  output logic alm_ready,
  input  vid_t alm_vid,
  // RT -> SYU
  output logic syu_valid,
  input  logic syu_ready,
  output vid_t syu_vid,
  // stage events
  input  logic gather_done,
  input  logic scatter_done,
  input  logic alm_empty,
  output logic idle,
  output logic [15:0] g_cnt,
  output logic [15:0] s_cnt,
  output logic        throttle_o    // a vertex waited for resources
);
  logic admit_ok;
  logic fire;

  assign admit_ok  = (g_cnt < 16'(GV)) && ((g_cnt + s_cnt) < 16'(NT));
  assign syu_valid = alm_valid && admit_ok;
  assign syu_vid   = alm_vid;
  assign alm_ready = syu_ready && admit_ok;
  assign fire      = syu_valid && syu_ready;
  assign throttle_o = alm_valid && !admit_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_cnt <= '0;
      s_cnt <= '0;
    end else begin
      g_cnt <= g_cnt + 16'(fire) - 16'(gather_done);
      s_cnt <= s_cnt + 16'(gather_done) - 16'(scatter_done);
    end
  end

  assign idle = (g_cnt == 0) && (s_cnt == 0) && alm_empty && !alm_valid;

  assert property (@(posedge clk) disable iff (!rst_n) gather_done |-> g_cnt != 0);
  assert property (@(posedge clk) disable iff (!rst_n) scatter_done |-> s_cnt != 0);
endmodule
