// tb_gx_au: PageRank run on a single accelerator unit. The unit's crossbar
// ports are looped back to itself and its memory ports go through a memory
// interface to a DRAM model; the shared end-to-end body checks every final
// rank against a reference and that the unit's stall, credit and active-list
// mechanisms were all exercised (remote activations cannot occur with one unit).
`define GX_AU_HARNESS
`define GX_NUM_AU 1
`define GX_NV 200
`define GX_DEG 2
`define GX_HUB 24
`define GX_ALPHA 32'd134217728
`define GX_MAX_CYC 20000000
`define GX_READY_PCT 80
`define GX_TOP_PARAMS #(.NUM_AU(1), .GV(4), .GE(8), .SV(4), .SE(8), .VI_LINES(16), .EI_LINES(16), .VD_LINES(16), .AL_LINES(16))
module tb_gx_au;
`include "gx_top_tb_body.svh"
endmodule
