// tb_gx_top_full: end-to-end PageRank test of gx_top with every parameter
// at its default (4 units, Gather Unit 32 vertices / 128 edges, Scatter Unit
// 16 vertices / 128 edges, 10 KiB of cache per unit) on a 512-vertex random
// graph with a 160-edge hub, one complete run from start to done. See
// gx_top_tb_body.svh for what is checked.
`define GX_NUM_AU 4
`define GX_NV 512
`define GX_DEG 2
`define GX_HUB 160
`define GX_ALPHA 32'd67108864
`define GX_MAX_CYC 6000000
`define GX_READY_PCT 90
`define GX_TOP_PARAMS
module tb_gx_top_full;
`include "gx_top_tb_body.svh"
endmodule
