// tb_gx_top: end-to-end PageRank test of gx_top at reduced sizes
// (2 units, 4-vertex/8-edge gather and scatter units, 16-line caches, 600
// vertices), so that every stall and credit mechanism is exercised in a
// short run. See gx_top_tb_body.svh for what is checked.
`define GX_NUM_AU 2
`define GX_NV 600
`define GX_DEG 2
`define GX_HUB 40
`define GX_ALPHA 32'd228170137
`define GX_MAX_CYC 24000000
`define GX_READY_PCT 80
`define GX_TOP_PARAMS #(.NUM_AU(2), .GV(4), .GE(8), .SV(4), .SE(8), .VI_LINES(16), .EI_LINES(16), .VD_LINES(16), .AL_LINES(16))
module tb_gx_top;
`include "gx_top_tb_body.svh"
endmodule
