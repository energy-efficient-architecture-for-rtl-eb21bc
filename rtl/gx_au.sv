// gx_au: one Accelerator Unit (AU), document Fig. 2 and one half of Fig. 4.
//
// Vertices flow ALM -> Runtime -> Sync Unit -> Gather Unit -> Apply Unit ->
// Scatter Unit. The Gather Unit's neighbour-data reads and the Scatter
// Unit's activation messages leave the AU through the crossbar ports, since
// they go to the Sync Unit of the AU that owns the target vertex (which may
// be this one); requests from other AUs arrive on the matching input ports.
// VertexInfo and EdgeInfo are read through the local memory request
// handler; VertexData and ActiveList are reached through the global one.
// Each of the four caches has its own port to the shared memory interface
// (index 0 VertexInfo, 1 EdgeInfo, 2 VertexData, 3 ActiveList).
// The PageRank configuration has no edge data, so there is no EdgeData
// cache. Default sizes are the PageRank column of Table I.
// The Runtime admits at most NT = SV vertices at a time (gathering plus
// scattering), so a vertex leaving the Apply Unit always finds a Scatter
// Unit slot. With more in flight, Scatter Unit slots held by higher-rank
// vertices whose activations wait for a lower-rank vertex's gather-done can
// block the Apply Unit, and the lower-rank vertex the whole chain waits on
// then never reaches the Scatter Unit (a deadlock).
module gx_au
  import gx_pkg::*;
#(
  parameter int unsigned NUM_AU   = 4,
  parameter int unsigned GV       = 32,
  parameter int unsigned GE       = 128,
  parameter int unsigned SV       = 16,
  parameter int unsigned SE       = 128,
  parameter int unsigned NT       = SV,        // vertices in flight, see below
  parameter int unsigned RP       = NUM_AU * GE,
  parameter int unsigned WP       = NUM_AU * SE,
  parameter int unsigned VI_LINES = 256,
  parameter int unsigned EI_LINES = 256,
  parameter int unsigned VD_LINES = 512,
  parameter int unsigned AL_LINES = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cfg_t        cfg,
  input  logic [3:0]  au_id,
  input  logic        start,
  input  logic [31:0] q_init,
  input  logic        rank_inc,
  output logic        assign_o,
  output logic        idle,
  // crossbar: neighbour-data requests
  output logic        nvdo_valid,
  input  logic        nvdo_ready,
  output au_t         nvdo_dest,
  output nvd_req_t    nvdo,
  input  logic        nvdi_valid,
  output logic        nvdi_ready,
  input  nvd_req_t    nvdi,
  // crossbar: neighbour-data responses
  output logic        nrspo_valid,
  input  logic        nrspo_ready,
  output au_t         nrspo_dest,
  output nvd_rsp_t    nrspo,
  input  logic        nrspi_valid,
  output logic        nrspi_ready,
  input  nvd_rsp_t    nrspi,
  // crossbar: activations
  output logic        acto_valid,
  input  logic        acto_ready,
  output au_t         acto_dest,
  output act_req_t    acto,
  input  logic        acti_valid,
  output logic        acti_ready,
  input  act_req_t    acti,
  // crossbar: activation acknowledgements
  output logic        acko_valid,
  input  logic        acko_ready,
  output au_t         acko_dest,
  output act_ack_t    acko,
  input  logic        acki_valid,
  output logic        acki_ready,
  input  act_ack_t    acki,
  // memory interface, one port per cache
  output logic        [3:0] m_req_valid,
  input  logic        [3:0] m_req_ready,
  output mem_req_t    m_req [4],
  input  logic        [3:0] m_rsp_valid,
  input  mem_rsp_t    m_rsp [4],
  // event strobes, one bit per mechanism (see the EV_* constants)
  output logic [15:0] ev,
  output logic [15:0] g_cnt,   // vertices in the gather stage
  output logic [15:0] s_cnt    // vertices in the scatter stage
);
  // ---------------- ALM, Runtime ----------------
  logic alm_vtx_valid, alm_vtx_ready, alm_empty;
  vid_t alm_vtx;
  logic rt_valid, rt_ready;
  vid_t rt_vid;
  logic gdone_valid, sdone_valid;
  logic [7:0] gdone_row, sdone_row;
  logic act2alm_valid, act2alm_ready;
  vid_t act2alm_vid;
  logic     alm_mreq_valid, alm_mreq_ready, alm_mrsp_valid, alm_mrsp_ready;
  mem_req_t alm_mreq;
  mem_rsp_t alm_mrsp;
  logic alm_local_set, alm_remote_set, alm_queue_push, rt_throttle;

  gx_alm u_alm (
    .clk, .rst_n, .cfg, .au_id, .start, .q_init,
    .act_valid(act2alm_valid), .act_ready(act2alm_ready), .act_vid(act2alm_vid),
    .vtx_valid(alm_vtx_valid), .vtx_ready(alm_vtx_ready), .vtx_vid(alm_vtx),
    .empty(alm_empty),
    .mreq_valid(alm_mreq_valid), .mreq_ready(alm_mreq_ready), .mreq(alm_mreq),
    .mrsp_valid(alm_mrsp_valid), .mrsp_ready(alm_mrsp_ready), .mrsp(alm_mrsp),
    .local_set_o(alm_local_set), .remote_set_o(alm_remote_set), .queue_push_o(alm_queue_push)
  );

  gx_runtime #(.GV(GV), .NT(NT)) u_rt (
    .clk, .rst_n,
    .alm_valid(alm_vtx_valid), .alm_ready(alm_vtx_ready), .alm_vid(alm_vtx),
    .syu_valid(rt_valid), .syu_ready(rt_ready), .syu_vid(rt_vid),
    .gather_done(gdone_valid), .scatter_done(sdone_valid), .alm_empty,
    .idle, .g_cnt, .s_cnt, .throttle_o(rt_throttle)
  );

  // ---------------- Sync Unit ----------------
  logic syu_gu_valid, syu_gu_ready;
  vtx_t syu_gu_vtx;
  logic     syu_vd_valid, syu_vd_ready;
  mem_req_t syu_vd_req;
  logic syu_raw, syu_war, syu_filt, syu_dup;

  gx_syu #(.NUM_AU(NUM_AU), .NT(NT), .RP(RP), .WP(WP)) u_syu (
    .clk, .rst_n, .cfg, .au_id, .rank_inc, .assign_o,
    .nv_valid(rt_valid), .nv_ready(rt_ready), .nv_vid(rt_vid),
    .gu_valid(syu_gu_valid), .gu_ready(syu_gu_ready), .gu_vtx(syu_gu_vtx),
    .gdone_valid, .gdone_row, .sdone_valid, .sdone_row,
    .nvd_valid(nvdi_valid), .nvd_ready(nvdi_ready), .nvd(nvdi),
    .vd_valid(syu_vd_valid), .vd_ready(syu_vd_ready), .vd_req(syu_vd_req),
    .act_valid(acti_valid), .act_ready(acti_ready), .act(acti),
    .alm_valid(act2alm_valid), .alm_ready(act2alm_ready), .alm_vid(act2alm_vid),
    .ack_valid(acko_valid), .ack_ready(acko_ready), .ack_dest(acko_dest), .ack(acko),
    .raw_stall_o(syu_raw), .war_stall_o(syu_war), .filtered_o(syu_filt), .dup_hold_o(syu_dup)
  );

  // ---------------- Gather, Apply, Scatter ----------------
  logic [1:0] lvi_req_valid, lvi_req_ready, lvi_rsp_valid, lvi_rsp_ready;
  logic [1:0] lei_req_valid, lei_req_ready, lei_rsp_valid, lei_rsp_ready;
  mem_req_t   lvi_req [2];
  mem_req_t   lei_req [2];
  mem_rsp_t   lvi_rsp [2];
  mem_rsp_t   lei_rsp [2];
  logic        ga_valid, ga_ready;
  gather_out_t ga;
  logic        as_valid, as_ready;
  apply_out_t  as_;
  logic     scw_req_valid, scw_req_ready, scw_rsp_valid, scw_rsp_ready;
  mem_req_t scw_req;
  mem_rsp_t scw_rsp;
  logic gu_asg, gu_cw, scu_asg, scu_cw;

  gx_gather #(.NUM_AU(NUM_AU), .GV(GV), .GE(GE)) u_gu (
    .clk, .rst_n, .cfg, .au_id,
    .in_valid(syu_gu_valid), .in_ready(syu_gu_ready), .in_vtx(syu_gu_vtx),
    .vi_req_valid(lvi_req_valid[0]), .vi_req_ready(lvi_req_ready[0]), .vi_req(lvi_req[0]),
    .vi_rsp_valid(lvi_rsp_valid[0]), .vi_rsp_ready(lvi_rsp_ready[0]), .vi_rsp(lvi_rsp[0]),
    .ei_req_valid(lei_req_valid[0]), .ei_req_ready(lei_req_ready[0]), .ei_req(lei_req[0]),
    .ei_rsp_valid(lei_rsp_valid[0]), .ei_rsp_ready(lei_rsp_ready[0]), .ei_rsp(lei_rsp[0]),
    .nvd_valid(nvdo_valid), .nvd_ready(nvdo_ready), .nvd_dest(nvdo_dest), .nvd(nvdo),
    .nrsp_valid(nrspi_valid), .nrsp_ready(nrspi_ready), .nrsp(nrspi),
    .out_valid(ga_valid), .out_ready(ga_ready), .out(ga),
    .gdone_valid, .gdone_row,
    .edge_assign_o(gu_asg), .credit_wait_o(gu_cw)
  );

  gx_apply u_apu (
    .clk, .rst_n, .cfg,
    .in_valid(ga_valid), .in_ready(ga_ready), .in(ga),
    .out_valid(as_valid), .out_ready(as_ready), .out(as_)
  );

  gx_scatter #(.NUM_AU(NUM_AU), .SV(SV), .SE(SE)) u_scu (
    .clk, .rst_n, .cfg, .au_id,
    .in_valid(as_valid), .in_ready(as_ready), .in(as_),
    .vi_req_valid(lvi_req_valid[1]), .vi_req_ready(lvi_req_ready[1]), .vi_req(lvi_req[1]),
    .vi_rsp_valid(lvi_rsp_valid[1]), .vi_rsp_ready(lvi_rsp_ready[1]), .vi_rsp(lvi_rsp[1]),
    .ei_req_valid(lei_req_valid[1]), .ei_req_ready(lei_req_ready[1]), .ei_req(lei_req[1]),
    .ei_rsp_valid(lei_rsp_valid[1]), .ei_rsp_ready(lei_rsp_ready[1]), .ei_rsp(lei_rsp[1]),
    .act_valid(acto_valid), .act_ready(acto_ready), .act_dest(acto_dest), .act(acto),
    .ack_valid(acki_valid), .ack_ready(acki_ready), .ack(acki),
    .wr_req_valid(scw_req_valid), .wr_req_ready(scw_req_ready), .wr_req(scw_req),
    .wr_rsp_valid(scw_rsp_valid), .wr_rsp_ready(scw_rsp_ready), .wr_rsp(scw_rsp),
    .sdone_valid, .sdone_row,
    .edge_assign_o(scu_asg), .credit_wait_o(scu_cw)
  );

  // ---------------- memory request handlers and caches ----------------
  logic     [3:0] c_req_valid, c_req_ready, c_rsp_valid, c_rsp_ready;
  mem_req_t c_req [4];
  mem_rsp_t c_rsp [4];

  gx_local_mrh u_lmrh (
    .clk, .rst_n,
    .vi_req_valid(lvi_req_valid), .vi_req_ready(lvi_req_ready), .vi_req(lvi_req),
    .vi_rsp_valid(lvi_rsp_valid), .vi_rsp_ready(lvi_rsp_ready), .vi_rsp(lvi_rsp),
    .ei_req_valid(lei_req_valid), .ei_req_ready(lei_req_ready), .ei_req(lei_req),
    .ei_rsp_valid(lei_rsp_valid), .ei_rsp_ready(lei_rsp_ready), .ei_rsp(lei_rsp),
    .vic_req_valid(c_req_valid[0]), .vic_req_ready(c_req_ready[0]), .vic_req(c_req[0]),
    .vic_rsp_valid(c_rsp_valid[0]), .vic_rsp_ready(c_rsp_ready[0]), .vic_rsp(c_rsp[0]),
    .eic_req_valid(c_req_valid[1]), .eic_req_ready(c_req_ready[1]), .eic_req(c_req[1]),
    .eic_rsp_valid(c_rsp_valid[1]), .eic_rsp_ready(c_rsp_ready[1]), .eic_rsp(c_rsp[1])
  );

  gx_global_mrh u_gmrh (
    .clk, .rst_n,
    .syu_req_valid(syu_vd_valid), .syu_req_ready(syu_vd_ready), .syu_req(syu_vd_req),
    .nrsp_valid(nrspo_valid), .nrsp_ready(nrspo_ready), .nrsp_dest(nrspo_dest), .nrsp(nrspo),
    .scu_req_valid(scw_req_valid), .scu_req_ready(scw_req_ready), .scu_req(scw_req),
    .scu_rsp_valid(scw_rsp_valid), .scu_rsp_ready(scw_rsp_ready), .scu_rsp(scw_rsp),
    .alm_req_valid(alm_mreq_valid), .alm_req_ready(alm_mreq_ready), .alm_req(alm_mreq),
    .alm_rsp_valid(alm_mrsp_valid), .alm_rsp_ready(alm_mrsp_ready), .alm_rsp(alm_mrsp),
    .vdc_req_valid(c_req_valid[2]), .vdc_req_ready(c_req_ready[2]), .vdc_req(c_req[2]),
    .vdc_rsp_valid(c_rsp_valid[2]), .vdc_rsp_ready(c_rsp_ready[2]), .vdc_rsp(c_rsp[2]),
    .alc_req_valid(c_req_valid[3]), .alc_req_ready(c_req_ready[3]), .alc_req(c_req[3]),
    .alc_rsp_valid(c_rsp_valid[3]), .alc_rsp_ready(c_rsp_ready[3]), .alc_rsp(c_rsp[3])
  );

  localparam int unsigned LINES [4] = '{VI_LINES, EI_LINES, VD_LINES, AL_LINES};
  logic [3:0] c_hit, c_miss;

  for (genvar c = 0; c < 4; c++) begin : g_cache
    gx_cache #(.LINES(LINES[c])) u_cache (
      .clk, .rst_n,
      .req_valid(c_req_valid[c]), .req_ready(c_req_ready[c]), .req(c_req[c]),
      .rsp_valid(c_rsp_valid[c]), .rsp_ready(c_rsp_ready[c]), .rsp(c_rsp[c]),
      .mem_req_valid(m_req_valid[c]), .mem_req_ready(m_req_ready[c]), .mem_req(m_req[c]),
      .mem_rsp_valid(m_rsp_valid[c]), .mem_rsp(m_rsp[c]),
      .hit_o(c_hit[c]), .miss_o(c_miss[c])
    );
  end

  always_comb begin
    ev                 = '0;
    ev[EV_RAW_STALL]   = syu_raw;
    ev[EV_WAR_STALL]   = syu_war;
    ev[EV_FILTERED]    = syu_filt;
    ev[EV_DUP_HOLD]    = syu_dup;
    ev[EV_ALM_LOCAL]   = alm_local_set;
    ev[EV_ALM_REMOTE]  = alm_remote_set;
    ev[EV_ALM_PUSH]    = alm_queue_push;
    ev[EV_RT_THROTTLE] = rt_throttle;
    ev[EV_GU_EDGE]     = gu_asg;
    ev[EV_GU_CREDIT]   = gu_cw;
    ev[EV_SCU_EDGE]    = scu_asg;
    ev[EV_SCU_CREDIT]  = scu_cw;
    ev[EV_CACHE_HIT]   = |c_hit;
    ev[EV_CACHE_MISS]  = |c_miss;
    ev[EV_GATHER_DONE] = gdone_valid;
    ev[EV_SCATTER_DONE] = sdone_valid;
  end
endmodule
