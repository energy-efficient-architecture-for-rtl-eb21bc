// gx_top: multi-AU graph-analytics accelerator (PageRank configuration).
//
// NUM_AU accelerator units work on one graph held in system DRAM, each
// executing the vertices it owns (vertex index bits [8 +: log2 NUM_AU]).
// Four crossbars carry the traffic between units: neighbour-data requests
// (Gather Unit -> Sync Unit of the data's owner), their responses (owner's
// VertexData cache -> Gather Unit), activation messages (Scatter Unit ->
// Sync Unit of the neighbour's owner) and their acknowledgements. The
// Global Rank Counter keeps the ranks of all units unique and monotonic; the
// Global Termination Detector tells the host when all units are idle. All
// caches of all units share one memory interface to DRAM.
//
// Host protocol: write the graph (CSR offsets and edges for in- and
// out-edges), the vertex data and the initial active list to DRAM, drive
// `cfg` and `q_init`, pulse `start` for one cycle, wait for `done`.
// DRAM port: valid/ready requests, one response per request (read data or
// write acknowledgement) in any order, matched by tag, never refused.
// Default sizes are the PageRank row of Table I: 4 units, Gather Unit 32
// vertices / 128 edges, Scatter Unit 16 vertices / 128 edges.
module gx_top
  import gx_pkg::*;
#(
  parameter int unsigned NUM_AU   = 4,
  parameter int unsigned GV       = 32,
  parameter int unsigned GE       = 128,
  parameter int unsigned SV       = 16,
  parameter int unsigned SE       = 128,
  parameter int unsigned VI_LINES = 256,
  parameter int unsigned EI_LINES = 256,
  parameter int unsigned VD_LINES = 512,
  parameter int unsigned AL_LINES = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cfg_t        cfg,
  input  logic [31:0] q_init [NUM_AU],   // initial queue length per unit
  input  logic        start,
  output logic        done,
  output logic        busy,
  // system DRAM
  output logic        dram_req_valid,
  input  logic        dram_req_ready,
  output mem_req_t    dram_req,
  input  logic        dram_rsp_valid,
  input  mem_rsp_t    dram_rsp,
  // observation
  output logic [15:0] ev [NUM_AU],       // per-unit event strobes (EV_*)
  output logic [31:0] ranks_issued
);
  localparam int unsigned IW = $clog2(NUM_AU > 1 ? NUM_AU : 2);

  // crossbar endpoints
  logic [NUM_AU-1:0] nq_iv, nq_ir, nq_ov, nq_or;
  logic [IW-1:0]     nq_d [NUM_AU];
  nvd_req_t          nq_i [NUM_AU];
  nvd_req_t          nq_o [NUM_AU];
  logic [NUM_AU-1:0] nr_iv, nr_ir, nr_ov, nr_or;
  logic [IW-1:0]     nr_d [NUM_AU];
  nvd_rsp_t          nr_i [NUM_AU];
  nvd_rsp_t          nr_o [NUM_AU];
  logic [NUM_AU-1:0] aq_iv, aq_ir, aq_ov, aq_or;
  logic [IW-1:0]     aq_d [NUM_AU];
  act_req_t          aq_i [NUM_AU];
  act_req_t          aq_o [NUM_AU];
  logic [NUM_AU-1:0] ak_iv, ak_ir, ak_ov, ak_or;
  logic [IW-1:0]     ak_d [NUM_AU];
  act_ack_t          ak_i [NUM_AU];
  act_ack_t          ak_o [NUM_AU];

  logic [NUM_AU-1:0] assign_v, idle_v;
  logic              rank_inc;

  // memory ports: 4 per unit
  localparam int unsigned NP = 4 * NUM_AU;
  logic [NP-1:0] mq_v, mq_r, mr_v;
  mem_req_t      mq [NP];
  mem_rsp_t      mr [NP];

  for (genvar a = 0; a < NUM_AU; a++) begin : g_au
    au_t nq_dest, nr_dest, aq_dest, ak_dest;
    logic [3:0]     p_req_valid, p_req_ready, p_rsp_valid;
    mem_req_t       p_req [4];
    mem_rsp_t       p_rsp [4];
    logic [15:0]    g_cnt_unused, s_cnt_unused;

    gx_au #(
      .NUM_AU(NUM_AU), .GV(GV), .GE(GE), .SV(SV), .SE(SE),
      .VI_LINES(VI_LINES), .EI_LINES(EI_LINES), .VD_LINES(VD_LINES), .AL_LINES(AL_LINES)
    ) u_au (
      .clk, .rst_n, .cfg, .au_id(4'(a)), .start, .q_init(q_init[a]),
      .rank_inc, .assign_o(assign_v[a]), .idle(idle_v[a]),
      .nvdo_valid(nq_iv[a]), .nvdo_ready(nq_ir[a]), .nvdo_dest(nq_dest), .nvdo(nq_i[a]),
      .nvdi_valid(nq_ov[a]), .nvdi_ready(nq_or[a]), .nvdi(nq_o[a]),
      .nrspo_valid(nr_iv[a]), .nrspo_ready(nr_ir[a]), .nrspo_dest(nr_dest), .nrspo(nr_i[a]),
      .nrspi_valid(nr_ov[a]), .nrspi_ready(nr_or[a]), .nrspi(nr_o[a]),
      .acto_valid(aq_iv[a]), .acto_ready(aq_ir[a]), .acto_dest(aq_dest), .acto(aq_i[a]),
      .acti_valid(aq_ov[a]), .acti_ready(aq_or[a]), .acti(aq_o[a]),
      .acko_valid(ak_iv[a]), .acko_ready(ak_ir[a]), .acko_dest(ak_dest), .acko(ak_i[a]),
      .acki_valid(ak_ov[a]), .acki_ready(ak_or[a]), .acki(ak_o[a]),
      .m_req_valid(p_req_valid), .m_req_ready(p_req_ready), .m_req(p_req),
      .m_rsp_valid(p_rsp_valid), .m_rsp(p_rsp),
      .ev(ev[a]), .g_cnt(g_cnt_unused), .s_cnt(s_cnt_unused)
    );
    assign nq_d[a] = IW'(nq_dest);
    assign nr_d[a] = IW'(nr_dest);
    assign aq_d[a] = IW'(aq_dest);
    assign ak_d[a] = IW'(ak_dest);

    for (genvar c = 0; c < 4; c++) begin : g_port
      assign mq_v[4*a+c]     = p_req_valid[c];
      assign mq[4*a+c]       = p_req[c];
      assign p_req_ready[c]  = mq_r[4*a+c];
      assign p_rsp_valid[c]  = mr_v[4*a+c];
      assign p_rsp[c]        = mr[4*a+c];
    end
  end

  gx_xbar #(.N(NUM_AU), .T(nvd_req_t)) u_xb_nvd (
    .clk, .rst_n, .in_valid(nq_iv), .in_ready(nq_ir), .in_dest(nq_d), .in_data(nq_i),
    .out_valid(nq_ov), .out_ready(nq_or), .out_data(nq_o)
  );
  gx_xbar #(.N(NUM_AU), .T(nvd_rsp_t)) u_xb_rsp (
    .clk, .rst_n, .in_valid(nr_iv), .in_ready(nr_ir), .in_dest(nr_d), .in_data(nr_i),
    .out_valid(nr_ov), .out_ready(nr_or), .out_data(nr_o)
  );
  gx_xbar #(.N(NUM_AU), .T(act_req_t)) u_xb_act (
    .clk, .rst_n, .in_valid(aq_iv), .in_ready(aq_ir), .in_dest(aq_d), .in_data(aq_i),
    .out_valid(aq_ov), .out_ready(aq_or), .out_data(aq_o)
  );
  gx_xbar #(.N(NUM_AU), .T(act_ack_t)) u_xb_ack (
    .clk, .rst_n, .in_valid(ak_iv), .in_ready(ak_ir), .in_dest(ak_d), .in_data(ak_i),
    .out_valid(ak_ov), .out_ready(ak_or), .out_data(ak_o)
  );

  gx_grc #(.NUM_AU(NUM_AU)) u_grc (
    .clk, .rst_n, .assign_i(assign_v), .inc_o(rank_inc), .issued_o(ranks_issued)
  );

  gx_gtd #(.NUM_AU(NUM_AU)) u_gtd (
    .clk, .rst_n, .start, .au_idle(idle_v), .running(busy), .done
  );

  gx_mem_if #(.NPORTS(NP)) u_mif (
    .clk, .rst_n,
    .c_req_valid(mq_v), .c_req_ready(mq_r), .c_req(mq),
    .c_rsp_valid(mr_v), .c_rsp(mr),
    .dram_req_valid, .dram_req_ready, .dram_req,
    .dram_rsp_valid, .dram_rsp
  );
endmodule
