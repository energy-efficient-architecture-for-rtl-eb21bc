// Shared body of the end-to-end PageRank testbenches of gx_top.
//
// The including module defines GX_NUM_AU, GX_NV (vertices), GX_DEG (mean
// out-degree), GX_HUB (in- and out-degree of one hub vertex), GX_ALPHA
// (alpha in Q4.28), GX_MAX_CYC (watchdog), GX_READY_PCT and GX_TOP_PARAMS
// (the parameter list of gx_top, empty for the default configuration).
//
// The testbench plays the host: it builds a random directed graph with a
// fixed seed, lays out the in-edge and out-edge CSR arrays, the vertex data
// (rank 0, 1/out-degree) and an active list holding every vertex in DRAM,
// starts the accelerator and waits for done. With epsilon = 0 every update
// is monotone from below, so whatever order the accelerator processes
// vertices in, it must end at the same integer fixed point: the least fixed
// point of r_v = base + alpha * sum(r_u * (1/d_u)), computed here
// independently by plain Gauss-Seidel iteration with the same truncations.
// Every vertex's rank is compared with it, the active list must be empty,
// and each mechanism of the design (RAW and WAR stalls, activation
// filtering, local and in-memory activations, Runtime throttling, edge-slot
// credits running out, cache hits and misses) must have happened.

  import gx_pkg::*;

  localparam int NA   = `GX_NUM_AU;
  localparam int NV   = `GX_NV;
  localparam int NSEG = (NV + 255) / 256;
  localparam int QCAP = (NSEG + NA - 1) / NA + 1;
  localparam int MAXE = NV * (2 * `GX_DEG + 1) + 2 * `GX_HUB;
  localparam int MEMW = 8 * NV + 4 * MAXE + 16 * NSEG + NA * QCAP + 64;
  localparam int unsigned FIX1 = 32'd1 << FRAC_W;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t        cfg;
  logic [31:0] q_init [NA];
  logic        start = 1'b0;
  logic        done, busy;
  logic        dram_req_valid, dram_req_ready, dram_rsp_valid;
  mem_req_t    dram_req;
  mem_rsp_t    dram_rsp;
  logic [15:0] ev [NA];
  logic [31:0] ranks_issued;

`ifndef GX_AU_HARNESS
  gx_top `GX_TOP_PARAMS dut (
    .clk, .rst_n, .cfg, .q_init, .start, .done, .busy,
    .dram_req_valid, .dram_req_ready, .dram_req, .dram_rsp_valid, .dram_rsp,
    .ev, .ranks_issued
  );
`else
  // single accelerator unit: its crossbar ports are looped back through
  // one-port crossbars, its four memory ports go through a memory interface
  logic       rank_inc, au_idle;
  logic       nqo_v, nqo_r, nqi_v, nqi_r, nro_v, nro_r, nri_v, nri_r;
  logic       aqo_v, aqo_r, aqi_v, aqi_r, ako_v, ako_r, aki_v, aki_r;
  au_t        nq_dst, nr_dst, aq_dst, ak_dst;
  nvd_req_t   nqo [1], nqi [1];
  nvd_rsp_t   nro [1], nri [1];
  act_req_t   aqo [1], aqi [1];
  act_ack_t   ako [1], aki [1];
  logic       zd [1];
  assign zd[0] = 1'b0;
  logic [3:0] p_req_valid, p_req_ready, p_rsp_valid;
  mem_req_t   p_req [4];
  mem_rsp_t   p_rsp [4];
  logic [15:0] g_cnt, s_cnt;

  gx_au `GX_TOP_PARAMS dut (
    .clk, .rst_n, .cfg, .au_id(4'd0), .start, .q_init(q_init[0]),
    .rank_inc, .assign_o(rank_inc), .idle(au_idle),
    .nvdo_valid(nqo_v), .nvdo_ready(nqo_r), .nvdo_dest(nq_dst), .nvdo(nqo[0]),
    .nvdi_valid(nqi_v), .nvdi_ready(nqi_r), .nvdi(nqi[0]),
    .nrspo_valid(nro_v), .nrspo_ready(nro_r), .nrspo_dest(nr_dst), .nrspo(nro[0]),
    .nrspi_valid(nri_v), .nrspi_ready(nri_r), .nrspi(nri[0]),
    .acto_valid(aqo_v), .acto_ready(aqo_r), .acto_dest(aq_dst), .acto(aqo[0]),
    .acti_valid(aqi_v), .acti_ready(aqi_r), .acti(aqi[0]),
    .acko_valid(ako_v), .acko_ready(ako_r), .acko_dest(ak_dst), .acko(ako[0]),
    .acki_valid(aki_v), .acki_ready(aki_r), .acki(aki[0]),
    .m_req_valid(p_req_valid), .m_req_ready(p_req_ready), .m_req(p_req),
    .m_rsp_valid(p_rsp_valid), .m_rsp(p_rsp),
    .ev(ev[0]), .g_cnt, .s_cnt
  );
  gx_xbar #(.N(1), .T(nvd_req_t)) u_lb_nvd (.clk, .rst_n,
    .in_valid(nqo_v), .in_ready(nqo_r), .in_dest(zd), .in_data(nqo),
    .out_valid(nqi_v), .out_ready(nqi_r), .out_data(nqi));
  gx_xbar #(.N(1), .T(nvd_rsp_t)) u_lb_rsp (.clk, .rst_n,
    .in_valid(nro_v), .in_ready(nro_r), .in_dest(zd), .in_data(nro),
    .out_valid(nri_v), .out_ready(nri_r), .out_data(nri));
  gx_xbar #(.N(1), .T(act_req_t)) u_lb_act (.clk, .rst_n,
    .in_valid(aqo_v), .in_ready(aqo_r), .in_dest(zd), .in_data(aqo),
    .out_valid(aqi_v), .out_ready(aqi_r), .out_data(aqi));
  gx_xbar #(.N(1), .T(act_ack_t)) u_lb_ack (.clk, .rst_n,
    .in_valid(ako_v), .in_ready(ako_r), .in_dest(zd), .in_data(ako),
    .out_valid(aki_v), .out_ready(aki_r), .out_data(aki));
  gx_mem_if #(.NPORTS(4)) u_mif (.clk, .rst_n,
    .c_req_valid(p_req_valid), .c_req_ready(p_req_ready), .c_req(p_req),
    .c_rsp_valid(p_rsp_valid), .c_rsp(p_rsp),
    .dram_req_valid, .dram_req_ready, .dram_req, .dram_rsp_valid, .dram_rsp);
  gx_gtd #(.NUM_AU(1)) u_gtd (.clk, .rst_n, .start, .au_idle(au_idle), .running(busy), .done);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ranks_issued <= '0;
    else if (rank_inc) ranks_issued <= ranks_issued + 1;
`endif

  gx_dram_model #(.WORDS(MEMW), .LAT(20), .READY_PCT(`GX_READY_PCT)) u_dram (
    .clk, .rst_n, .req_valid(dram_req_valid), .req_ready(dram_req_ready), .req(dram_req),
    .rsp_valid(dram_rsp_valid), .rsp(dram_rsp)
  );

  int checks = 0;
  int failures = 0;
  longint cycles = 0;
  longint evc [16];

  always @(posedge clk) begin
    cycles <= cycles + 1;
    for (int a = 0; a < NA; a++)
      for (int b = 0; b < 16; b++)
        if (rst_n && ev[a][b]) evc[b] = evc[b] + 1;
  end

  // watchdog
  initial begin
    repeat (`GX_MAX_CYC) @(posedge clk);
    failures++;
    $display("watchdog: no done after %0d cycles", `GX_MAX_CYC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // graph
  int src [MAXE];
  int dst [MAXE];
  int ne;
  int indeg [NV];
  int outdeg [NV];
  int in_off [NV+1];
  int out_off [NV+1];
  int in_src [MAXE];
  int out_dst [MAXE];
  logic [31:0] invd [NV];
  logic [31:0] ref_r [NV];

  task automatic build_graph();
    int fill [NV];
    ne = 0;
    for (int v = 0; v < NV; v++) begin
      int d;
      d = int'($urandom_range(2 * `GX_DEG));
      for (int k = 0; k < d; k++) begin
        src[ne] = v;
        dst[ne] = int'($urandom_range(NV - 1));
        ne++;
      end
    end
    // a hub: many in-edges to vertex 1 and many out-edges from vertex 2
    for (int k = 0; k < `GX_HUB; k++) begin
      src[ne] = int'($urandom_range(NV - 1)); dst[ne] = 1; ne++;
      src[ne] = 2; dst[ne] = int'($urandom_range(NV - 1)); ne++;
    end
    for (int v = 0; v < NV; v++) begin indeg[v] = 0; outdeg[v] = 0; end
    for (int e = 0; e < ne; e++) begin indeg[dst[e]]++; outdeg[src[e]]++; end
    in_off[0] = 0; out_off[0] = 0;
    for (int v = 0; v < NV; v++) begin
      in_off[v+1]  = in_off[v] + indeg[v];
      out_off[v+1] = out_off[v] + outdeg[v];
    end
    for (int v = 0; v < NV; v++) fill[v] = 0;
    for (int e = 0; e < ne; e++) begin in_src[in_off[dst[e]] + fill[dst[e]]] = src[e]; fill[dst[e]]++; end
    for (int v = 0; v < NV; v++) fill[v] = 0;
    for (int e = 0; e < ne; e++) begin out_dst[out_off[src[e]] + fill[src[e]]] = dst[e]; fill[src[e]]++; end
    for (int v = 0; v < NV; v++)
      invd[v] = (outdeg[v] == 0) ? 32'd0 : FIX1 / 32'(outdeg[v]);
  endtask

  // reference: least fixed point by Gauss-Seidel sweeps
  task automatic reference(input logic [31:0] base, input logic [31:0] alpha);
    bit changed;
    int sweeps;
    for (int v = 0; v < NV; v++) ref_r[v] = 0;
    sweeps = 0;
    do begin
      changed = 0;
      for (int v = 0; v < NV; v++) begin
        logic [63:0] sum, p;
        logic [31:0] rn;
        sum = 0;
        for (int k = in_off[v]; k < in_off[v+1]; k++) begin
          p   = 64'(ref_r[in_src[k]]) * 64'(invd[in_src[k]]);
          sum = sum + (p >> FRAC_W);
        end
        p  = 64'(alpha) * 64'(sum[31:0]);
        rn = base + 32'(p >> FRAC_W);
        if (rn != ref_r[v]) begin ref_r[v] = rn; changed = 1; end
      end
      sweeps++;
    end while (changed && sweeps < 100000);
    $display("reference converged after %0d sweeps", sweeps);
  endtask

  initial begin
    addr_t vi_in, ei_in, vi_out, ei_out, vd, bv, fl, qb;
    int    qn [NA];
    void'($urandom(32'd12345));
    for (int b = 0; b < 16; b++) evc[b] = 0;
    build_graph();
    vi_in  = 0;
    ei_in  = vi_in + addr_t'(NV + 1);
    vi_out = ei_in + addr_t'(ne);
    ei_out = vi_out + addr_t'(NV + 1);
    vd     = ei_out + addr_t'(ne);
    bv     = vd + addr_t'(NV);
    fl     = bv + addr_t'(4 * NSEG);
    qb     = fl + addr_t'(NSEG);
    for (int i = 0; i < MEMW; i++) u_dram.mem[i] = '0;
    for (int v = 0; v <= NV; v++) begin
      u_dram.mem[vi_in + v]  = data_t'(in_off[v]);
      u_dram.mem[vi_out + v] = data_t'(out_off[v]);
    end
    for (int e = 0; e < ne; e++) begin
      u_dram.mem[ei_in + e]  = data_t'(in_src[e]);
      u_dram.mem[ei_out + e] = data_t'(out_dst[e]);
    end
    for (int v = 0; v < NV; v++) begin
      u_dram.mem[vd + v] = {invd[v], 32'd0};
      u_dram.mem[bv + v / 64][v % 64] = 1'b1;
    end
    for (int a = 0; a < NA; a++) qn[a] = 0;
    for (int s = 0; s < NSEG; s++) begin
      int a;
      a = s % NA;
      u_dram.mem[fl + s] = 64'd1;
      u_dram.mem[qb + addr_t'(a * QCAP + qn[a])] = data_t'(s);
      qn[a]++;
    end
    cfg.vi_in_base   = vi_in;
    cfg.ei_in_base   = ei_in;
    cfg.vi_out_base  = vi_out;
    cfg.ei_out_base  = ei_out;
    cfg.vd_base      = vd;
    cfg.al_bv_base   = bv;
    cfg.al_flag_base = fl;
    cfg.al_q_base    = qb;
    cfg.al_q_cap     = 32'(QCAP);
    cfg.pr_alpha     = `GX_ALPHA;
    cfg.pr_base      = 32'((64'(FIX1) - ((64'(FIX1) * 64'(`GX_ALPHA)) >> FRAC_W)) / 64'(NV));
    cfg.pr_eps       = 32'd0;
    for (int a = 0; a < NA; a++) q_init[a] = 32'(qn[a]);
    $display("graph: %0d vertices, %0d edges, %0d AUs", NV, ne, NA);
    reference(cfg.pr_base, cfg.pr_alpha);

    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    start = 1'b1;
    @(posedge clk);
    start = 1'b0;
    begin
      longint t0;
      t0 = cycles;
      wait (done);
      $display("done after %0d cycles, %0d vertex executions", cycles - t0, ranks_issued);
    end
    repeat (2) @(posedge clk);

    // ranks against the reference; 1/degree untouched
    begin
      int bad;
      bad = 0;
      for (int v = 0; v < NV; v++) begin
        data_t w;
        w = u_dram.mem[vd + v];
        checks++;
        if (w[31:0] != ref_r[v] || w[63:32] != invd[v]) begin
          failures++;
          if (bad < 10) $display("vertex %0d: rank %h expected %h", v, w[31:0], ref_r[v]);
          bad++;
        end
      end
    end
    // active list empty
    for (int i = 0; i < 4 * NSEG; i++) begin
      checks++;
      if (u_dram.mem[bv + i] != 0) begin failures++; $display("AL word %0d not empty", i); end
    end
    for (int s = 0; s < NSEG; s++) begin
      checks++;
      if (u_dram.mem[fl + s] != 0) begin failures++; $display("AL flag %0d still set", s); end
    end
    checks++;
    if (ranks_issued < 32'(NV)) begin failures++; $display("fewer executions than vertices"); end
    // every mechanism happened
    begin
      string nm [14];
      nm = '{"RAW stall", "WAR stall", "activation filtered", "duplicate held",
             "ALM local set", "ALM in-memory set", "ALM queue push", "Runtime throttle",
             "GU edge assign", "GU credit wait", "SCU edge assign", "SCU credit wait",
             "cache hit", "cache miss"};
      for (int b = 0; b < 14; b++) begin
        $display("  %-22s %0d", nm[b], evc[b]);
        checks++;
        if (evc[b] == 0 && !(NA == 1 && b == EV_ALM_REMOTE)) begin failures++; $display("mechanism never exercised: %s", nm[b]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
