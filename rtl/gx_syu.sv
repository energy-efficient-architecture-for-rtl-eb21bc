// gx_syu: Sync Unit (SYU) of one accelerator unit.
//
// The SYU keeps execution sequentially consistent (edge consistency) for
// the vertices this AU executes and for all accesses to their data:
//  * Vertex table: a new vertex from the Runtime gets a free row and a rank
//    {global counter, AU number}; the row holds vertex id, rank and state
//    (gathering / gather done). gather-done updates the state, scatter-done
//    frees the row.
//  * RAW: a neighbour-vertex-data (NVD) read of vertex u on behalf of vertex
//    v is looked up in the table (CAM on vertex id). If u is in the table
//    with rank(u) < rank(v), the read is parked until u's scatter-done;
//    otherwise it goes straight to the VertexData cache.
//  * WAR: an activation message for edge u->v (v is the target) is parked
//    while v is in the table with rank(v) < rank(u) and v has not finished
//    gathering; its acknowledgement is sent only afterwards.
//  * Activation filter: a true-flag activation is passed to the ALM unless v
//    is in the table with rank(u) < rank(v) (v will read u's new data).
// Parked requests wait in two pools (the document keeps them in the table
// row; a pool entry records the row it waits on, which is equivalent) and
// are released one per cycle once their row's event has happened. The pools
// default to as many entries as there are edge slots in all Gather (RAW) or
// Scatter (WAR) Units, so they cannot overflow. A new vertex whose id is
// still in the table (an earlier execution not yet finished) is held back
// until that row is freed: this design's choice, which keeps one row per
// vertex id.
//
// Interface: valid/ready channels throughout; gather/scatter-done are
// strobes with a row number. Parked requests have priority at the outputs.
module gx_syu
  import gx_pkg::*;
#(
  parameter int unsigned NUM_AU = 4,
  parameter int unsigned NT     = 16,   // table rows (max vertices in flight)
  parameter int unsigned RP     = 512,  // RAW pool entries
  parameter int unsigned WP     = 512   // WAR pool entries
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cfg_t     cfg,
  input  logic [3:0] au_id,
  // global rank counter
  input  logic     rank_inc,
  output logic     assign_o,
  // new vertex from the Runtime
  input  logic     nv_valid,
  output logic     nv_ready,
  input  vid_t     nv_vid,
  // to the Gather Unit
  output logic     gu_valid,
  input  logic     gu_ready,
  output vtx_t     gu_vtx,
  // stage events
  input  logic       gdone_valid,
  input  logic [7:0] gdone_row,
  input  logic       sdone_valid,
  input  logic [7:0] sdone_row,
  // NVD requests (from the crossbar) and reads to the VertexData cache
  input  logic     nvd_valid,
  output logic     nvd_ready,
  input  nvd_req_t nvd,
  output logic     vd_valid,
  input  logic     vd_ready,
  output mem_req_t vd_req,
  // activation requests (from the crossbar)
  input  logic     act_valid,
  output logic     act_ready,
  input  act_req_t act,
  // filtered activations to the ALM
  output logic     alm_valid,
  input  logic     alm_ready,
  output vid_t     alm_vid,
  // acknowledgements (to the crossbar)
  output logic     ack_valid,
  input  logic     ack_ready,
  output au_t      ack_dest,
  output act_ack_t ack,
  // event pulses
  output logic     raw_stall_o,
  output logic     war_stall_o,
  output logic     filtered_o,
  output logic     dup_hold_o
);
  localparam int unsigned AUB = (NUM_AU > 1) ? $clog2(NUM_AU) : 0;
  localparam int unsigned RW  = $clog2(NT > 1 ? NT : 2);

  // ---------------- vertex table ----------------
  logic [NT-1:0] row_valid;
  logic [NT-1:0] row_gdone;
  vid_t          row_vid  [NT];
  rank_t         row_rank [NT];
  logic [31:0]   rank_ctr;

  logic          free_any;
  logic [RW-1:0] free_row;
  logic          nv_hit;
  always_comb begin
    free_any = 1'b0;
    free_row = '0;
    nv_hit   = 1'b0;
    for (int i = NT - 1; i >= 0; i--)
      if (!row_valid[i]) begin
        free_any = 1'b1;
        free_row = RW'(i);
      end
    for (int i = 0; i < NT; i++)
      if (row_valid[i] && row_vid[i] == nv_vid) nv_hit = 1'b1;
  end

  rank_t new_rank;
  assign new_rank = rank_t'((rank_ctr << AUB) | 32'(au_id));

  assign gu_valid   = nv_valid && free_any && !nv_hit;
  assign nv_ready   = free_any && !nv_hit && gu_ready;
  assign gu_vtx.vid  = nv_vid;
  assign gu_vtx.rank = new_rank;
  assign gu_vtx.row  = 8'(free_row);
  assign assign_o   = gu_valid && gu_ready;
  assign dup_hold_o = nv_valid && nv_hit;

  // CAM lookups for the two request inputs
  function automatic logic cam(input vid_t v, output logic [RW-1:0] r);
    cam = 1'b0;
    r   = '0;
    for (int i = 0; i < NT; i++)
      if (row_valid[i] && row_vid[i] == v) begin
        cam = 1'b1;
        r   = RW'(i);
      end
  endfunction

  logic          n_hit, a_hit;
  logic [RW-1:0] n_row, a_row;
  always_comb begin
    n_hit = cam(nvd.target, n_row);
    a_hit = cam(act.target, a_row);
  end

  // ---------------- RAW path ----------------
  logic n_raw;
  assign n_raw = n_hit && (row_rank[n_row] < nvd.rank);

  typedef struct packed {
    logic          valid;
    logic          rdy;
    logic [RW-1:0] row;
    nvd_req_t      req;
  } rent_t;
  rent_t rpool [RP];

  localparam int unsigned RPW = $clog2(RP > 1 ? RP : 2);
  logic           rp_free_any, rp_rdy_any;
  logic [RPW-1:0] rp_free, rp_rdy;
  always_comb begin
    rp_free_any = 1'b0; rp_free = '0;
    rp_rdy_any  = 1'b0; rp_rdy  = '0;
    for (int i = RP - 1; i >= 0; i--) begin
      if (!rpool[i].valid) begin rp_free_any = 1'b1; rp_free = RPW'(i); end
      if (rpool[i].valid && rpool[i].rdy) begin rp_rdy_any = 1'b1; rp_rdy = RPW'(i); end
    end
  end

  nvd_req_t vd_src;
  always_comb begin
    vd_src   = rp_rdy_any ? rpool[rp_rdy].req : nvd;
    vd_valid = rp_rdy_any || (nvd_valid && !n_raw);
    vd_req.we    = 1'b0;
    vd_req.addr  = cfg.vd_base + vd_src.target;
    vd_req.wdata = '0;
    vd_req.tag   = {2'b00, vd_src.src_au, vd_src.tag[9:0]};
    nvd_ready    = n_raw ? rp_free_any : (!rp_rdy_any && vd_ready);
  end
  assign raw_stall_o = nvd_valid && nvd_ready && n_raw;

  // ---------------- WAR path and activation filter ----------------
  logic a_war, a_fwd;
  assign a_war = a_hit && (row_rank[a_row] < act.rank) && !row_gdone[a_row] &&
                 !(gdone_valid && gdone_row == 8'(a_row));
  assign a_fwd = act.flag && !(a_hit && (act.rank < row_rank[a_row]));

  typedef struct packed {
    logic          valid;
    logic          rdy;
    logic [RW-1:0] row;
    act_req_t      req;
  } went_t;
  went_t wpool [WP];

  localparam int unsigned WPW = $clog2(WP > 1 ? WP : 2);
  logic           wp_free_any, wp_rdy_any;
  logic [WPW-1:0] wp_free, wp_rdy;
  always_comb begin
    wp_free_any = 1'b0; wp_free = '0;
    wp_rdy_any  = 1'b0; wp_rdy  = '0;
    for (int i = WP - 1; i >= 0; i--) begin
      if (!wpool[i].valid) begin wp_free_any = 1'b1; wp_free = WPW'(i); end
      if (wpool[i].valid && wpool[i].rdy) begin wp_rdy_any = 1'b1; wp_rdy = WPW'(i); end
    end
  end

  // the activation being completed this cycle: a released one, or a new one
  act_req_t a_cur;
  logic     a_go, a_cur_fwd;
  always_comb begin
    if (wp_rdy_any) begin
      a_cur     = wpool[wp_rdy].req;
      a_cur_fwd = wpool[wp_rdy].req.flag;   // target already read old data
      a_go      = 1'b1;
    end else begin
      a_cur     = act;
      a_cur_fwd = a_fwd;
      a_go      = act_valid && !a_war;
    end
    ack_valid = a_go && (alm_ready || !a_cur_fwd);
    alm_valid = a_go && a_cur_fwd && ack_ready;
    alm_vid   = a_cur.target;
    ack_dest  = a_cur.src_au;
    ack.tag   = a_cur.tag;
    act_ready = a_war ? wp_free_any
                      : (!wp_rdy_any && ack_ready && (alm_ready || !a_fwd));
  end
  assign war_stall_o = act_valid && act_ready && a_war;
  assign filtered_o  = act_valid && act_ready && !a_war && act.flag && !a_fwd;

  logic a_done;
  assign a_done = ack_valid && ack_ready;

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_valid <= '0;
      row_gdone <= '0;
      rank_ctr  <= '0;
      for (int i = 0; i < RP; i++) rpool[i] <= '0;
      for (int i = 0; i < WP; i++) wpool[i] <= '0;
    end else begin
      if (rank_inc) rank_ctr <= rank_ctr + 1;
      // table
      if (gdone_valid) row_gdone[gdone_row[RW-1:0]] <= 1'b1;
      if (sdone_valid) row_valid[sdone_row[RW-1:0]] <= 1'b0;
      if (assign_o) begin
        row_valid[free_row] <= 1'b1;
        row_gdone[free_row] <= 1'b0;
        row_vid[free_row]   <= nv_vid;
        row_rank[free_row]  <= new_rank;
      end
      // RAW pool: release, issue, park
      for (int i = 0; i < RP; i++)
        if (sdone_valid && rpool[i].valid && 8'(rpool[i].row) == sdone_row)
          rpool[i].rdy <= 1'b1;
      if (rp_rdy_any && vd_ready) rpool[rp_rdy].valid <= 1'b0;
      if (nvd_valid && nvd_ready && n_raw) begin
        rpool[rp_free].valid <= 1'b1;
        rpool[rp_free].rdy   <= sdone_valid && (sdone_row == 8'(n_row));
        rpool[rp_free].row   <= n_row;
        rpool[rp_free].req   <= nvd;
      end
      // WAR pool
      for (int i = 0; i < WP; i++)
        if (gdone_valid && wpool[i].valid && 8'(wpool[i].row) == gdone_row)
          wpool[i].rdy <= 1'b1;
      if (wp_rdy_any && a_done) wpool[wp_rdy].valid <= 1'b0;
      if (act_valid && act_ready && a_war) begin
        wpool[wp_free].valid <= 1'b1;
        wpool[wp_free].rdy   <= 1'b0;
        wpool[wp_free].row   <= a_row;
        wpool[wp_free].req   <= act;
      end
    end
  end

  // Runtime admission guarantees a free row for every gather-done/scatter-done
  assert property (@(posedge clk) disable iff (!rst_n) sdone_valid |-> row_valid[sdone_row[RW-1:0]]);
  assert property (@(posedge clk) disable iff (!rst_n) gdone_valid |-> row_valid[gdone_row[RW-1:0]]);
endmodule
