// gx_gather: Gather Unit (GU) of one accelerator unit.
//
// The GU runs the gather program of up to GV vertices and GE edges at the
// same time, so that hundreds of long-latency memory reads can be in flight.
// Per vertex slot it reads VI[v] and VI[v+1] (the in-edge range, through the
// local VertexInfo cache) and the vertex's own data (through the Sync Unit,
// like any vertex-data read). Edge slots are a shared pool of credits: each
// cycle one free edge slot is given to the vertex with the lowest rank that
// still has unassigned edges, so one high-degree vertex can hold all slots
// or many low-degree vertices can share them (document Sec. IV-A). An edge
// slot reads EI[e] (the source vertex u, through the local EdgeInfo buffer),
// then sends a neighbour-vertex-data request for u to the Sync Unit of u's
// AU, and on the response adds r_u/d_u to its vertex's accumulator
// (gather_edge). When all reads of a vertex are back a gather-done strobe
// goes to the Sync Unit and Runtime, and the vertex is then passed to the
// Apply Unit. The last free edge slot is reserved for the lowest-rank vertex
// of the unit, which keeps the rank-ordered stalls free of deadlock.
//
// Tags: VertexInfo {slot, which}; EdgeInfo {edge slot}; neighbour data
// {1, vertex slot} for the own read, {0, edge slot} for an edge.
// One request per cycle on each of the three request channels; one
// response per cycle on each response channel.
module gx_gather
  import gx_pkg::*;
#(
  parameter int unsigned NUM_AU = 4,
  parameter int unsigned GV     = 32,   // concurrent vertices (Table I, PR)
  parameter int unsigned GE     = 128   // concurrent edges (Table I, PR)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cfg_t        cfg,
  input  logic [3:0]  au_id,
  // vertices from the Sync Unit
  input  logic        in_valid,
  output logic        in_ready,
  input  vtx_t        in_vtx,
  // VertexInfo and EdgeInfo (local memory request handler)
  output logic        vi_req_valid,
  input  logic        vi_req_ready,
  output mem_req_t    vi_req,
  input  logic        vi_rsp_valid,
  output logic        vi_rsp_ready,
  input  mem_rsp_t    vi_rsp,
  output logic        ei_req_valid,
  input  logic        ei_req_ready,
  output mem_req_t    ei_req,
  input  logic        ei_rsp_valid,
  output logic        ei_rsp_ready,
  input  mem_rsp_t    ei_rsp,
  // neighbour-vertex-data requests / responses (crossbar)
  output logic        nvd_valid,
  input  logic        nvd_ready,
  output au_t         nvd_dest,
  output nvd_req_t    nvd,
  input  logic        nrsp_valid,
  output logic        nrsp_ready,
  input  nvd_rsp_t    nrsp,
  // to the Apply Unit
  output logic        out_valid,
  input  logic        out_ready,
  output gather_out_t out,
  output logic        gdone_valid,
  output logic [7:0]  gdone_row,
  // event pulses
  output logic        edge_assign_o,
  output logic        credit_wait_o   // a vertex has edges but no slot is free
);
  localparam int unsigned VW = $clog2(GV > 1 ? GV : 2);
  localparam int unsigned EW = $clog2(GE > 1 ? GE : 2);

  typedef enum logic [1:0] {E_EI_NEED, E_EI_WAIT, E_N_NEED, E_N_WAIT} estate_e;

  // vertex slots
  logic [GV-1:0] vs_valid, vs_vd_need, vs_vd_got, vs_gd;
  logic [1:0]    vs_vi_need [GV];
  logic [1:0]    vs_vi_got  [GV];
  vtx_t          vs_vtx   [GV];
  logic [31:0]   vs_next  [GV];
  logic [31:0]   vs_end   [GV];
  logic [15:0]   vs_pend  [GV];
  data_t         vs_acc   [GV];
  data_t         vs_vdata [GV];
  // edge slots
  logic [GE-1:0] es_valid;
  estate_e       es_state [GE];
  logic [VW-1:0] es_v     [GE];
  logic [31:0]   es_eidx  [GE];
  vid_t          es_nbr   [GE];

  // ---- free slots ----
  logic vfree_any, efree_any;
  logic [VW-1:0] vfree;
  logic [EW-1:0] efree;
  always_comb begin
    vfree_any = 1'b0; vfree = '0;
    efree_any = 1'b0; efree = '0;
    for (int i = GV - 1; i >= 0; i--)
      if (!vs_valid[i]) begin vfree_any = 1'b1; vfree = VW'(i); end
    for (int i = GE - 1; i >= 0; i--)
      if (!es_valid[i]) begin efree_any = 1'b1; efree = EW'(i); end
  end
  assign in_ready = vfree_any;

  // ---- VertexInfo requests ----
  logic vi_any; logic [VW-1:0] vi_sel; logic vi_which;
  always_comb begin
    vi_any = 1'b0; vi_sel = '0; vi_which = 1'b0;
    for (int i = GV - 1; i >= 0; i--)
      if (vs_valid[i] && vs_vi_need[i] != 2'b00) begin
        vi_any = 1'b1; vi_sel = VW'(i); vi_which = !vs_vi_need[i][0];
      end
    vi_req_valid = vi_any;
    vi_req.we    = 1'b0;
    vi_req.addr  = cfg.vi_in_base + vs_vtx[vi_sel].vid + addr_t'(vi_which);
    vi_req.wdata = '0;
    vi_req.tag   = tag_t'({vi_sel, vi_which});
  end
  assign vi_rsp_ready = 1'b1;
  logic [VW-1:0] vi_rslot; logic vi_rwhich;
  assign vi_rslot  = VW'(vi_rsp.tag >> 1);
  assign vi_rwhich = vi_rsp.tag[0];

  // ---- EdgeInfo requests ----
  logic ei_any; logic [EW-1:0] ei_sel;
  always_comb begin
    ei_any = 1'b0; ei_sel = '0;
    for (int i = GE - 1; i >= 0; i--)
      if (es_valid[i] && es_state[i] == E_EI_NEED) begin ei_any = 1'b1; ei_sel = EW'(i); end
    ei_req_valid = ei_any;
    ei_req.we    = 1'b0;
    ei_req.addr  = cfg.ei_in_base + es_eidx[ei_sel];
    ei_req.wdata = '0;
    ei_req.tag   = tag_t'(ei_sel);
  end
  assign ei_rsp_ready = 1'b1;

  // ---- neighbour-data requests: own vertex data first, then edges ----
  logic own_any; logic [VW-1:0] own_sel;
  logic nbr_any; logic [EW-1:0] nbr_sel;
  always_comb begin
    own_any = 1'b0; own_sel = '0;
    nbr_any = 1'b0; nbr_sel = '0;
    for (int i = GV - 1; i >= 0; i--)
      if (vs_valid[i] && vs_vd_need[i]) begin own_any = 1'b1; own_sel = VW'(i); end
    for (int i = GE - 1; i >= 0; i--)
      if (es_valid[i] && es_state[i] == E_N_NEED) begin nbr_any = 1'b1; nbr_sel = EW'(i); end
    nvd_valid  = own_any || nbr_any;
    nvd.src_au = au_id;
    if (own_any) begin
      nvd.tag    = tag_t'({1'b1, 9'(own_sel)});
      nvd.rank   = vs_vtx[own_sel].rank;
      nvd.target = vs_vtx[own_sel].vid;
    end else begin
      nvd.tag    = tag_t'(nbr_sel);
      nvd.rank   = vs_vtx[es_v[nbr_sel]].rank;
      nvd.target = es_nbr[nbr_sel];
    end
    nvd_dest = au_t'(owner_au(nvd.target, NUM_AU));
  end
  assign nrsp_ready = 1'b1;

  // ---- edge assignment: lowest-rank vertex with unassigned edges ----
  // The last free edge slot is kept for the lowest-rank vertex in the unit:
  // slots held by higher-rank vertices whose reads are parked in a Sync Unit
  // can then never starve the vertex those reads are waiting for.
  logic asg_any; logic [VW-1:0] asg_sel;
  logic low_any; logic [VW-1:0] low_sel;
  always_comb begin
    asg_any = 1'b0; asg_sel = '0;
    low_any = 1'b0; low_sel = '0;
    for (int i = 0; i < GV; i++) begin
      if (vs_valid[i] && vs_vi_got[i] == 2'b11 && vs_next[i] != vs_end[i])
        if (!asg_any || vs_vtx[i].rank < vs_vtx[asg_sel].rank) begin
          asg_any = 1'b1; asg_sel = VW'(i);
        end
      if (vs_valid[i] && !vs_gd[i])
        if (!low_any || vs_vtx[i].rank < vs_vtx[low_sel].rank) begin
          low_any = 1'b1; low_sel = VW'(i);
        end
    end
  end
  logic asg_fire, last_slot;
  assign last_slot     = ($countones(es_valid) == GE - 1);
  assign asg_fire      = asg_any && efree_any && (!last_slot || asg_sel == low_sel);
  assign edge_assign_o = asg_fire;
  assign credit_wait_o = asg_any && !asg_fire;

  // ---- completion ----
  // gather-done is reported as soon as all reads of a vertex are back (this
  // releases activations parked behind it in a Sync Unit), then the vertex
  // waits for the Apply Unit.
  logic [GV-1:0] complete;
  logic gd_any; logic [VW-1:0] gd_sel;
  logic dn_any; logic [VW-1:0] dn_sel;
  always_comb begin
    gd_any = 1'b0; gd_sel = '0;
    dn_any = 1'b0; dn_sel = '0;
    for (int i = GV - 1; i >= 0; i--) begin
      complete[i] = vs_valid[i] && vs_vi_got[i] == 2'b11 && vs_vd_got[i] &&
                    vs_next[i] == vs_end[i] && vs_pend[i] == 0;
      if (complete[i] && !vs_gd[i]) begin gd_any = 1'b1; gd_sel = VW'(i); end
      if (vs_valid[i] && vs_gd[i])  begin dn_any = 1'b1; dn_sel = VW'(i); end
    end
    out_valid = dn_any;
    out.v     = vs_vtx[dn_sel];
    out.vdata = vs_vdata[dn_sel];
    out.acc   = vs_acc[dn_sel];
  end
  assign gdone_valid = gd_any;
  assign gdone_row   = vs_vtx[gd_sel].row;

  // edge response bookkeeping
  logic          n_edge;
  logic [EW-1:0] n_es;
  logic [VW-1:0] n_vs;
  assign n_edge = nrsp_valid && !nrsp.tag[9];
  assign n_es   = EW'(nrsp.tag);
  assign n_vs   = es_v[n_es];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs_valid   <= '0;
      vs_vd_need <= '0;
      vs_vd_got  <= '0;
      vs_gd      <= '0;
      es_valid   <= '0;
    end else begin
      // new vertex: gather_init
      if (in_valid && in_ready) begin
        vs_valid[vfree]   <= 1'b1;
        vs_vtx[vfree]     <= in_vtx;
        vs_vi_need[vfree] <= 2'b11;
        vs_vi_got[vfree]  <= 2'b00;
        vs_vd_need[vfree] <= 1'b1;
        vs_vd_got[vfree]  <= 1'b0;
        vs_gd[vfree]      <= 1'b0;
        vs_acc[vfree]     <= '0;
      end
      // VertexInfo
      if (vi_req_valid && vi_req_ready) vs_vi_need[vi_sel][vi_which] <= 1'b0;
      if (vi_rsp_valid) begin
        vs_vi_got[vi_rslot][vi_rwhich] <= 1'b1;
        if (vi_rwhich) vs_end[vi_rslot]  <= vi_rsp.rdata[31:0];
        else           vs_next[vi_rslot] <= vi_rsp.rdata[31:0];
      end
      // EdgeInfo
      if (ei_req_valid && ei_req_ready) es_state[ei_sel] <= E_EI_WAIT;
      if (ei_rsp_valid) begin
        es_state[EW'(ei_rsp.tag)] <= E_N_NEED;
        es_nbr[EW'(ei_rsp.tag)]   <= ei_rsp.rdata[31:0];
      end
      // neighbour data
      if (nvd_valid && nvd_ready) begin
        if (own_any) vs_vd_need[own_sel] <= 1'b0;
        else         es_state[nbr_sel]   <= E_N_WAIT;
      end
      if (nrsp_valid) begin
        if (nrsp.tag[9]) begin
          vs_vd_got[VW'(nrsp.tag)] <= 1'b1;
          vs_vdata[VW'(nrsp.tag)]  <= nrsp.data;
        end else begin
          vs_acc[n_vs]   <= gather_edge(vs_acc[n_vs], nrsp.data);
          es_valid[n_es] <= 1'b0;
        end
      end
      // pending-edge counters (assignment and completion may coincide)
      for (int i = 0; i < GV; i++)
        vs_pend[i] <= vs_pend[i]
                    + 16'(asg_fire && asg_sel == VW'(i))
                    - 16'(n_edge && n_vs == VW'(i))
                    - ((in_valid && in_ready && vfree == VW'(i)) ? vs_pend[i] : 16'd0);
      if (asg_fire) begin
        vs_next[asg_sel]  <= vs_next[asg_sel] + 1;
        es_valid[efree]   <= 1'b1;
        es_state[efree]   <= E_EI_NEED;
        es_v[efree]       <= asg_sel;
        es_eidx[efree]    <= vs_next[asg_sel];
      end
      // hand-off to the Apply Unit
      if (gd_any) vs_gd[gd_sel] <= 1'b1;
      if (out_valid && out_ready) vs_valid[dn_sel] <= 1'b0;
    end
  end

  initial begin
    assert (GV <= 256 && GE <= 512) else $error("slot counts exceed the tag format");
  end
endmodule
