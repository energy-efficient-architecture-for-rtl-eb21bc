// gx_scatter: Scatter Unit (SCU) of one accelerator unit.
//
// The SCU runs the scatter program of up to SV vertices and SE out-edges at
// a time. Per vertex slot it reads the out-edge range VI_out[v],
// VI_out[v+1]; edge slots are shared credits given each cycle to the
// lowest-rank vertex that still has unassigned edges, as in the Gather
// Unit. An edge slot reads EI_out[e] (the out-neighbour w) and sends an
// activation message for w to the Sync Unit of w's AU, flagged with the
// apply result (PageRank scatter_edge: activate w if r_v changed by more
// than epsilon). A message is sent for every out-edge, also with a false
// flag, because the Sync Unit uses it to hold off WAR hazards (document
// Sec. IV-C). The edge slot is freed by the acknowledgement. Only when every
// out-edge of v is acknowledged does the SCU write v's new vertex data
// through the global memory request handler; when that write is
// acknowledged it sends scatter-done to the Sync Unit and the Runtime.
//
// Tags: VertexInfo {slot, which}; EdgeInfo, activation {edge slot};
// vertex-data write {slot}. One request per cycle per channel.
module gx_scatter
  import gx_pkg::*;
#(
  parameter int unsigned NUM_AU = 4,
  parameter int unsigned SV     = 16,   // concurrent vertices (Table I, PR)
  parameter int unsigned SE     = 128   // concurrent edges (Table I, PR)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cfg_t        cfg,
  input  logic [3:0]  au_id,
  // from the Apply Unit
  input  logic        in_valid,
  output logic        in_ready,
  input  apply_out_t  in,
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
  // activation messages and acknowledgements (crossbar)
  output logic        act_valid,
  input  logic        act_ready,
  output au_t         act_dest,
  output act_req_t    act,
  input  logic        ack_valid,
  output logic        ack_ready,
  input  act_ack_t    ack,
  // vertex-data write (global memory request handler)
  output logic        wr_req_valid,
  input  logic        wr_req_ready,
  output mem_req_t    wr_req,
  input  logic        wr_rsp_valid,
  output logic        wr_rsp_ready,
  input  mem_rsp_t    wr_rsp,
  output logic        sdone_valid,
  output logic [7:0]  sdone_row,
  // event pulses
  output logic        edge_assign_o,
  output logic        credit_wait_o
);
  localparam int unsigned VW = $clog2(SV > 1 ? SV : 2);
  localparam int unsigned EW = $clog2(SE > 1 ? SE : 2);

  typedef enum logic [1:0] {E_EI_NEED, E_EI_WAIT, E_A_NEED, E_A_WAIT} estate_e;
  typedef enum logic [1:0] {W_NONE, W_NEED, W_WAIT} wstate_e;

  logic [SV-1:0] vs_valid;
  apply_out_t    vs_info  [SV];
  logic [1:0]    vs_vi_need [SV];
  logic [1:0]    vs_vi_got  [SV];
  logic [31:0]   vs_next  [SV];
  logic [31:0]   vs_end   [SV];
  logic [15:0]   vs_pend  [SV];
  wstate_e       vs_w     [SV];

  logic [SE-1:0] es_valid;
  estate_e       es_state [SE];
  logic [VW-1:0] es_v     [SE];
  logic [31:0]   es_eidx  [SE];
  vid_t          es_nbr   [SE];

  logic vfree_any, efree_any;
  logic [VW-1:0] vfree;
  logic [EW-1:0] efree;
  always_comb begin
    vfree_any = 1'b0; vfree = '0;
    efree_any = 1'b0; efree = '0;
    for (int i = SV - 1; i >= 0; i--)
      if (!vs_valid[i]) begin vfree_any = 1'b1; vfree = VW'(i); end
    for (int i = SE - 1; i >= 0; i--)
      if (!es_valid[i]) begin efree_any = 1'b1; efree = EW'(i); end
  end
  assign in_ready = vfree_any;

  // ---- VertexInfo (out-edge offsets) ----
  logic vi_any; logic [VW-1:0] vi_sel; logic vi_which;
  always_comb begin
    vi_any = 1'b0; vi_sel = '0; vi_which = 1'b0;
    for (int i = SV - 1; i >= 0; i--)
      if (vs_valid[i] && vs_vi_need[i] != 2'b00) begin
        vi_any = 1'b1; vi_sel = VW'(i); vi_which = !vs_vi_need[i][0];
      end
    vi_req_valid = vi_any;
    vi_req.we    = 1'b0;
    vi_req.addr  = cfg.vi_out_base + vs_info[vi_sel].v.vid + addr_t'(vi_which);
    vi_req.wdata = '0;
    vi_req.tag   = tag_t'({vi_sel, vi_which});
  end
  assign vi_rsp_ready = 1'b1;
  logic [VW-1:0] vi_rslot; logic vi_rwhich;
  assign vi_rslot  = VW'(vi_rsp.tag >> 1);
  assign vi_rwhich = vi_rsp.tag[0];

  // ---- EdgeInfo (out-neighbours) ----
  logic ei_any; logic [EW-1:0] ei_sel;
  always_comb begin
    ei_any = 1'b0; ei_sel = '0;
    for (int i = SE - 1; i >= 0; i--)
      if (es_valid[i] && es_state[i] == E_EI_NEED) begin ei_any = 1'b1; ei_sel = EW'(i); end
    ei_req_valid = ei_any;
    ei_req.we    = 1'b0;
    ei_req.addr  = cfg.ei_out_base + es_eidx[ei_sel];
    ei_req.wdata = '0;
    ei_req.tag   = tag_t'(ei_sel);
  end
  assign ei_rsp_ready = 1'b1;

  // ---- activation messages ----
  logic ac_any; logic [EW-1:0] ac_sel;
  always_comb begin
    ac_any = 1'b0; ac_sel = '0;
    for (int i = SE - 1; i >= 0; i--)
      if (es_valid[i] && es_state[i] == E_A_NEED) begin ac_any = 1'b1; ac_sel = EW'(i); end
    act_valid  = ac_any;
    act.src_au = au_id;
    act.tag    = tag_t'(ac_sel);
    act.rank   = vs_info[es_v[ac_sel]].v.rank;
    act.target = es_nbr[ac_sel];
    act.flag   = vs_info[es_v[ac_sel]].do_scatter;   // scatter_edge()
    act_dest   = au_t'(owner_au(act.target, NUM_AU));
  end
  assign ack_ready = 1'b1;
  logic [EW-1:0] k_es;
  logic [VW-1:0] k_vs;
  assign k_es = EW'(ack.tag);
  assign k_vs = es_v[k_es];

  // ---- edge assignment ----
  logic asg_any; logic [VW-1:0] asg_sel;
  always_comb begin
    asg_any = 1'b0; asg_sel = '0;
    for (int i = 0; i < SV; i++)
      if (vs_valid[i] && vs_vi_got[i] == 2'b11 && vs_next[i] != vs_end[i])
        if (!asg_any || vs_info[i].v.rank < vs_info[asg_sel].v.rank) begin
          asg_any = 1'b1; asg_sel = VW'(i);
        end
  end
  logic asg_fire;
  assign asg_fire      = asg_any && efree_any;
  assign edge_assign_o = asg_fire;
  assign credit_wait_o = asg_any && !efree_any;

  // ---- vertex-data write once all edges are acknowledged ----
  logic wr_any; logic [VW-1:0] wr_sel;
  always_comb begin
    wr_any = 1'b0; wr_sel = '0;
    for (int i = SV - 1; i >= 0; i--)
      if (vs_valid[i] && vs_w[i] == W_NEED) begin wr_any = 1'b1; wr_sel = VW'(i); end
    wr_req_valid = wr_any;
    wr_req.we    = 1'b1;
    wr_req.addr  = cfg.vd_base + vs_info[wr_sel].v.vid;
    wr_req.wdata = vs_info[wr_sel].vdata;
    wr_req.tag   = tag_t'(wr_sel);
  end
  assign wr_rsp_ready = 1'b1;
  logic [VW-1:0] w_vs;
  assign w_vs        = VW'(wr_rsp.tag);
  assign sdone_valid = wr_rsp_valid;
  assign sdone_row   = vs_info[w_vs].v.row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs_valid <= '0;
      es_valid <= '0;
    end else begin
      if (in_valid && in_ready) begin
        vs_valid[vfree]   <= 1'b1;
        vs_info[vfree]    <= in;
        vs_vi_need[vfree] <= 2'b11;
        vs_vi_got[vfree]  <= 2'b00;
        vs_w[vfree]       <= W_NONE;
      end
      if (vi_req_valid && vi_req_ready) vs_vi_need[vi_sel][vi_which] <= 1'b0;
      if (vi_rsp_valid) begin
        vs_vi_got[vi_rslot][vi_rwhich] <= 1'b1;
        if (vi_rwhich) vs_end[vi_rslot]  <= vi_rsp.rdata[31:0];
        else           vs_next[vi_rslot] <= vi_rsp.rdata[31:0];
      end
      if (ei_req_valid && ei_req_ready) es_state[ei_sel] <= E_EI_WAIT;
      if (ei_rsp_valid) begin
        es_state[EW'(ei_rsp.tag)] <= E_A_NEED;
        es_nbr[EW'(ei_rsp.tag)]   <= ei_rsp.rdata[31:0];
      end
      if (act_valid && act_ready) es_state[ac_sel] <= E_A_WAIT;
      if (ack_valid) es_valid[k_es] <= 1'b0;
      for (int i = 0; i < SV; i++) begin
        vs_pend[i] <= vs_pend[i]
                    + 16'(asg_fire && asg_sel == VW'(i))
                    - 16'(ack_valid && k_vs == VW'(i))
                    - ((in_valid && in_ready && vfree == VW'(i)) ? vs_pend[i] : 16'd0);
        if (vs_valid[i] && vs_w[i] == W_NONE && vs_vi_got[i] == 2'b11 &&
            vs_next[i] == vs_end[i] && vs_pend[i] == 0 &&
            !(asg_fire && asg_sel == VW'(i)))
          vs_w[i] <= W_NEED;
      end
      if (asg_fire) begin
        vs_next[asg_sel] <= vs_next[asg_sel] + 1;
        es_valid[efree]  <= 1'b1;
        es_state[efree]  <= E_EI_NEED;
        es_v[efree]      <= asg_sel;
        es_eidx[efree]   <= vs_next[asg_sel];
      end
      if (wr_req_valid && wr_req_ready) vs_w[wr_sel] <= W_WAIT;
      if (wr_rsp_valid) vs_valid[w_vs] <= 1'b0;
    end
  end

  initial begin
    assert (SV <= 256 && SE <= 512) else $error("slot counts exceed the tag format");
  end
endmodule
