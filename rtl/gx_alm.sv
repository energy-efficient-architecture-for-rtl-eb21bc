// gx_alm: Active List Manager (ALM) of one accelerator unit.
//
// The active list (AL) lives in system memory as the document describes:
// a bit vector with one bit per vertex, and a queue of bit-vector segment
// indices, one segment being 256 bits (4 words). This design adds one flag
// word per segment ("segment is in the queue") so that a segment is queued
// at most once; each AU owns the segments whose index bits [1:0]... (see
// owner_au) and keeps its own circular queue at al_q_base + AU*al_q_cap.
//
// Extraction: when no segment is held locally, the ALM pops a segment index,
// reads its 4 bit-vector words into a local 256-bit register, clears them
// and the segment's flag in memory, then offers the set bits to the Runtime
// lowest first. A bit is cleared only when the Runtime/Sync Unit accept the
// vertex (the accept is the Sync Unit's registration acknowledgement). The
// segment is released when its local bits are all zero.
// Activation: a vertex of the local segment just has its local bit set
// (already during the load, which ORs the memory words in). Otherwise the
// ALM does a read-modify-write of the bit's word; if the bit was newly set
// it reads the segment flag and, if clear, sets it and appends the segment
// to the queue. Memory operations are done one at a time, so an extraction
// and a remote activation never interleave; this serialisation is this
// design's simple choice for the "in-flight bit vectors" the document warns
// about.
//
// Interface: activation input and vertex output are valid/ready; one
// valid/ready request and response channel to the ActiveList cache.
module gx_alm
  import gx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  cfg_t       cfg,
  input  logic [3:0] au_id,
  input  logic       start,
  input  logic [31:0] q_init,      // segments in this AU's queue at start
  // activation requests from the Sync Unit
  input  logic       act_valid,
  output logic       act_ready,
  input  vid_t       act_vid,
  // vertices to the Runtime
  output logic       vtx_valid,
  input  logic       vtx_ready,
  output vid_t       vtx_vid,
  output logic       empty,
  // ActiveList cache
  output logic       mreq_valid,
  input  logic       mreq_ready,
  output mem_req_t   mreq,
  input  logic       mrsp_valid,
  output logic       mrsp_ready,
  input  mem_rsp_t   mrsp,
  // event pulses
  output logic       local_set_o,
  output logic       remote_set_o,
  output logic       queue_push_o
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} state_e;
  typedef enum logic [3:0] {P_XQ, P_XBR, P_XBW, P_XF, P_AR, P_AW, P_AFR, P_AFW, P_AQ} phase_e;

  state_e state;
  phase_e phase;
  logic [SEG_BITS-1:0] bits;
  logic [31:0] seg_idx;
  logic        seg_valid, loaded;
  logic [1:0]  k;
  logic [31:0] head, tail, count;
  vid_t        a_vid;
  addr_t       q_base;

  assign q_base = cfg.al_q_base + addr_t'(au_id) * cfg.al_q_cap;

  // ---- activation input ----
  logic act_local, act_fire_local, act_fire_remote;
  assign act_local       = seg_valid && ((act_vid >> 8) == seg_idx);
  assign act_ready       = act_local || (state == S_IDLE);
  assign act_fire_local  = act_valid && act_local;
  assign act_fire_remote = act_valid && !act_local && (state == S_IDLE);

  // ---- dispatch: lowest set local bit ----
  logic       have_bit;
  logic [7:0] bit_idx;
  always_comb begin
    have_bit = 1'b0;
    bit_idx  = '0;
    for (int i = SEG_BITS - 1; i >= 0; i--)
      if (bits[i]) begin
        have_bit = 1'b1;
        bit_idx  = 8'(i);
      end
  end
  assign vtx_valid = seg_valid && loaded && have_bit;
  assign vtx_vid   = {seg_idx[23:0], bit_idx};

  logic start_x;
  assign start_x = (state == S_IDLE) && !seg_valid && (count != 0) && !act_fire_remote;

  assign empty = !seg_valid && (count == 0) && (state == S_IDLE);

  assign mreq_valid = (state == S_REQ);
  assign mrsp_ready = (state == S_WAIT);

  assign local_set_o  = act_fire_local;
  assign remote_set_o = act_fire_remote;
  assign queue_push_o = (state == S_WAIT) && mrsp_valid && (phase == P_AQ);

  // next value of the local bit register
  logic [SEG_BITS-1:0] bits_n;
  always_comb begin
    bits_n = bits;
    if (vtx_valid && vtx_ready) bits_n[bit_idx] = 1'b0;
    if (state == S_WAIT && mrsp_valid && phase == P_XBR)
      bits_n[64*k +: 64] = bits_n[64*k +: 64] | mrsp.rdata;
    if (act_fire_local) bits_n[act_vid[7:0]] = 1'b1;
  end

  addr_t word_addr;
  assign word_addr = cfg.al_bv_base + addr_t'(a_vid >> 6);

  task automatic issue(input logic we, input addr_t a, input data_t d, input phase_e p);
    mreq.we    <= we;
    mreq.addr  <= a;
    mreq.wdata <= d;
    mreq.tag   <= '0;
    phase      <= p;
    state      <= S_REQ;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      phase     <= P_XQ;
      bits      <= '0;
      seg_idx   <= '0;
      seg_valid <= 1'b0;
      loaded    <= 1'b0;
      k         <= '0;
      head      <= '0;
      tail      <= '0;
      count     <= '0;
      a_vid     <= '0;
      mreq      <= '0;
    end else if (start) begin
      state     <= S_IDLE;
      bits      <= '0;
      seg_valid <= 1'b0;
      loaded    <= 1'b0;
      head      <= '0;
      tail      <= (q_init == cfg.al_q_cap) ? '0 : q_init;
      count     <= q_init;
    end else begin
      bits <= bits_n;
      // release an emptied local segment
      if (seg_valid && loaded && bits_n == '0) begin
        seg_valid <= 1'b0;
        loaded    <= 1'b0;
      end
      unique case (state)
        S_IDLE: begin
          if (act_fire_remote) begin
            a_vid <= act_vid;
            issue(1'b0, cfg.al_bv_base + addr_t'(act_vid >> 6), '0, P_AR);
          end else if (start_x) begin
            issue(1'b0, q_base + head, '0, P_XQ);
          end
        end
        S_REQ: if (mreq_ready) state <= S_WAIT;
        S_WAIT: if (mrsp_valid) begin
          unique case (phase)
            P_XQ: begin
              seg_idx   <= mrsp.rdata[31:0];
              seg_valid <= 1'b1;
              k         <= '0;
              head      <= (head + 1 == cfg.al_q_cap) ? '0 : head + 1;
              count     <= count - 1;
              issue(1'b0, cfg.al_bv_base + addr_t'({mrsp.rdata[29:0], 2'b00}), '0, P_XBR);
            end
            P_XBR: issue(1'b1, mreq.addr, '0, P_XBW);
            P_XBW: begin
              if (k != 2'(SEG_WORDS - 1)) begin
                k <= k + 1;
                issue(1'b0, mreq.addr + 1, '0, P_XBR);
              end else begin
                issue(1'b1, cfg.al_flag_base + addr_t'(seg_idx), '0, P_XF);
              end
            end
            P_XF: begin
              loaded <= 1'b1;
              state  <= S_IDLE;
            end
            P_AR: begin
              if (mrsp.rdata[a_vid[5:0]]) state <= S_IDLE;
              else issue(1'b1, word_addr, mrsp.rdata | (data_t'(1) << a_vid[5:0]), P_AW);
            end
            P_AW: issue(1'b0, cfg.al_flag_base + addr_t'(a_vid >> 8), '0, P_AFR);
            P_AFR: begin
              if (mrsp.rdata[0]) state <= S_IDLE;
              else issue(1'b1, cfg.al_flag_base + addr_t'(a_vid >> 8), data_t'(1), P_AFW);
            end
            P_AFW: issue(1'b1, q_base + tail, data_t'(a_vid) >> 8, P_AQ);
            P_AQ: begin
              tail  <= (tail + 1 == cfg.al_q_cap) ? '0 : tail + 1;
              count <= count + 1;
              state <= S_IDLE;
            end
            default: state <= S_IDLE;
          endcase
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The queue never holds more segments than it has room for.
  assert property (@(posedge clk) disable iff (!rst_n) count <= cfg.al_q_cap);
endmodule
