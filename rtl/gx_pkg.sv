// gx_pkg: shared types, constants and the PageRank user functions of the
// graph-analytics accelerator.
//
// Data is held in 64-bit memory words, addressed by word. Vertex and edge
// indices, ranks and addresses are 32 bits. Every request/response that
// crosses a module boundary is a packed struct with a 16-bit tag that the
// receiver echoes back, so a requester can have many requests in flight.
//
// PageRank vertex data (one word per vertex): bits [31:0] hold the rank r_v
// and bits [63:32] hold 1/out_degree(v), both unsigned fixed point with
// FRAC_W fraction bits. The pair of fixed-point values follows the document;
// the format (Q4.28) is this design's choice.
package gx_pkg;

  localparam int unsigned VID_W  = 32;
  localparam int unsigned RANK_W = 32;
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 64;
  localparam int unsigned TAG_W  = 16;
  localparam int unsigned AU_W   = 4;   // room for up to 16 accelerator units
  localparam int unsigned FRAC_W = 28;  // fixed-point fraction bits
  // Vertices and edges are interleaved over the AUs in blocks of 256
  // indices (index bits [8 +: log2(NUM_AU)] select the AU).
  localparam int unsigned PART_LSB = 8;
  // Active-list bit-vector segment: 256 vertices = 4 memory words.
  localparam int unsigned SEG_BITS  = 256;
  localparam int unsigned SEG_WORDS = SEG_BITS / DATA_W;

  typedef logic [VID_W-1:0]  vid_t;
  typedef logic [RANK_W-1:0] rank_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [TAG_W-1:0]  tag_t;
  typedef logic [AU_W-1:0]   au_t;

  // Memory request (cache side and DRAM side). Every request, read or
  // write, gets exactly one response carrying the same tag.
  typedef struct packed {
    logic  we;
    addr_t addr;
    data_t wdata;
    tag_t  tag;
  } mem_req_t;

  typedef struct packed {
    data_t rdata;
    tag_t  tag;
  } mem_rsp_t;

  // Neighbour-vertex-data (NVD) read, Gather Unit -> Sync Unit of the AU
  // that owns the target vertex.
  typedef struct packed {
    au_t   src_au;
    tag_t  tag;
    rank_t rank;     // rank of the vertex being gathered
    vid_t  target;   // vertex whose data is read
  } nvd_req_t;

  // NVD response, owner AU -> requesting Gather Unit.
  typedef struct packed {
    tag_t  tag;
    data_t data;
  } nvd_rsp_t;

  // Activation message, Scatter Unit -> Sync Unit of the target's owner AU.
  typedef struct packed {
    au_t   src_au;
    tag_t  tag;
    rank_t rank;     // rank of the scattering vertex
    vid_t  target;   // out-neighbour
    logic  flag;     // true: schedule target for execution
  } act_req_t;

  typedef struct packed {
    tag_t tag;
  } act_ack_t;

  // Vertex handed from the Sync Unit to the Gather Unit.
  typedef struct packed {
    vid_t  vid;
    rank_t rank;
    logic [7:0] row;   // Sync Unit table row of the vertex
  } vtx_t;

  // Gather result, Gather Unit -> Apply Unit.
  typedef struct packed {
    vtx_t  v;
    data_t vdata;      // the vertex's own data before the update
    data_t acc;        // gather accumulator
  } gather_out_t;

  // Apply result, Apply Unit -> Scatter Unit.
  typedef struct packed {
    vtx_t  v;
    data_t vdata;      // new vertex data to be written after scatter
    logic  do_scatter; // activate the out-neighbours
  } apply_out_t;

  // Run-time configuration written by the host before start.
  typedef struct packed {
    addr_t vi_in_base;   // VertexInfo, in-edge CSR offsets (|V|+1 words)
    addr_t ei_in_base;   // EdgeInfo, in-edge source vertices
    addr_t vi_out_base;  // VertexInfo, out-edge CSR offsets
    addr_t ei_out_base;  // EdgeInfo, out-edge destination vertices
    addr_t vd_base;      // VertexData, one word per vertex
    addr_t al_bv_base;   // ActiveList bit vector, 1 bit per vertex
    addr_t al_flag_base; // one word per segment: segment is in the queue
    addr_t al_q_base;    // per-AU circular queues of segment indices
    logic [31:0] al_q_cap;  // queue capacity per AU (words)
    logic [31:0] pr_base;   // (1-alpha)/|V|, fixed point
    logic [31:0] pr_alpha;  // alpha, fixed point
    logic [31:0] pr_eps;    // convergence threshold epsilon
  } cfg_t;

  // Event strobes an accelerator unit reports (bit positions of gx_au.ev).
  localparam int unsigned EV_RAW_STALL    = 0;   // SYU parked a read (RAW)
  localparam int unsigned EV_WAR_STALL    = 1;   // SYU parked an activation (WAR)
  localparam int unsigned EV_FILTERED     = 2;   // SYU dropped an unnecessary activation
  localparam int unsigned EV_DUP_HOLD     = 3;   // SYU held a vertex still in its table
  localparam int unsigned EV_ALM_LOCAL    = 4;   // ALM set a bit of its local segment
  localparam int unsigned EV_ALM_REMOTE   = 5;   // ALM began an in-memory activation
  localparam int unsigned EV_ALM_PUSH     = 6;   // ALM appended a segment to its queue
  localparam int unsigned EV_RT_THROTTLE  = 7;   // Runtime held a vertex for lack of room
  localparam int unsigned EV_GU_EDGE      = 8;   // GU gave an edge slot to a vertex
  localparam int unsigned EV_GU_CREDIT    = 9;   // GU vertex waited for an edge slot
  localparam int unsigned EV_SCU_EDGE     = 10;  // SCU gave an edge slot to a vertex
  localparam int unsigned EV_SCU_CREDIT   = 11;  // SCU vertex waited for an edge slot
  localparam int unsigned EV_CACHE_HIT    = 12;  // a cache read hit
  localparam int unsigned EV_CACHE_MISS   = 13;  // a cache read missed
  localparam int unsigned EV_GATHER_DONE  = 14;
  localparam int unsigned EV_SCATTER_DONE = 15;

  // ---- PageRank user functions (Fig. 1 of the algorithm) ----

  function automatic logic [31:0] vd_rank(data_t d);
    return d[31:0];
  endfunction

  function automatic logic [31:0] vd_invdeg(data_t d);
    return d[63:32];
  endfunction

  // gather_edge(): sum += r_u / d_u
  function automatic data_t gather_edge(data_t acc, data_t nbr);
    logic [63:0] prod;
    prod = 64'(vd_rank(nbr)) * 64'(vd_invdeg(nbr));
    return acc + (prod >> FRAC_W);
  endfunction

  // Owner AU of a vertex or edge index.
  function automatic int unsigned owner_au(logic [31:0] idx, int unsigned num_au);
    return int'((idx >> PART_LSB) & (num_au - 1));
  endfunction

endpackage
