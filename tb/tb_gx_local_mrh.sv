// tb_gx_local_mrh: random VertexInfo/EdgeInfo requests from the Gather (port 0)
// and Scatter (port 1) sides go through the local memory request handler to
// two model caches that answer out of a FIFO with data derived from the
// address. Every response must reach the port that issued the request, carry
// the issuer's tag unchanged and the data of that request's address, and
// every request must be answered exactly once.
module tb_gx_local_mrh;
  import gx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] vi_req_valid, vi_req_ready, vi_rsp_valid, vi_rsp_ready;
  logic [1:0] ei_req_valid, ei_req_ready, ei_rsp_valid, ei_rsp_ready;
  mem_req_t   vi_req [2], ei_req [2];
  mem_rsp_t   vi_rsp [2], ei_rsp [2];
  logic       vic_req_valid, vic_req_ready, vic_rsp_valid, vic_rsp_ready;
  logic       eic_req_valid, eic_req_ready, eic_rsp_valid, eic_rsp_ready;
  mem_req_t   vic_req, eic_req;
  mem_rsp_t   vic_rsp, eic_rsp;

  gx_local_mrh dut (.*);

  int checks = 0, failures = 0;
  function automatic data_t f(addr_t a, bit c);
    return {a ^ 32'h5a5a_0000, ~a} ^ (c ? 64'hff : 64'h0);
  endfunction

  // model caches: accept at random, answer in order from registered outputs
  mem_req_t vq[$], eq[$];
  always @(posedge clk) begin
    if (vic_req_valid && vic_req_ready) vq.push_back(vic_req);
    if (eic_req_valid && eic_req_ready) eq.push_back(eic_req);
    if (vic_rsp_valid && vic_rsp_ready) void'(vq.pop_front());
    if (eic_rsp_valid && eic_rsp_ready) void'(eq.pop_front());
    vic_req_ready <= ($urandom % 3) != 0;
    eic_req_ready <= ($urandom % 3) != 0;
    vic_rsp_valid <= vq.size() > 0;
    if (vq.size() > 0) vic_rsp <= '{rdata: f(vq[0].addr, 0), tag: vq[0].tag};
    eic_rsp_valid <= eq.size() > 0;
    if (eq.size() > 0) eic_rsp <= '{rdata: f(eq[0].addr, 1), tag: eq[0].tag};
  end

  // issuers: tags are unique per port, the address of each tag is remembered
  addr_t vi_out [2][int], ei_out [2][int];
  int    vi_sent [2], ei_sent [2], vi_got [2], ei_got [2], vi_gen [2], ei_gen [2];
  localparam int N = 300;

  for (genvar p = 0; p < 2; p++) begin : g_p
    always @(posedge clk) begin
      if (!rst_n) begin
        vi_req_valid[p] <= 1'b0; ei_req_valid[p] <= 1'b0;
        vi_sent[p] <= 0; ei_sent[p] <= 0; vi_gen[p] <= 0; ei_gen[p] <= 0; vi_got[p] <= 0; ei_got[p] <= 0;
      end else begin
        if (vi_req_valid[p] && vi_req_ready[p]) begin
          vi_out[p][int'(vi_req[p].tag)] = vi_req[p].addr;
          vi_sent[p] <= vi_sent[p] + 1; vi_req_valid[p] <= 1'b0;
        end
        if (ei_req_valid[p] && ei_req_ready[p]) begin
          ei_out[p][int'(ei_req[p].tag)] = ei_req[p].addr;
          ei_sent[p] <= ei_sent[p] + 1; ei_req_valid[p] <= 1'b0;
        end
        if ((!vi_req_valid[p] || vi_req_ready[p]) && vi_gen[p] + 1 < N && $urandom % 2 == 0) begin
          vi_req_valid[p] <= 1'b1; vi_gen[p] <= vi_gen[p] + 1;
          vi_req[p] <= '{we: 1'b0, addr: $urandom, wdata: '0, tag: tag_t'(vi_gen[p] + 1) & 16'h3fff};
        end
        if ((!ei_req_valid[p] || ei_req_ready[p]) && ei_gen[p] + 1 < N && $urandom % 2 == 0) begin
          ei_req_valid[p] <= 1'b1; ei_gen[p] <= ei_gen[p] + 1;
          ei_req[p] <= '{we: 1'b0, addr: $urandom, wdata: '0, tag: tag_t'(ei_gen[p] + 1) & 16'h3fff};
        end
        if (vi_rsp_valid[p] && vi_rsp_ready[p]) begin
          checks++; vi_got[p] <= vi_got[p] + 1;
          if (!vi_out[p].exists(int'(vi_rsp[p].tag)) || vi_rsp[p].rdata != f(vi_out[p][int'(vi_rsp[p].tag)], 0)) begin
            failures++; $display("VI port %0d: bad response tag %h", p, vi_rsp[p].tag);
          end else vi_out[p].delete(int'(vi_rsp[p].tag));
        end
        if (ei_rsp_valid[p] && ei_rsp_ready[p]) begin
          checks++; ei_got[p] <= ei_got[p] + 1;
          if (!ei_out[p].exists(int'(ei_rsp[p].tag)) || ei_rsp[p].rdata != f(ei_out[p][int'(ei_rsp[p].tag)], 1)) begin
            failures++; $display("EI port %0d: bad response tag %h", p, ei_rsp[p].tag);
          end else ei_out[p].delete(int'(ei_rsp[p].tag));
        end
      end
    end
    assign vi_rsp_ready[p] = 1'b1;
    assign ei_rsp_ready[p] = 1'b1;
  end

  initial begin
    #1000000;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (vi_sent[0] == N - 1 && vi_sent[1] == N - 1 && ei_sent[0] == N - 1 && ei_sent[1] == N - 1);
    repeat (50) @(posedge clk);
    for (int p = 0; p < 2; p++) begin
      checks++;
      if (vi_got[p] != N - 1 || ei_got[p] != N - 1) begin
        failures++; $display("port %0d: %0d/%0d responses", p, vi_got[p], ei_got[p]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
