// tb_gx_global_mrh: random Sync Unit reads, Scatter Unit writes and ALM
// requests go through the global memory request handler to model VertexData
// and ActiveList caches. Read responses must leave towards the unit named in
// tag bits [13:10] with the lower tag bits and the data of the address read;
// write acknowledgements must return to the Scatter Unit with its tag; ALM
// traffic must pass straight through; nothing may be lost or duplicated.
module tb_gx_global_mrh;
  import gx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     syu_req_valid, syu_req_ready, nrsp_valid, nrsp_ready;
  mem_req_t syu_req, scu_req, alm_req, vdc_req, alc_req;
  au_t      nrsp_dest;
  nvd_rsp_t nrsp;
  logic     scu_req_valid, scu_req_ready, scu_rsp_valid, scu_rsp_ready;
  mem_rsp_t scu_rsp, alm_rsp, vdc_rsp, alc_rsp;
  logic     alm_req_valid, alm_req_ready, alm_rsp_valid, alm_rsp_ready;
  logic     vdc_req_valid, vdc_req_ready, vdc_rsp_valid, vdc_rsp_ready;
  logic     alc_req_valid, alc_req_ready, alc_rsp_valid, alc_rsp_ready;

  gx_global_mrh dut (.*);

  int checks = 0, failures = 0;
  function automatic data_t f(addr_t a);
    return {~a, a ^ 32'h1234_5678};
  endfunction

  // model caches, in-order, random acceptance, registered responses
  mem_req_t vq[$], aq[$];
  always @(posedge clk) begin
    if (vdc_req_valid && vdc_req_ready) vq.push_back(vdc_req);
    if (alc_req_valid && alc_req_ready) aq.push_back(alc_req);
    if (vdc_rsp_valid && vdc_rsp_ready) void'(vq.pop_front());
    if (alc_rsp_valid && alc_rsp_ready) void'(aq.pop_front());
    vdc_req_ready <= ($urandom % 3) != 0;
    alc_req_ready <= ($urandom % 2) != 0;
    vdc_rsp_valid <= vq.size() > 0;
    if (vq.size() > 0) vdc_rsp <= '{rdata: (vq[0].we ? 64'd0 : f(vq[0].addr)), tag: vq[0].tag};
    alc_rsp_valid <= aq.size() > 0;
    if (aq.size() > 0) alc_rsp <= '{rdata: f(aq[0].addr), tag: aq[0].tag};
  end

  localparam int N = 300;
  addr_t rd_out [int];
  int    rd_gen = 0, wr_gen = 0, al_gen = 0, rd_got = 0, wr_got = 0, al_got = 0;
  bit    wr_out [int];
  addr_t al_out [int];

  always @(posedge clk) begin
    if (!rst_n) begin
      syu_req_valid <= 1'b0; scu_req_valid <= 1'b0; alm_req_valid <= 1'b0;
    end else begin
      if (syu_req_valid && syu_req_ready) syu_req_valid <= 1'b0;
      if (scu_req_valid && scu_req_ready) scu_req_valid <= 1'b0;
      if (alm_req_valid && alm_req_ready) alm_req_valid <= 1'b0;
      if ((!syu_req_valid || syu_req_ready) && rd_gen < N && $urandom % 2 == 0) begin
        automatic tag_t t = tag_t'({4'($urandom), 10'(rd_gen)});
        automatic addr_t a = $urandom;
        rd_out[int'(t)] = a;
        syu_req_valid <= 1'b1; syu_req <= '{we: 1'b0, addr: a, wdata: '0, tag: t};
        rd_gen <= rd_gen + 1;
      end
      if ((!scu_req_valid || scu_req_ready) && wr_gen < N && $urandom % 2 == 0) begin
        wr_out[wr_gen] = 1'b1;
        scu_req_valid <= 1'b1;
        scu_req <= '{we: 1'b1, addr: $urandom, wdata: {$urandom, $urandom}, tag: tag_t'(wr_gen)};
        wr_gen <= wr_gen + 1;
      end
      if ((!alm_req_valid || alm_req_ready) && al_gen < N && $urandom % 2 == 0) begin
        automatic addr_t a = $urandom;
        al_out[al_gen] = a;
        alm_req_valid <= 1'b1; alm_req <= '{we: 1'b0, addr: a, wdata: '0, tag: tag_t'(al_gen)};
        al_gen <= al_gen + 1;
      end
      if (nrsp_valid && nrsp_ready) begin
        automatic int t = int'({nrsp_dest[3:0], nrsp.tag[9:0]});
        checks++; rd_got <= rd_got + 1;
        if (nrsp.tag[15:10] != 0 || !rd_out.exists(t) || nrsp.data != f(rd_out[t])) begin
          failures++; $display("bad read response dest %0d tag %h", nrsp_dest, nrsp.tag);
        end else rd_out.delete(t);
      end
      if (scu_rsp_valid && scu_rsp_ready) begin
        checks++; wr_got <= wr_got + 1;
        if (!wr_out.exists(int'(scu_rsp.tag))) begin failures++; $display("bad write ack %h", scu_rsp.tag); end
        else wr_out.delete(int'(scu_rsp.tag));
      end
      if (alm_rsp_valid && alm_rsp_ready) begin
        checks++; al_got <= al_got + 1;
        if (!al_out.exists(int'(alm_rsp.tag)) || alm_rsp.rdata != f(al_out[int'(alm_rsp.tag)])) begin
          failures++; $display("bad ALM response %h", alm_rsp.tag);
        end else al_out.delete(int'(alm_rsp.tag));
      end
    end
    nrsp_ready <= ($urandom % 4) != 0;
  end
  assign scu_rsp_ready = 1'b1;
  assign alm_rsp_ready = 1'b1;

  initial begin
    #1000000;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (rd_gen == N && wr_gen == N && al_gen == N);
    repeat (100) @(posedge clk);
    checks++;
    if (rd_got != N || wr_got != N || al_got != N) begin
      failures++; $display("responses: %0d reads, %0d acks, %0d ALM", rd_got, wr_got, al_got);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
