// tb_gx_mem_if: four requesters, each with one request in flight, read and
// write their own region of the DRAM model through the memory interface.
// Each response must come back to the requester that issued it with the
// right data, and all requesters must make progress.
module tb_gx_mem_if;
  import gx_pkg::*;
  localparam int NP = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NP-1:0] c_req_valid = 0, c_req_ready, c_rsp_valid;
  mem_req_t c_req [NP];
  mem_rsp_t c_rsp [NP];
  logic dram_req_valid, dram_req_ready, dram_rsp_valid;
  mem_req_t dram_req;
  mem_rsp_t dram_rsp;
  gx_mem_if #(.NPORTS(NP)) dut (.*);
  gx_dram_model #(.WORDS(256), .LAT(6), .READY_PCT(75)) u_mem (
    .clk, .rst_n, .req_valid(dram_req_valid), .req_ready(dram_req_ready), .req(dram_req),
    .rsp_valid(dram_rsp_valid), .rsp(dram_rsp));

  int checks = 0, failures = 0;
  data_t shadow [256];
  logic [NP-1:0] waiting = 0;
  data_t expd [NP];
  int done_n [NP];
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NP-1:0] fired = 0;
  always @(posedge clk) fired <= c_req_valid & c_req_ready;
  initial begin
    for (int i = 0; i < 256; i++) begin u_mem.mem[i] = {$urandom, $urandom}; shadow[i] = u_mem.mem[i]; end
    for (int p = 0; p < NP; p++) begin c_req[p] = '0; done_n[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        if (c_rsp_valid[p]) begin
          checks++;
          if (!waiting[p] || c_rsp[p].rdata != expd[p]) begin
            failures++; $display("port %0d: got %h exp %h", p, c_rsp[p].rdata, expd[p]);
          end
          waiting[p] = 0;
          done_n[p]++;
        end
        if (fired[p]) begin c_req_valid[p] = 0; waiting[p] = 1; end
        if (!c_req_valid[p] && !waiting[p] && $urandom_range(1) == 1) begin
          c_req[p].we    = $urandom_range(1);
          c_req[p].addr  = addr_t'(p * 64 + int'($urandom_range(63)));
          c_req[p].wdata = {$urandom, $urandom};
          c_req[p].tag   = '0;
          if (c_req[p].we) begin shadow[c_req[p].addr] = c_req[p].wdata; expd[p] = c_req[p].wdata; end
          else expd[p] = shadow[c_req[p].addr];
          c_req_valid[p] = 1;
        end
      end
    end
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (done_n[p] < 50) begin failures++; $display("port %0d starved: %0d", p, done_n[p]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
