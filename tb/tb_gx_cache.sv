// tb_gx_cache: random reads and writes over 16 addresses through a 4-line
// cache backed by the DRAM model. Every response is compared with a shadow
// copy of memory; hits must answer one cycle after acceptance, and both
// hits and misses must occur.
module tb_gx_cache;
  import gx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid = 0, req_ready, rsp_valid, rsp_ready = 1;
  mem_req_t req;
  mem_rsp_t rsp;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid, hit_o, miss_o;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  gx_cache #(.LINES(4)) dut (.*);
  gx_dram_model #(.WORDS(64), .LAT(4), .READY_PCT(70)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp(mem_rsp));

  int checks = 0, failures = 0, hits = 0, misses = 0;
  data_t shadow [16];
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) begin
    if (hit_o) hits++;
    if (miss_o) misses++;
  end

  initial begin
    for (int i = 0; i < 64; i++) u_mem.mem[i] = 64'(i) * 64'h1111;
    for (int i = 0; i < 16; i++) shadow[i] = 64'(i) * 64'h1111;
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      logic was_hit;
      int lat;
      @(negedge clk);
      req.we    = ($urandom_range(3) == 0);
      req.addr  = addr_t'($urandom_range(15));
      req.wdata = {$urandom, $urandom};
      req.tag   = tag_t'(n);
      req_valid = 1;
      while (!req_ready) @(negedge clk);
      #1 was_hit = hit_o;
      @(negedge clk);
      req_valid = 0;
      lat = 0;
      while (!rsp_valid) begin @(negedge clk); lat++; end
      checks++;
      if (rsp.tag != tag_t'(n)) begin failures++; $display("tag mismatch"); end
      if (req.we) begin
        shadow[req.addr] = req.wdata;
      end else begin
        checks++;
        if (rsp.rdata != shadow[req.addr]) begin
          failures++;
          $display("read %0d: got %h exp %h", req.addr, rsp.rdata, shadow[req.addr]);
        end
        if (was_hit) begin
          checks++;
          if (lat != 0) begin failures++; $display("hit latency %0d", lat); end
        end
      end
      // hold the response a random time
      rsp_ready = 0;
      repeat ($urandom_range(2)) @(negedge clk);
      rsp_ready = 1;
      @(negedge clk);
    end
    // memory holds every write (write-through)
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (u_mem.mem[i] != shadow[i]) begin failures++; $display("memory word %0d stale", i); end
    end
    checks++;
    if (hits == 0 || misses == 0) begin failures++; $display("hits %0d misses %0d", hits, misses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
