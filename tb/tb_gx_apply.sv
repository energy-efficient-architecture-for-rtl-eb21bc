// tb_gx_apply: checks the PageRank apply pipeline against an independent
// computation of r_new = base + alpha*sum and |r_new - r_old| > eps, in
// order, with random back-pressure, and checks the 3-cycle latency.
module tb_gx_apply;
  import gx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_t cfg;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  gather_out_t in;
  apply_out_t out;
  gx_apply dut (.*);

  int checks = 0, failures = 0;
  apply_out_t exp_q [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic apply_out_t model(gather_out_t g);
    apply_out_t o;
    logic [63:0] p;
    logic [31:0] rn, ro, d;
    p  = 64'(cfg.pr_alpha) * 64'(g.acc[31:0]);
    rn = cfg.pr_base + 32'(p >> 28);
    ro = g.vdata[31:0];
    d  = (rn > ro) ? rn - ro : ro - rn;
    o.v = g.v;
    o.vdata = {g.vdata[63:32], rn};
    o.do_scatter = d > cfg.pr_eps;
    return o;
  endfunction

  // scoreboard
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    apply_out_t e;
    checks++;
    e = exp_q.pop_front();
    if (out !== e) begin
      failures++;
      $display("mismatch: got %h exp %h", out, e);
    end
  end

  initial begin
    cfg = '0;
    cfg.pr_alpha = 32'd228170137;
    cfg.pr_base  = 32'd1000;
    cfg.pr_eps   = 32'd50;
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency: one item into an empty pipeline appears 3 cycles later
    @(negedge clk);
    in.v.vid = 7; in.acc = 64'd5000; in.vdata = {32'd99, 32'd5200};
    in_valid = 1;
    exp_q.push_back(model(in));
    @(negedge clk);
    in_valid = 0;
    begin
      int t0;
      t0 = cyc;
      while (!out_valid) @(negedge clk);
      checks++;
      if (cyc - t0 != 2) begin failures++; $display("latency %0d", cyc - t0 + 1); end
    end
    // random stream with random stalls
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      out_ready = ($urandom_range(3) != 0);
      if (!in_valid || in_ready) begin
        in_valid = ($urandom_range(1) == 1);
        in.v.vid  = $urandom;
        in.v.rank = $urandom;
        in.acc    = {32'd0, $urandom_range(32'h3fffffff)};
        in.vdata  = {$urandom, 32'($urandom_range(32'h3fffffff))};
        if (n % 7 == 0) in.vdata[31:0] = model(in).vdata[31:0] + 32'($urandom_range(100));
      end
      #1;
      if (in_valid && in_ready) exp_q.push_back(model(in));
    end
    @(negedge clk);
    in_valid = 0;
    out_ready = 1;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
