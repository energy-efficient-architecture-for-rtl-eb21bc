// tb_gx_runtime: offers vertices continuously and retires them through
// gather-done / scatter-done at random. Checks that the gather count never
// exceeds GV nor the total NT, that the counters match a model, that
// admission stops when full, and that idle follows an empty system.
module tb_gx_runtime;
  import gx_pkg::*;
  localparam int GV = 3, NT = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic alm_valid = 0, alm_ready, syu_valid, syu_ready = 1;
  vid_t alm_vid = 0, syu_vid;
  logic gather_done = 0, scatter_done = 0, alm_empty = 0, idle, throttle_o;
  logic [15:0] g_cnt, s_cnt;
  gx_runtime #(.GV(GV), .NT(NT)) dut (.*);

  int checks = 0, failures = 0, mg = 0, ms = 0, throttles = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (g_cnt != 16'(mg) || s_cnt != 16'(ms) || mg > GV || mg + ms > NT) begin
      failures++;
      $display("counts g %0d/%0d s %0d/%0d", g_cnt, mg, s_cnt, ms);
    end
    if (syu_valid && syu_vid != alm_vid) begin failures++; $display("vid not passed"); end
    if (syu_valid && syu_ready) mg = mg + 1;
    if (gather_done) begin mg = mg - 1; ms = ms + 1; end
    if (scatter_done) ms = ms - 1;
    if (throttle_o) throttles++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      alm_valid    = 1;
      alm_vid      = $urandom;
      syu_ready    = ($urandom_range(3) != 0);
      gather_done  = (mg > 0) && ($urandom_range(4) == 0);
      scatter_done = (ms > 0) && ($urandom_range(4) == 0);
      #1;
      checks++;
      if (alm_ready != (syu_ready && mg < GV && mg + ms < NT)) begin
        failures++; $display("admission wrong at g %0d s %0d", mg, ms);
      end
    end
    @(negedge clk);
    alm_valid = 0;
    while (mg > 0 || ms > 0) begin
      @(negedge clk);
      gather_done  = (mg > 0);
      scatter_done = (ms > 0);
    end
    @(negedge clk);
    gather_done = 0; scatter_done = 0;
    checks++;
    if (idle) begin failures++; $display("idle while ALM not empty"); end
    alm_empty = 1;
    @(negedge clk);
    checks++;
    if (!idle) begin failures++; $display("not idle when empty"); end
    checks++;
    if (throttles == 0) begin failures++; $display("never throttled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
