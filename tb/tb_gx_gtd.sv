// tb_gx_gtd: done must rise only after a start and only once every unit is
// idle in the same cycle, and must stay high until the next start.
module tb_gx_gtd;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;
  logic [3:0] au_idle = 4'hf;
  logic running, done;
  gx_gtd #(.NUM_AU(4)) dut (.*);
  int checks = 0, failures = 0;
  task automatic expect_done(input logic e, input string what);
    checks++;
    if (done !== e) begin failures++; $display("%s: done=%b", what, done); end
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); expect_done(0, "idle before start");
    au_idle = 4'h0;
    start = 1; @(negedge clk); start = 0;
    for (int n = 0; n < 50; n++) begin
      au_idle = 4'($urandom) & 4'b0111;   // unit 3 busy
      @(negedge clk); expect_done(0, "some unit busy");
    end
    au_idle = 4'hf;
    @(negedge clk); expect_done(1, "all idle");
    au_idle = 4'h0;
    repeat (3) @(negedge clk); expect_done(1, "held");
    start = 1; @(negedge clk); start = 0;
    expect_done(0, "cleared by start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
