// tb_gx_grc: random rank assignments from 4 units; the increment must be
// raised exactly in cycles with an assignment and the issued count must
// equal the number of assignments.
module tb_gx_grc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] assign_i = 0;
  logic inc_o;
  logic [31:0] issued_o;
  gx_grc #(.NUM_AU(4)) dut (.*);
  int checks = 0, failures = 0, total = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      assign_i = 4'($urandom);
      #1;
      checks++;
      if (inc_o != (assign_i != 0)) begin failures++; $display("inc wrong"); end
      total += $countones(assign_i);
    end
    @(negedge clk);
    assign_i = 0;
    @(negedge clk);
    checks++;
    if (issued_o != 32'(total)) begin failures++; $display("issued %0d exp %0d", issued_o, total); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
