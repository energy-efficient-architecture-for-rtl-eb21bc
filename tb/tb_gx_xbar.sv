// tb_gx_xbar: four inputs send numbered messages to random outputs while
// the outputs stall at random. Every message must arrive exactly once, at
// the output it named, and in order for each input/output pair.
module tb_gx_xbar;
  localparam int N = 4;
  typedef logic [31:0] msg_t;   // {src[7:0], dest[7:0], seq[15:0]}
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [1:0] in_dest [N];
  msg_t in_data [N];
  msg_t out_data [N];
  gx_xbar #(.N(N), .T(msg_t)) dut (.*);

  int checks = 0, failures = 0;
  int sent = 0, got = 0;
  int seq [N];
  int next_exp [N][N];
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] fired = 0;
  always @(posedge clk) fired <= in_valid & in_ready;
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < N; o++)
      if (out_valid[o] && out_ready[o]) begin
        int s, d, q;
        s = int'(out_data[o][31:24]); d = int'(out_data[o][23:16]); q = int'(out_data[o][15:0]);
        checks++; got++;
        if (d != o || q != next_exp[s][o]) begin
          failures++; $display("out %0d got src %0d dest %0d seq %0d exp %0d", o, s, d, q, next_exp[s][o]);
        end
        next_exp[s][o] = q + 1;
      end
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      seq[i] = 0; in_dest[i] = 0; in_data[i] = 0;
      for (int o = 0; o < N; o++) next_exp[i][o] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (fired[i]) begin sent++; in_valid[i] = 0; end
        if (!in_valid[i] && $urandom_range(1) == 1) begin
          int d;
          d = int'($urandom_range(N - 1));
          if (n % 50 < 10) d = 0;      // hot spot: all inputs to output 0
          in_valid[i] = 1;
          in_dest[i]  = 2'(d);
          in_data[i]  = {8'(i), 8'(d), 16'(seq_for(i, d))};
        end
        out_ready[i] = ($urandom_range(3) != 0);
      end
    end
    @(negedge clk);
    for (int i = 0; i < N; i++) if (fired[i]) begin sent++; in_valid[i] = 0; end
    out_ready = '1;
    repeat (5) @(negedge clk);
    checks++;
    if (sent != got || sent < 1000) begin failures++; $display("sent %0d got %0d", sent, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seqd [N][N];
  function automatic int seq_for(int i, int d);
    seq_for = seqd[i][d];
    seqd[i][d] = seqd[i][d] + 1;
  endfunction
  initial for (int i = 0; i < N; i++) for (int o = 0; o < N; o++) seqd[i][o] = 0;
endmodule
