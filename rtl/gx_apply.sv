// gx_apply: Apply Unit (APU), PageRank apply function.
//
// Computes, for each gathered vertex (document Fig. 1, lines 5-7):
//   r_new      = (1-alpha)/|V| + alpha * sum      (pr_base + alpha*sum)
//   do_scatter = |r_new - r_old| > epsilon
// and passes the new vertex data {1/d_v, r_new} to the Scatter Unit. The
// APU never touches memory. It is a 3-stage pipeline (multiply, add,
// compare), matching the 3-cycle latency and one-per-cycle throughput the
// document reports for the PageRank apply function; the stage split is this
// design's choice. All values are unsigned fixed point with FRAC_W fraction
// bits; the product is truncated.
//
// Interface: valid/ready in and out. The whole pipeline advances when its
// last stage is empty or being read, so a stalled output holds all stages.
module gx_apply
  import gx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  cfg_t        cfg,
  input  logic        in_valid,
  output logic        in_ready,
  input  gather_out_t in,
  output logic        out_valid,
  input  logic        out_ready,
  output apply_out_t  out
);

  logic        v1, v2, v3;
  gather_out_t s1, s2;
  logic [63:0] prod1;
  logic [31:0] rnew2;
  apply_out_t  s3;
  logic        adv;

  assign adv      = !v3 || out_ready;
  assign in_ready = adv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
    end else if (adv) begin
      // stage 1: alpha * sum
      v1    <= in_valid;
      s1    <= in;
      prod1 <= 64'(cfg.pr_alpha) * 64'(in.acc[31:0]);
      // stage 2: r_new
      v2    <= v1;
      s2    <= s1;
      rnew2 <= cfg.pr_base + 32'(prod1 >> FRAC_W);
      // stage 3: convergence test, new vertex data
      v3            <= v2;
      s3.v          <= s2.v;
      s3.vdata      <= {vd_invdeg(s2.vdata), rnew2};
      s3.do_scatter <= ((rnew2 > vd_rank(s2.vdata)) ? (rnew2 - vd_rank(s2.vdata))
                                                    : (vd_rank(s2.vdata) - rnew2)) > cfg.pr_eps;
    end
  end

  assign out_valid = v3;
  assign out       = s3;

endmodule
