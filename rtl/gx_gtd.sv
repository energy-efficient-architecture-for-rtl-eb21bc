// gx_gtd: Global Termination Detector.
//
// Each AU's Runtime reports when it has no vertex in flight and its part of
// the active list is empty. The GTD declares the whole computation finished
// when every AU reports idle in the same cycle after a start, and holds
// `done` for the host until the next start. A message between AUs always
// belongs to a vertex still in flight in its sender (a scatter waits for its
// acknowledgements), so a cycle in which all AUs are idle is a safe
// termination point. The document gives the GTD's role; the registered
// AND-with-start logic is this design's choice.
module gx_gtd #(
  parameter int unsigned NUM_AU = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,      // host start pulse
  input  logic [NUM_AU-1:0] au_idle,
  output logic              running,
  output logic              done        // to the host, held until next start
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
    end else if (start) begin
      running <= 1'b1;
      done    <= 1'b0;
    end else if (running && (&au_idle)) begin
      running <= 1'b0;
      done    <= 1'b1;
    end
  end
endmodule
