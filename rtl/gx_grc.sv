// gx_grc: Global Rank Counter of a multi-AU accelerator.
//
// Each Sync Unit keeps a copy of the global rank counter and builds a rank
// as {counter, AU number}, which makes ranks unique across AUs (document,
// Sec. IV-H). Whenever any Sync Unit assigns a rank, the GRC tells every
// Sync Unit to increment its copy, so all copies stay equal and ranks grow
// monotonically. The increment is combinational: it reaches all copies at
// the same clock edge as the assignment, so an AU that assigns ranks in two
// consecutive cycles never repeats a counter value (this design's choice).
// The GRC also counts the ranks handed out, for the host.
module gx_grc #(
  parameter int unsigned NUM_AU = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_AU-1:0] assign_i,   // AU i assigned a rank this cycle
  output logic              inc_o,      // increment to every Sync Unit
  output logic [31:0]       issued_o    // ranks assigned so far
);
  assign inc_o = |assign_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) issued_o <= '0;
    else        issued_o <= issued_o + 32'($countones(assign_i));
  end
endmodule
