// tmed_edge_detector: time-multiplexed edge detector of one pixel.
//
// One absolute-value differentiator serves both edge directions.  In the
// first time slot (t1, sel_v = 0) it compares the pixel f(i,j) with its right
// neighbour f(i+1,j) and gives the horizontal edge; in the second (t2,
// sel_v = 1) it compares with the neighbour below f(i,j+1) and gives the
// vertical edge.  An edge is 1 when |difference| >= thr, as in the original design's
// thresholded first-difference operator.  The original design builds this as an
// analog OTA circuit; here the pixel voltages are PIX_W-bit samples and the
// comparison is exact.  A pixel with no neighbour in the compared direction
// (right column, bottom row) reports no edge: this border rule is this
// design's choice.  Purely combinational.
module tmed_edge_detector #(
  parameter int unsigned PIX_W = 8
) (
  input  logic [PIX_W-1:0] f_ij,
  input  logic [PIX_W-1:0] f_right,
  input  logic [PIX_W-1:0] f_below,
  input  logic             has_right,
  input  logic             has_below,
  input  logic [PIX_W-1:0] thr,
  input  logic             sel_v,
  output logic             edge_o
);
  logic [PIX_W-1:0] other;
  logic [PIX_W-1:0] absdiff;
  logic             valid;

  always_comb begin
    other   = sel_v ? f_below : f_right;
    valid   = sel_v ? has_below : has_right;
    absdiff = (f_ij >= other) ? (f_ij - other) : (other - f_ij);
    edge_o  = valid && (absdiff >= thr);
  end
endmodule
