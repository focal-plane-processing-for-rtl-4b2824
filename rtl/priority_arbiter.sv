// priority_arbiter: chooses a single motion vector among tied minima.
//
// Candidates Y0..Y8 lie on a 3x3 grid of shifts, Y4 in the centre.  When
// several hold the same minimum distance, the one nearest the centre wins:
// first Y4 (vector order index 0), then the edge neighbours Y1, Y3, Y5, Y7
// (indices 1-4), then the corners Y0, Y2, Y6, Y8 (indices 5-8); among equal
// distances the smaller index wins.  The output is a one-hot Y line set and
// the winner's vector order index.  With no hit at all (not possible when
// fed by min_search) y is 0 and index is 15.  The order is the original design's.
// Purely combinational.
module priority_arbiter
  import mv_pkg::*;
(
  input  logic [NCAND-1:0] hit,
  output logic [NCAND-1:0] y,
  output logic [3:0]       index
);
  always_comb begin
    y     = '0;
    index = 4'hF;
    for (int n = NCAND - 1; n >= 0; n--) begin
      if (hit[index_to_y(n)]) begin
        y        = '0;
        y[index_to_y(n)] = 1'b1;
        index    = 4'(n);
      end
    end
  end
endmodule
