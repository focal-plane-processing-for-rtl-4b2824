// min_search: finds the smallest of the nine accumulator codes.
//
// The codes are thermometer codes packed against the MSB, so the bitwise AND
// of all nine is the code of the minimum.  Each candidate is then XNORed bit
// by bit with that minimum; a candidate whose eight XNOR bits are all 1
// holds the minimum and raises hit[k].  Several candidates may hit at once;
// the priority arbiter picks one.  The AND / XNOR scheme is the original design's.
// Purely combinational.
module min_search
  import mv_pkg::*;
(
  input  logic [NCAND-1:0][ACC_BITS-1:0] a,
  output logic [ACC_BITS-1:0]            min_code,
  output logic [NCAND-1:0]               hit
);
  always_comb begin
    min_code = '1;
    for (int unsigned k = 0; k < NCAND; k++) min_code &= a[k];
    for (int unsigned k = 0; k < NCAND; k++) hit[k] = &(a[k] ~^ min_code);
  end
endmodule
