// memory_tree: read-out tree from the 4-bit memories to the processors.
//
// The vertical shift register activates one row r at a time, first in its
// even phase and then in its odd phase.  While row r is active the tree puts
// on its row lines, for every column:
//   Pre_1st..Pre_4th = previous-frame edges of rows r, r+1, r+2, r+3
//   Cur_1st, Cur_2nd = current-frame edges of rows r+1, r+2
// so the current 2x2 block sits in the middle of the 4x4 previous search
// area.  The horizontal edge bits are read in the even phase and the
// vertical edge bits in the odd phase (phase_v = 1).  Rows beyond the array
// read as 0.  The row grouping and the even/odd use are the original design's; the
// original transmission-gate tree is modelled as a one-hot AND-OR
// multiplexer.  Purely combinational.
module memory_tree
  import mv_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  edge_mem_t [N-1:0][N-1:0] mem,
  input  logic [N-1:0]             vsr_even,
  input  logic [N-1:0]             vsr_odd,
  output logic [1:0][N-1:0]        cur_rows,
  output logic [3:0][N-1:0]        pre_rows,
  output logic                     phase_v
);
  always_comb begin
    cur_rows = '0;
    pre_rows = '0;
    phase_v  = |vsr_odd;
    for (int unsigned r = 0; r < N; r++) begin
      for (int unsigned c = 0; c < N; c++) begin
        for (int unsigned k = 0; k < 4; k++) begin
          if (r + k < N) begin
            pre_rows[k][c] |= (vsr_even[r] & mem[r+k][c].h_prev)
                            | (vsr_odd[r]  & mem[r+k][c].v_prev);
          end
        end
        for (int unsigned k = 0; k < 2; k++) begin
          if (r + k + 1 < N) begin
            cur_rows[k][c] |= (vsr_even[r] & mem[r+k+1][c].h_cur)
                            | (vsr_odd[r]  & mem[r+k+1][c].v_cur);
          end
        end
      end
    end
  end
endmodule
