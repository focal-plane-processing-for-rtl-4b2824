// shifting_window: connects N_PROC block matching processors to a window of
// columns.
//
// Only N_PROC = 4 processors serve the whole 16-column array, so they are
// moved over it in N_WIN = 3 window positions.  In position j (0-based) the
// window covers columns 4j .. 4j+6, and processor k (0..3) receives the 4x4
// previous-frame area in columns 4j+k .. 4j+k+3 and the 2x2 current block in
// its middle two columns, 4j+k+1 and 4j+k+2.  This is the original design's rule
// Window(j) = P[i+4(j-1)], i = 1..7, in 0-based form.  Columns past the array
// edge read as 0.
//
// Block bit order: cur_blk[p][2*a+b] is row a, column b of the 2x2 block
// (row 0 = Cur_1st, column 0 = h1); pre_blk[p][4*a+b] is row a, column b of
// the 4x4 area (row 0 = Pre_1st, column 0 = h1).  Purely combinational.
module shifting_window #(
  parameter int unsigned N      = 16,
  parameter int unsigned N_PROC = 4,
  parameter int unsigned N_WIN  = 3
) (
  input  logic [1:0]                win,
  input  logic [1:0][N-1:0]         cur_rows,
  input  logic [3:0][N-1:0]         pre_rows,
  output logic [N_PROC-1:0][3:0]    cur_blk,
  output logic [N_PROC-1:0][15:0]   pre_blk
);
  always_comb begin
    cur_blk = '0;
    pre_blk = '0;
    for (int unsigned w = 0; w < N_WIN; w++) begin
      if (win == 2'(w)) begin
        for (int unsigned p = 0; p < N_PROC; p++) begin
          for (int unsigned a = 0; a < 4; a++)
            for (int unsigned b = 0; b < 4; b++)
              if (4 * w + p + b < N)
                pre_blk[p][4*a+b] = pre_rows[a][4*w+p+b];
          for (int unsigned a = 0; a < 2; a++)
            for (int unsigned b = 0; b < 2; b++)
              if (4 * w + p + b + 1 < N)
                cur_blk[p][2*a+b] = cur_rows[a][4*w+p+b+1];
        end
      end
    end
  end
endmodule
