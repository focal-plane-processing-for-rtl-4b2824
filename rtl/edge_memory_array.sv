// edge_memory_array: the N x N pixel array's edge detectors and memories.
//
// Every pixel holds one time-multiplexed edge detector and one 4-bit memory
// cell, and all N*N pixels work at once.  A frame is taken in three steps,
// one clock each: 'swap' moves the current edge bits to the previous ones,
// 'wr_h' (slot t1) stores horizontal edges |f(r,c) - f(r,c+1)| >= thr, and
// 'wr_v' (slot t2) stores vertical edges |f(r,c) - f(r+1,c)| >= thr.  The
// edge detector of each pixel is switched to the vertical comparison while
// wr_v is high.  Pixel values pix[r][c] are row-major with row 0 at the top
// and column 0 at the left.  Array size N = 16 is the original design's; the pixel
// sample width PIX_W is this design's choice.
module edge_memory_array
  import mv_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned PIX_W = 8
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [N-1:0][N-1:0][PIX_W-1:0]      pix,
  input  logic [PIX_W-1:0]                    thr,
  input  logic                                swap,
  input  logic                                wr_h,
  input  logic                                wr_v,
  output edge_mem_t [N-1:0][N-1:0]            mem
);
  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      localparam int unsigned CR = (c + 1 < N) ? c + 1 : c;
      localparam int unsigned RB = (r + 1 < N) ? r + 1 : r;
      logic edge_bit;

      tmed_edge_detector #(.PIX_W(PIX_W)) u_tmed (
        .f_ij     (pix[r][c]),
        .f_right  (pix[r][CR]),
        .f_below  (pix[RB][c]),
        .has_right(1'(c + 1 < N)),
        .has_below(1'(r + 1 < N)),
        .thr      (thr),
        .sel_v    (wr_v),
        .edge_o   (edge_bit)
      );

      tg_memory_cell u_cell (
        .clk    (clk),
        .rst_n  (rst_n),
        .swap   (swap),
        .wr_h   (wr_h),
        .wr_v   (wr_v),
        .edge_in(edge_bit),
        .mem    (mem[r][c])
      );
    end
  end
endmodule
