// image_readout: image and edge-image output multiplexer.
//
// During read-out the vertical register's even-phase outputs select one row
// (row_sel, one-hot) and the horizontal register selects one column
// (col_sel, one-hot, Col 1..Col N).  The selected pixel's value and its
// current-frame horizontal and vertical edge bits are put out.  On the chip
// the pixel value is an analog voltage through an output switch; here it is
// the PIX_W-bit sample.  Row/column selection by the two shift registers is
// the original design's; putting the edge bits out through the same selection is
// this design's choice.  Purely combinational; outputs are 0 when no row or
// column is selected.
module image_readout
  import mv_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned PIX_W = 8
) (
  input  logic [N-1:0][N-1:0][PIX_W-1:0] pix,
  input  edge_mem_t [N-1:0][N-1:0]       mem,
  input  logic [N-1:0]                   row_sel,
  input  logic [N-1:0]                   col_sel,
  output logic [PIX_W-1:0]               pix_out,
  output logic                           edge_h,
  output logic                           edge_v
);
  always_comb begin
    pix_out = '0;
    edge_h  = 1'b0;
    edge_v  = 1'b0;
    for (int unsigned r = 0; r < N; r++) begin
      for (int unsigned c = 0; c < N; c++) begin
        if (row_sel[r] && col_sel[c]) begin
          pix_out |= pix[r][c];
          edge_h  |= mem[r][c].h_cur;
          edge_v  |= mem[r][c].v_cur;
        end
      end
    end
  end
endmodule
