// tg_memory_cell: the 4-bit edge memory of one pixel.
//
// Holds the horizontal and vertical edge bits of the current frame and of
// the previous frame ({h_cur, v_cur, h_prev, v_prev}, bits 3..0, the
// original design's layout).  At the start of a frame 'swap' moves the current pair
// into the previous pair; then 'wr_h' (slot t1) and 'wr_v' (slot t2) store
// the edge detector's output as the new current bits.  The original design stores
// each bit dynamically on a gate capacitance between two transmission-gate
// switches (retention 1-10 ms); here each bit is a flip-flop, which is this
// design's choice.  All updates take effect on the next rising clock edge;
// swap has priority over the writes if both are asserted.  rst_n is an
// active-low synchronous reset clearing all four bits.
module tg_memory_cell
  import mv_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      swap,
  input  logic      wr_h,
  input  logic      wr_v,
  input  logic      edge_in,
  output edge_mem_t mem
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mem <= '0;
    end else if (swap) begin
      mem.h_prev <= mem.h_cur;
      mem.v_prev <= mem.v_cur;
    end else begin
      if (wr_h) mem.h_cur <= edge_in;
      if (wr_v) mem.v_cur <= edge_in;
    end
  end
endmodule
