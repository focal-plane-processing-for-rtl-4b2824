// mv_chip_top: focal-plane motion vector detector, 16 x 16 pixels.
//
// Each frame the pixel array detects horizontal and vertical binary edges
// (time-multiplexed through one detector per pixel) and stores them next to
// the previous frame's edges in a 4-bit memory per pixel.  Four LPGCP
// processors then match every 2x2 current-frame block against the nine
// positions of the surrounding 4x4 previous-frame area (search range +/-1
// pixel) and put out, for each block, the best of the nine candidate vectors
// Y0..Y8 (ties go to the candidate nearest the centre).  Rows are processed
// one after another under the 32-stage vertical shift register (even phase:
// horizontal edges, odd phase: vertical edges), and all columns in a window
// at once; the four processors are moved over the array in three window
// positions (columns 0-6, 4-10, 8-14).
//
// Interface: pix[r][c] are the sampled photodiode values (the photodiodes
// themselves are analog and outside this RTL).  start_mv runs one frame over
// the window positions enabled in win_en; each row step gives one
// mv_valid pulse with mv_row = top row of the 4x4 search areas, and per
// processor p: mv_col[p] = left column of its 4x4 search area, mv_y[p] the
// one-hot Y lines, mv_index[p] the vector order index (0 = no motion).  The
// 2x2 block that was matched lies at rows mv_row+1..+2, columns
// mv_col[p]+1..+2.  start_img reads out the image and the current edge
// bits in raster order, one pixel per clock with img_valid.
//
// Timing: a frame takes 3 + (1 + 13*12) clocks per enabled window, 474 with
// all three; mv_valid comes 12 clocks apart within a window.  The
// architecture is the original design's; clocking, the on-chip sequencer and the
// pixel sample width are this design's choices (see the sub-modules).
module mv_chip_top
  import mv_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned N_PROC = 4,
  parameter int unsigned N_WIN  = 3
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [N-1:0][N-1:0][PIX_W-1:0]     pix,
  input  logic [PIX_W-1:0]                   thr,
  input  logic [N_WIN-1:0]                   win_en,
  input  logic                               start_mv,
  input  logic                               start_img,
  output logic                               busy,
  output logic                               mv_valid,
  output logic [$clog2(N)-1:0]               mv_row,
  output logic [N_PROC-1:0][$clog2(N)-1:0]   mv_col,
  output logic [N_PROC-1:0][NCAND-1:0]       mv_y,
  output logic [N_PROC-1:0][3:0]             mv_index,
  output logic                               img_valid,
  output logic [$clog2(N)-1:0]               img_row,
  output logic [$clog2(N)-1:0]               img_col,
  output logic [PIX_W-1:0]                   img_pix,
  output logic                               img_edge_h,
  output logic                               img_edge_v
);
  localparam int unsigned RW = $clog2(N);

  // sequencer
  logic      swap, wr_h, wr_v;
  acc_ctrl_t seq_ctrl, ctrl;
  logic      vsr_load, vsr_shift, hsr_load, hsr_shift, img_en;
  logic [1:0]    win;
  logic [RW-1:0] row, col;

  mv_sequencer #(.N(N), .N_WIN(N_WIN)) u_seq (
    .clk      (clk),
    .rst_n    (rst_n),
    .start_mv (start_mv),
    .start_img(start_img),
    .win_en   (win_en),
    .swap     (swap),
    .wr_h     (wr_h),
    .wr_v     (wr_v),
    .ctrl     (seq_ctrl),
    .vsr_load (vsr_load),
    .vsr_shift(vsr_shift),
    .hsr_load (hsr_load),
    .hsr_shift(hsr_shift),
    .win      (win),
    .row      (row),
    .col      (col),
    .img_en   (img_en),
    .busy     (busy)
  );

  // pixel array: edge detectors and 4-bit memories
  edge_mem_t [N-1:0][N-1:0] mem;

  edge_memory_array #(.N(N), .PIX_W(PIX_W)) u_array (
    .clk  (clk),
    .rst_n(rst_n),
    .pix  (pix),
    .thr  (thr),
    .swap (swap),
    .wr_h (wr_h),
    .wr_v (wr_v),
    .mem  (mem)
  );

  // vertical (2N stages) and horizontal (N stages) shift registers
  logic [2*N-1:0] vsr_q;
  logic [N-1:0]   vsr_even, vsr_odd;
  logic           vsr_last;
  logic [N-1:0]   hsr_q;
  logic [N/2-1:0] hsr_even, hsr_odd;
  logic           hsr_last;

  shift_register #(.STAGES(2*N)) u_vsr (
    .clk(clk), .rst_n(rst_n), .load(vsr_load), .shift(vsr_shift),
    .q(vsr_q), .even(vsr_even), .odd(vsr_odd), .last(vsr_last)
  );

  shift_register #(.STAGES(N)) u_hsr (
    .clk(clk), .rst_n(rst_n), .load(hsr_load), .shift(hsr_shift),
    .q(hsr_q), .even(hsr_even), .odd(hsr_odd), .last(hsr_last)
  );

  // memory read-out tree and shifting window
  logic [1:0][N-1:0]       cur_rows;
  logic [3:0][N-1:0]       pre_rows;
  logic                    phase_v;
  logic [N_PROC-1:0][3:0]  cur_blk;
  logic [N_PROC-1:0][15:0] pre_blk;

  memory_tree #(.N(N)) u_tree (
    .mem     (mem),
    .vsr_even(vsr_even),
    .vsr_odd (vsr_odd),
    .cur_rows(cur_rows),
    .pre_rows(pre_rows),
    .phase_v (phase_v)
  );

  shifting_window #(.N(N), .N_PROC(N_PROC), .N_WIN(N_WIN)) u_window (
    .win     (win),
    .cur_rows(cur_rows),
    .pre_rows(pre_rows),
    .cur_blk (cur_blk),
    .pre_blk (pre_blk)
  );

  // The accumulators take their phase from the vertical register, which
  // decides whether horizontal or vertical edges are on the row lines.
  always_comb begin
    ctrl         = seq_ctrl;
    ctrl.phase_v = phase_v;
  end

  // LPGCP processors
  logic [N_PROC-1:0][NCAND-1:0][ACC_BITS-1:0] acc_out;

  for (genvar p = 0; p < N_PROC; p++) begin : g_proc
    lpgcp_processor u_proc (
      .clk  (clk),
      .rst_n(rst_n),
      .ctrl (ctrl),
      .cur  (cur_blk[p]),
      .pre  (pre_blk[p]),
      .y    (mv_y[p]),
      .index(mv_index[p]),
      .acc_out (acc_out[p])
    );
  end

  // output labels: registered with Syn-Yi-reg, like the vectors
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mv_valid <= 1'b0;
      mv_row   <= '0;
      mv_col   <= '0;
    end else begin
      mv_valid <= ctrl.syn;
      if (ctrl.syn) begin
        mv_row <= row;
        for (int unsigned p = 0; p < N_PROC; p++)
          mv_col[p] <= RW'(4 * int'(win) + p);
      end
    end
  end

  // image / edge read-out
  image_readout #(.N(N), .PIX_W(PIX_W)) u_readout (
    .pix    (pix),
    .mem    (mem),
    .row_sel(vsr_even),
    .col_sel(hsr_q),
    .pix_out(img_pix),
    .edge_h (img_edge_h),
    .edge_v (img_edge_v)
  );

  assign img_valid = img_en;
  assign img_row   = row;
  assign img_col   = col;

  // Accumulator samples are taken only while exactly one row is selected,
  // in the phase the sequencer expects.
  a_sample_phase : assert property (@(posedge clk) disable iff (!rst_n)
      (|seq_ctrl.xor_ck) |-> ($onehot(vsr_q) && phase_v == seq_ctrl.phase_v));
endmodule
