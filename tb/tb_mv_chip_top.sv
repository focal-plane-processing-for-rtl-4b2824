// tb_mv_chip_top: end-to-end test of the 16 x 16 motion vector chip at its
// default size.  A random texture is moved by a known step of up to one
// pixel per frame (and sometimes replaced by a new texture).  For every
// frame the testbench computes, independently of the RTL, the binary edges
// of both frames, the Hamming distance of each 2x2 current block to the nine
// shifted positions in the previous frame, and the vector chosen by the
// distance-from-centre priority; it then checks every vector the chip puts
// out (row, columns, Y lines, index) and the frame time (474 clocks with all
// three windows).  It also runs frames with only some window positions
// enabled and image/edge read-outs, and counts each mechanism: memory swap,
// each window position, arbitrated ties, off-centre vectors, partial window
// scans and read-outs.  A mechanism never seen counts as a failure.
module tb_mv_chip_top;
  import mv_pkg::*;
  localparam int unsigned N = 16, PIX_W = 8, N_PROC = 4;
  logic clk = 0, rst_n;
  logic [N-1:0][N-1:0][PIX_W-1:0] pix;
  logic [PIX_W-1:0] thr;
  logic [2:0] win_en;
  logic start_mv, start_img, busy, mv_valid, img_valid, img_edge_h, img_edge_v;
  logic [3:0] mv_row, img_row, img_col;
  logic [N_PROC-1:0][3:0] mv_col;
  logic [N_PROC-1:0][8:0] mv_y;
  logic [N_PROC-1:0][3:0] mv_index;
  logic [PIX_W-1:0] img_pix;

  int checks = 0, failures = 0;
  int order[9] = '{5, 1, 6, 2, 0, 3, 7, 4, 8};
  logic [N-1:0][N-1:0] hc, vc, hp, vp;        // model edge memories
  int tex[N+2][N+2];
  int n_frames, n_win[3], n_ties, n_moved, n_partial, n_img, n_vec;

  mv_chip_top dut (.*);
  always #5 clk = ~clk;

  function automatic int absd(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  // expected vector of processor block with 4x4 top-left (r0, c0)
  function automatic int expect_y(int r0, int c0, output int tie);
    int d[9], m, best, nmin;
    m = 99;
    for (int k = 0; k < 9; k++) begin
      d[k] = 0;
      for (int a = 0; a < 2; a++)
        for (int b = 0; b < 2; b++) begin
          int rc, cc, rp, cp;
          rc = r0 + 1 + a; cc = c0 + 1 + b; rp = r0 + k / 3 + a; cp = c0 + k % 3 + b;
          d[k] += int'(hc[rc][cc] ^ hp[rp][cp]) + int'(vc[rc][cc] ^ vp[rp][cp]);
        end
      if (d[k] < m) m = d[k];
    end
    best = -1; nmin = 0;
    for (int k = 0; k < 9; k++)
      if (d[k] == m) begin
        nmin++;
        if (best < 0 || order[k] < order[best]) best = k;
      end
    tie = (nmin > 1);
    return best;
  endfunction

  task automatic new_texture();
    for (int r = 0; r < N + 2; r++)
      for (int c = 0; c < N + 2; c++) tex[r][c] = $urandom_range(0, 255);
  endtask

  // move the texture by (dy, dx) in {-1,0,1} and show its centre 16 x 16
  task automatic move_texture(int dy, int dx);
    int t2[N+2][N+2];
    for (int r = 0; r < N + 2; r++)
      for (int c = 0; c < N + 2; c++) begin
        int sr, sc;
        sr = r - dy; sc = c - dx;
        t2[r][c] = (sr >= 0 && sr < N + 2 && sc >= 0 && sc < N + 2) ? tex[sr][sc]
                                                                    : $urandom_range(0, 255);
      end
    tex = t2;
  endtask

  task automatic run_frame(input logic [2:0] en);
    int cycles, w, r, tie, ey;
    hp = hc; vp = vc;
    for (int rr = 0; rr < N; rr++)
      for (int c = 0; c < N; c++) begin
        pix[rr][c] = PIX_W'(tex[rr+1][c+1]);
      end
    for (int rr = 0; rr < N; rr++)
      for (int c = 0; c < N; c++) begin
        hc[rr][c] = (c + 1 < N) && absd(int'(pix[rr][c]), int'(pix[rr][c+1])) >= int'(thr);
        vc[rr][c] = (rr + 1 < N) && absd(int'(pix[rr][c]), int'(pix[rr+1][c])) >= int'(thr);
      end
    @(negedge clk); win_en = en; start_mv = 1;
    @(negedge clk); start_mv = 0;
    cycles = 1;
    w = 0; while (w < 3 && !en[w]) w++;
    r = 0;
    while (busy || mv_valid || cycles < 3) begin
      if (mv_valid) begin
        checks++;
        if (w >= 3 || int'(mv_row) != r) begin
          failures++;
          $display("FAIL vector label row %0d exp w%0d r%0d", mv_row, w, r);
        end else begin
          n_win[w]++;
          for (int p = 0; p < N_PROC; p++) begin
            ey = expect_y(r, 4 * w + p, tie);
            n_ties += tie; n_vec++;
            if (ey != 4) n_moved++;
            checks++;
            if (int'(mv_col[p]) != 4 * w + p || mv_y[p] !== (9'b1 << ey) ||
                int'(mv_index[p]) != order[ey]) begin
              failures++;
              if (failures < 10)
                $display("FAIL w%0d r%0d p%0d: y=%b idx=%0d col=%0d exp Y%0d", w, r, p,
                         mv_y[p], mv_index[p], mv_col[p], ey);
            end
          end
          r++;
          if (r == N - 3) begin
            r = 0; w++;
            while (w < 3 && !en[w]) w++;
          end
        end
      end
      @(negedge clk);
      cycles++;
      if (cycles > 2000) break;
    end
    // every enabled window fully reported
    checks++;
    if (w != 3) begin failures++; $display("FAIL windows not all reported"); end
    checks++;
    // busy for 3 + 157 per window clocks, then the last vector one clock later
    if (cycles != 3 + $countones(en) * (1 + 13 * 12) + 2) begin
      failures++;
      $display("FAIL frame took %0d cycles", cycles);
    end
    n_frames++;
    if (en != 3'b111) n_partial++;
  endtask

  task automatic run_readout();
    int seen;
    seen = 0;
    @(negedge clk); start_img = 1; @(negedge clk); start_img = 0;
    while (busy) begin
      if (img_valid) begin
        int rr, cc;
        rr = int'(img_row); cc = int'(img_col);
        checks++;
        if (rr != seen / N || cc != seen % N || img_pix !== pix[rr][cc] ||
            img_edge_h !== hc[rr][cc] || img_edge_v !== vc[rr][cc]) begin
          failures++;
          if (failures < 10) $display("FAIL read-out (%0d,%0d)", rr, cc);
        end
        seen++;
      end
      @(negedge clk);
    end
    checks++;
    if (seen != N * N) failures++;
    n_img++;
  endtask

  initial begin
    rst_n = 0; start_mv = 0; start_img = 0; win_en = 3'b111; thr = 8'd60; pix = '0;
    hc = '0; vc = '0; hp = '0; vp = '0;
    n_frames = 0; n_win = '{0, 0, 0}; n_ties = 0; n_moved = 0; n_partial = 0; n_img = 0; n_vec = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    new_texture();
    run_frame(3'b111);
    for (int f = 0; f < 12; f++) begin
      if (f % 5 == 4) new_texture();
      else move_texture($urandom_range(0, 2) - 1, $urandom_range(0, 2) - 1);
      thr = 8'($urandom_range(30, 90));
      run_frame((f % 4 == 3) ? 3'($urandom_range(1, 6)) : 3'b111);
      if (f % 3 == 1) run_readout();
    end
    $display("frames %0d, window scans %0d/%0d/%0d row steps, vectors %0d, off-centre %0d, ties %0d, partial-window frames %0d, read-outs %0d",
             n_frames, n_win[0], n_win[1], n_win[2], n_vec, n_moved, n_ties, n_partial, n_img);
    checks++; if (n_frames < 2) failures++;          // memory swap used
    checks++; if (n_win[0] == 0 || n_win[1] == 0 || n_win[2] == 0) failures++;
    checks++; if (n_ties == 0) failures++;
    checks++; if (n_moved == 0) failures++;
    checks++; if (n_partial == 0) failures++;
    checks++; if (n_img == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
