// tb_edge_memory_array: runs several frames through the 16 x 16 pixel array
// (swap, t1 horizontal write, t2 vertical write, one clock each) with random
// pixel values and thresholds, and compares every pixel's four memory bits
// with edges computed directly from Eq. |f(r,c)-f(r,c+1)| >= thr and
// |f(r,c)-f(r+1,c)| >= thr (0 at the right column and bottom row).
module tb_edge_memory_array;
  import mv_pkg::*;
  localparam int unsigned N = 16, PIX_W = 8;
  logic clk = 0, rst_n, swap, wr_h, wr_v;
  logic [N-1:0][N-1:0][PIX_W-1:0] pix;
  logic [PIX_W-1:0] thr;
  edge_mem_t [N-1:0][N-1:0] mem;
  logic [N-1:0][N-1:0] eh, ev, ph, pv;
  int checks = 0, failures = 0;

  edge_memory_array #(.N(N), .PIX_W(PIX_W)) dut (.*);
  always #5 clk = ~clk;

  function automatic int absd(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  initial begin
    rst_n = 0; swap = 0; wr_h = 0; wr_v = 0; thr = 0; pix = '0;
    ph = '0; pv = '0; eh = '0; ev = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      @(negedge clk);
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) pix[r][c] = PIX_W'($urandom);
      thr = PIX_W'($urandom_range(20, 160));
      ph = eh; pv = ev;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          eh[r][c] = (c + 1 < N) && absd(int'(pix[r][c]), int'(pix[r][c+1])) >= int'(thr);
          ev[r][c] = (r + 1 < N) && absd(int'(pix[r][c]), int'(pix[r+1][c])) >= int'(thr);
        end
      swap = 1; @(negedge clk); swap = 0;
      wr_h = 1; @(negedge clk); wr_h = 0;
      wr_v = 1; @(negedge clk); wr_v = 0;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          checks++;
          if (mem[r][c] !== {eh[r][c], ev[r][c], ph[r][c], pv[r][c]}) begin
            failures++;
            if (failures < 10)
              $display("FAIL frame %0d pixel (%0d,%0d) mem=%b exp=%b", f, r, c, mem[r][c],
                       {eh[r][c], ev[r][c], ph[r][c], pv[r][c]});
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
