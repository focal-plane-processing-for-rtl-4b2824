// tb_image_readout: random pixels and memories; for every row/column
// selection checks the pixel value and the two current edge bits, and checks
// zero output with no selection.
module tb_image_readout;
  import mv_pkg::*;
  localparam int unsigned N = 16, PIX_W = 8;
  logic [N-1:0][N-1:0][PIX_W-1:0] pix;
  edge_mem_t [N-1:0][N-1:0] mem;
  logic [N-1:0] row_sel, col_sel;
  logic [PIX_W-1:0] pix_out;
  logic edge_h, edge_v;
  int checks = 0, failures = 0;

  image_readout #(.N(N), .PIX_W(PIX_W)) dut (.*);

  initial begin
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        pix[r][c] = PIX_W'($urandom);
        mem[r][c] = 4'($urandom);
      end
    row_sel = 0; col_sel = 0; #1;
    checks++; if (pix_out !== 0 || edge_h || edge_v) failures++;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        row_sel = N'(1) << r; col_sel = N'(1) << c; #1;
        checks++;
        if (pix_out !== pix[r][c] || edge_h !== mem[r][c][3] || edge_v !== mem[r][c][2]) begin
          failures++;
          $display("FAIL (%0d,%0d)", r, c);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
