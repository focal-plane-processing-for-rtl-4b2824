// tb_memory_tree: fills the 16 x 16 memories with random bits and, for every
// row r and both phases of the vertical register, checks that the row lines
// carry previous-frame rows r..r+3 and current-frame rows r+1..r+2 of the
// horizontal bits (even phase) or vertical bits (odd phase), with 0 beyond
// the array; also checks that nothing is driven with no row selected.
module tb_memory_tree;
  import mv_pkg::*;
  localparam int unsigned N = 16;
  edge_mem_t [N-1:0][N-1:0] mem;
  logic [N-1:0] vsr_even, vsr_odd;
  logic [1:0][N-1:0] cur_rows;
  logic [3:0][N-1:0] pre_rows;
  logic phase_v;
  int checks = 0, failures = 0;

  memory_tree #(.N(N)) dut (.*);

  initial begin
    for (int trial = 0; trial < 4; trial++) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) mem[r][c] = 4'($urandom);
      vsr_even = '0; vsr_odd = '0; #1;
      checks++;
      if (cur_rows !== '0 || pre_rows !== '0 || phase_v !== 1'b0) failures++;
      for (int r = 0; r < N; r++) begin
        for (int ph = 0; ph < 2; ph++) begin
          vsr_even = '0; vsr_odd = '0;
          if (ph == 0) vsr_even[r] = 1'b1; else vsr_odd[r] = 1'b1;
          #1;
          checks++;
          if (phase_v !== 1'(ph)) failures++;
          for (int c = 0; c < N; c++) begin
            for (int k = 0; k < 4; k++) begin
              logic e;
              e = (r + k < N) ? ((ph == 0) ? mem[r+k][c][1] : mem[r+k][c][0]) : 1'b0;
              checks++;
              if (pre_rows[k][c] !== e) begin
                failures++;
                $display("FAIL pre r=%0d ph=%0d k=%0d c=%0d", r, ph, k, c);
              end
            end
            for (int k = 0; k < 2; k++) begin
              logic e;
              e = (r + k + 1 < N) ? ((ph == 0) ? mem[r+k+1][c][3] : mem[r+k+1][c][2]) : 1'b0;
              checks++;
              if (cur_rows[k][c] !== e) begin
                failures++;
                $display("FAIL cur r=%0d ph=%0d k=%0d c=%0d", r, ph, k, c);
              end
            end
          end
        end
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
