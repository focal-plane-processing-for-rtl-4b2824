// tb_shifting_window: for random row lines and each of the three window
// positions j, checks that processor k gets previous-frame columns
// 4j+k .. 4j+k+3 and current-frame columns 4j+k+1, 4j+k+2 (the rule
// Window(j) = P[i + 4(j-1)], i = 1..7, in 0-based form).
module tb_shifting_window;
  localparam int unsigned N = 16, N_PROC = 4, N_WIN = 3;
  logic [1:0] win;
  logic [1:0][N-1:0] cur_rows;
  logic [3:0][N-1:0] pre_rows;
  logic [N_PROC-1:0][3:0] cur_blk;
  logic [N_PROC-1:0][15:0] pre_blk;
  int checks = 0, failures = 0;

  shifting_window #(.N(N), .N_PROC(N_PROC), .N_WIN(N_WIN)) dut (.*);

  initial begin
    repeat (50) begin
      cur_rows = {2{16'($urandom)}} ^ 32'($urandom);
      pre_rows = {2{32'($urandom)}};
      for (int w = 0; w < N_WIN; w++) begin
        int lo, hi;
        win = 2'(w); #1;
        lo = N; hi = -1;
        for (int p = 0; p < N_PROC; p++) begin
          for (int a = 0; a < 4; a++)
            for (int b = 0; b < 4; b++) begin
              checks++;
              if (4*w + p + b < lo) lo = 4*w + p + b;
              if (4*w + p + b > hi) hi = 4*w + p + b;
              if (pre_blk[p][4*a+b] !== pre_rows[a][4*w+p+b]) failures++;
            end
          for (int a = 0; a < 2; a++)
            for (int b = 0; b < 2; b++) begin
              checks++;
              if (cur_blk[p][2*a+b] !== cur_rows[a][4*w+p+b+1]) failures++;
            end
        end
        // the window spans the seven columns 4j .. 4j+6
        checks++;
        if (lo != 4*w || hi != 4*w + 6) failures++;
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
