// tb_mv_sequencer: counts the controls the sequencer issues.  A frame with
// all three windows must take 474 clocks from start to idle and issue, in
// order, one swap, one t1 and one t2 write, then per window one register
// load and 13 row steps of 12 clocks each with D-set0, 4 even-phase and 4
// odd-phase samples, one ACC-ck and one Syn-Yi-reg.  A frame with only the
// middle window enabled must take 3 + 157 clocks and report window 1.  An
// image read-out must give 256 samples in raster order in 16*18+1 clocks.
module tb_mv_sequencer;
  import mv_pkg::*;
  localparam int unsigned N = 16, N_WIN = 3;
  logic clk = 0, rst_n, start_mv, start_img;
  logic [N_WIN-1:0] win_en;
  logic swap, wr_h, wr_v, vsr_load, vsr_shift, hsr_load, hsr_shift, img_en, busy;
  acc_ctrl_t ctrl;
  logic [1:0] win;
  logic [3:0] row, col;
  int checks = 0, failures = 0;
  int n_swap, n_wh, n_wv, n_load, n_dset, n_xh, n_xv, n_acc, n_syn, n_vshift, cycles;
  int n_img, exp_r, exp_c, last_syn, gap_bad;
  int win_seen[3];

  mv_sequencer #(.N(N), .N_WIN(N_WIN)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic run_mv(input logic [2:0] en);
    n_swap = 0; n_wh = 0; n_wv = 0; n_load = 0; n_dset = 0; n_xh = 0; n_xv = 0;
    n_acc = 0; n_syn = 0; n_vshift = 0; cycles = 0; gap_bad = 0; last_syn = -1;
    win_seen = '{0, 0, 0};
    @(negedge clk); win_en = en; start_mv = 1;
    @(negedge clk); start_mv = 0;
    while (busy) begin
      cycles++;
      n_swap += int'(swap); n_wh += int'(wr_h); n_wv += int'(wr_v);
      n_load += int'(vsr_load); n_dset += int'(ctrl.dset0);
      if (ctrl.xor_ck != 0) begin
        if (!$onehot(ctrl.xor_ck)) gap_bad++;
        if (ctrl.phase_v) n_xv++; else n_xh++;
      end
      n_acc += int'(ctrl.acc_ck); n_vshift += int'(vsr_shift);
      if (ctrl.syn) begin
        n_syn++;
        win_seen[win]++;
        if (last_syn >= 0 && cycles - last_syn != 12 && cycles - last_syn != 13) gap_bad++;
        last_syn = cycles;
      end
      if (swap && (n_wh != 0)) gap_bad++;
      @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 0; start_mv = 0; start_img = 0; win_en = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_mv(3'b111);
    check("frame cycles", cycles, 3 + 3 * (1 + 13 * 12));
    check("swap", n_swap, 1); check("t1", n_wh, 1); check("t2", n_wv, 1);
    check("vsr loads", n_load, 3); check("D-set0", n_dset, 39);
    check("even samples", n_xh, 39 * 4); check("odd samples", n_xv, 39 * 4);
    check("ACC-ck", n_acc, 39); check("Syn-Yi-reg", n_syn, 39);
    check("vsr shifts", n_vshift, 39 * 2); check("ordering", gap_bad, 0);
    check("win0", win_seen[0], 13); check("win1", win_seen[1], 13); check("win2", win_seen[2], 13);
    run_mv(3'b010);
    check("one-window cycles", cycles, 3 + 1 + 13 * 12);
    check("one-window syn", win_seen[1], 13);
    check("one-window others", win_seen[0] + win_seen[2], 0);
    // image read-out
    n_img = 0; cycles = 0; exp_r = 0; exp_c = 0;
    @(negedge clk); start_img = 1; @(negedge clk); start_img = 0;
    while (busy) begin
      cycles++;
      if (img_en) begin
        checks++;
        if (int'(row) != exp_r || int'(col) != exp_c) failures++;
        n_img++;
        exp_c++;
        if (exp_c == N) begin exp_c = 0; exp_r++; end
      end
      @(negedge clk);
    end
    check("image samples", n_img, N * N);
    check("image cycles", cycles, 1 + N * (N + 2) - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
