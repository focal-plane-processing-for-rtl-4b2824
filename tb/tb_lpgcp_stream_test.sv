// tb_lpgcp_stream_test: the processor-chip test with a fixed current block.
//
// Each of the 16 previous-frame lines Pre_1st..4th_h1..h4 carries an 8-bit
// stream whose odd positions (1st, 3rd, 5th, 7th bit) are horizontal edges
// and whose even positions are vertical edges, so one stream holds four
// successive block matchings; e.g. {10010010} gives horizontal {1001} and
// vertical {0100}.  The current block is held constant:
// Cur_2nd_h1 = 1, Cur_1st_h1 = 0, Cur_2nd_h2 = 0, Cur_1st_h2 = 1, for both
// edge directions.  Random streams are applied, each matching is run with
// the processor's 12-clock control sequence, and the chosen Y line and index
// are compared with a direct computation.  The number of distinct vectors
// seen is reported; at least three must occur.
module tb_lpgcp_stream_test;
  import mv_pkg::*;
  logic clk = 0, rst_n;
  acc_ctrl_t ctrl;
  logic [3:0] cur;
  logic [15:0] pre;
  logic [NCAND-1:0] y;
  logic [3:0] index;
  logic [NCAND-1:0][ACC_BITS-1:0] acc_out;
  int checks = 0, failures = 0;
  int order[9] = '{5, 1, 6, 2, 0, 3, 7, 4, 8};
  int seen[9];
  logic [7:0] stream[16];
  // cur bit order {row1 col1, row1 col0, row0 col1, row0 col0}:
  // Cur_2nd_h2 = 0, Cur_2nd_h1 = 1, Cur_1st_h2 = 1, Cur_1st_h1 = 0
  localparam logic [3:0] CUR_FIXED = 4'b0110;

  lpgcp_processor dut (.*);
  always #5 clk = ~clk;

  // bit at 1-based position pos of an 8-bit stream written MSB first
  function automatic logic sbit(logic [7:0] s, int pos);
    return s[8 - pos];
  endfunction

  task automatic match(int frame);
    logic [15:0] ph, pv;
    int d[9], m, best;
    for (int l = 0; l < 16; l++) begin
      ph[l] = sbit(stream[l], 2 * frame + 1);
      pv[l] = sbit(stream[l], 2 * frame + 2);
    end
    m = 99; best = -1;
    for (int k = 0; k < 9; k++) begin
      d[k] = 0;
      for (int a = 0; a < 2; a++)
        for (int b = 0; b < 2; b++)
          d[k] += int'(CUR_FIXED[2*a+b] ^ ph[4*(k/3+a)+k%3+b])
                + int'(CUR_FIXED[2*a+b] ^ pv[4*(k/3+a)+k%3+b]);
      if (d[k] < m) m = d[k];
    end
    for (int k = 0; k < 9; k++)
      if (d[k] == m && (best < 0 || order[k] < order[best])) best = k;
    @(negedge clk); ctrl = '0; ctrl.dset0 = 1;
    @(negedge clk); ctrl = '0; cur = CUR_FIXED; pre = ph;
    for (int i = 0; i < 4; i++) begin ctrl.xor_ck = 4'b1 << i; @(negedge clk); end
    ctrl = '0; @(negedge clk);
    ctrl.phase_v = 1; pre = pv;
    for (int i = 0; i < 4; i++) begin ctrl.xor_ck = 4'b1 << i; @(negedge clk); end
    ctrl = '0; ctrl.acc_ck = 1; @(negedge clk);
    ctrl = '0; ctrl.syn = 1; @(negedge clk);
    ctrl = '0;
    checks++;
    if (y !== (9'b1 << best) || index !== 4'(order[best])) begin
      failures++;
      $display("FAIL frame %0d: Y=%b idx %0d, expected Y%0d idx %0d", frame, y, index, best, order[best]);
    end
    seen[best]++;
  endtask

  initial begin
    int distinct;
    rst_n = 0; ctrl = '0; cur = '0; pre = '0;
    seen = '{default: 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    // the stream decoding of the example
    checks++;
    if ({sbit(8'b10010010, 1), sbit(8'b10010010, 3), sbit(8'b10010010, 5), sbit(8'b10010010, 7)} != 4'b1001 ||
        {sbit(8'b10010010, 2), sbit(8'b10010010, 4), sbit(8'b10010010, 6), sbit(8'b10010010, 8)} != 4'b0100)
      failures++;
    repeat (60) begin
      for (int l = 0; l < 16; l++) stream[l] = 8'($urandom);
      for (int f = 0; f < 4; f++) match(f);
    end
    distinct = 0;
    for (int k = 0; k < 9; k++) if (seen[k] > 0) distinct++;
    $display("vectors seen per Y0..Y8: %0d %0d %0d %0d %0d %0d %0d %0d %0d", seen[0], seen[1], seen[2],
             seen[3], seen[4], seen[5], seen[6], seen[7], seen[8]);
    checks++; if (distinct < 3) failures++;
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
