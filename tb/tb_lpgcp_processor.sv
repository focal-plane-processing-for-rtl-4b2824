// tb_lpgcp_processor: one block matching processor with random 2x2 current
// and 4x4 previous edge blocks (horizontal and vertical).  For each search
// position the testbench drives the control sequence of one row step (D-set0,
// 4 even-phase samples, 4 odd-phase samples, ACC-ck, Syn-Yi-reg) and checks
// the nine accumulator codes and the chosen vector against a model that
// computes the Hamming distances directly and breaks ties by distance from
// the centre.  It also checks that Y changes only on Syn-Yi-reg, 11 clocks
// after D-set0, and counts how often a tie had to be arbitrated.
module tb_lpgcp_processor;
  import mv_pkg::*;
  logic clk = 0, rst_n;
  acc_ctrl_t ctrl;
  logic [3:0] cur;
  logic [15:0] pre;
  logic [NCAND-1:0] y;
  logic [3:0] index;
  logic [NCAND-1:0][ACC_BITS-1:0] acc_out;
  int checks = 0, failures = 0, ties = 0, moved = 0;
  int order[9] = '{5, 1, 6, 2, 0, 3, 7, 4, 8};

  lpgcp_processor dut (.*);
  always #5 clk = ~clk;

  task automatic step(input logic [3:0] ch, input logic [15:0] ph,
                      input logic [3:0] cv, input logic [15:0] pv);
    int d[9], m, best, nmin, cyc;
    logic [NCAND-1:0] y_before;
    m = 99;
    for (int k = 0; k < 9; k++) begin
      int dy, dx;
      dy = k / 3; dx = k % 3; d[k] = 0;
      for (int a = 0; a < 2; a++)
        for (int b = 0; b < 2; b++) begin
          d[k] += int'(ch[2*a+b] ^ ph[4*(dy+a)+dx+b]);
          d[k] += int'(cv[2*a+b] ^ pv[4*(dy+a)+dx+b]);
        end
      if (d[k] < m) m = d[k];
    end
    best = -1; nmin = 0;
    for (int k = 0; k < 9; k++)
      if (d[k] == m) begin
        nmin++;
        if (best < 0 || order[k] < order[best]) best = k;
      end
    if (nmin > 1) ties++;
    if (best != 4) moved++;
    y_before = y;
    cyc = 0;
    @(negedge clk); ctrl = '0; ctrl.dset0 = 1; cyc++;
    @(negedge clk); ctrl = '0;
    cur = ch; pre = ph;
    for (int i = 0; i < 4; i++) begin ctrl.xor_ck = 4'b1 << i; @(negedge clk); cyc++; end
    ctrl = '0; cur = 4'($urandom); pre = 16'($urandom); @(negedge clk); cyc++;
    ctrl.phase_v = 1; cur = cv; pre = pv;
    for (int i = 0; i < 4; i++) begin ctrl.xor_ck = 4'b1 << i; @(negedge clk); cyc++; end
    ctrl = '0; ctrl.acc_ck = 1; @(negedge clk); cyc++;
    ctrl = '0;
    checks++;
    if (y !== y_before) begin failures++; $display("FAIL y changed before Syn-Yi-reg"); end
    for (int k = 0; k < 9; k++) begin
      checks++;
      if ($countones(acc_out[k]) != d[k] || acc_out[k] !== therm(d[k])) begin
        failures++;
        $display("FAIL acc Y%0d=%b exp %0d", k, acc_out[k], d[k]);
      end
    end
    ctrl.syn = 1; @(negedge clk); cyc++;
    ctrl = '0;
    checks++;
    if (y !== (9'b1 << best) || index !== 4'(order[best]) || cyc != 12) begin
      failures++;
      $display("FAIL y=%b idx=%0d exp Y%0d idx %0d cyc %0d", y, index, best, order[best], cyc);
    end
  endtask

  initial begin
    rst_n = 0; ctrl = '0; cur = 0; pre = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // identical frames: the centre candidate must win (index 0)
    step(4'b0110, 16'b0000_0110_0000_0000, 4'b0110, 16'b0000_0110_0000_0000);
    // block shifted one up-left in the previous frame: Y0
    step(4'b1001, 16'b0000_0000_0010_0001, 4'b0000, 16'h0000);
    repeat (400) step(4'($urandom), 16'($urandom), 4'($urandom), 16'($urandom));
    $display("ties arbitrated: %0d, off-centre vectors: %0d", ties, moved);
    checks++; if (ties == 0 || moved == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
