// tb_acc: drives the accumulator through its control sequence (D-set0,
// DIF-XOR-ck1..4 in the even phase, DIF-XOR-ck1..4 in the odd phase,
// ACC-ck) with random edge pairs and checks the 8-bit register holds as many
// ones, packed at the MSB end, as there were differing pairs.  Includes the
// four-mismatch case whose result is 8'b1111_0000, the all-equal case and
// the all-different case, and checks the result appears one clock after
// ACC-ck and is cleared by D-set0.
module tb_acc;
  import mv_pkg::*;
  logic clk = 0, rst_n, dset0, phase_v, acc_ck;
  logic [3:0] xor_ck, c, p;
  logic [7:0] a;
  int checks = 0, failures = 0;

  acc dut (.*);
  always #5 clk = ~clk;

  task automatic run(input logic [3:0] ch, pv_h, cv, pv_v);
    int n;
    logic [7:0] exp;
    n = $countones(ch ^ pv_h) + $countones(cv ^ pv_v);
    exp = '0;
    for (int b = 0; b < n; b++) exp[7-b] = 1'b1;
    @(negedge clk); dset0 = 1; @(negedge clk); dset0 = 0;
    checks++; if (a !== 8'h00) failures++;
    phase_v = 0; c = ch; p = pv_h;
    for (int i = 0; i < 4; i++) begin xor_ck = 4'b1 << i; @(negedge clk); end
    xor_ck = 0; c = 4'($urandom); p = 4'($urandom); @(negedge clk); // idle, lines change
    phase_v = 1; c = cv; p = pv_v;
    for (int i = 0; i < 4; i++) begin xor_ck = 4'b1 << i; @(negedge clk); end
    xor_ck = 0; c = 4'($urandom); p = 4'($urandom);
    checks++; if (a !== 8'h00) failures++;    // not yet converted
    acc_ck = 1; @(negedge clk); acc_ck = 0;
    checks++;
    if (a !== exp) begin
      failures++;
      $display("FAIL n=%0d a=%b exp=%b", n, a, exp);
    end
  endtask

  initial begin
    rst_n = 0; dset0 = 0; phase_v = 0; acc_ck = 0; xor_ck = 0; c = 0; p = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(4'b1001, 4'b0110, 4'b0000, 4'b0000);   // 4 mismatches -> 1111_0000
    checks++; if (a !== 8'b1111_0000) failures++;
    run(4'b1010, 4'b1010, 4'b0101, 4'b0101);   // 0
    run(4'b1111, 4'b0000, 4'b0000, 4'b1111);   // 8
    repeat (300) run(4'($urandom), 4'($urandom), 4'($urandom), 4'($urandom));
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
