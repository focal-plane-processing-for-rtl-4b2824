// tb_shift_register: loads the token into the 32-stage register, shifts it
// through all stages with random pauses, and checks after every clock that
// exactly the expected stage is set, that it appears on the even or odd
// output of the right row, and that 'last' marks stage 31.  Then checks the
// register empties after the last stage and that a load restarts it.
module tb_shift_register;
  localparam int unsigned STAGES = 32;
  logic clk = 0, rst_n, load, shift, last;
  logic [STAGES-1:0] q;
  logic [STAGES/2-1:0] even, odd;
  int checks = 0, failures = 0, pos;

  shift_register #(.STAGES(STAGES)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(int p);
    logic [STAGES-1:0] eq;
    logic [STAGES/2-1:0] ee, eo;
    eq = (p >= 0 && p < STAGES) ? (STAGES'(1) << p) : '0;
    ee = '0; eo = '0;
    if (p >= 0 && p < STAGES) begin
      if (p % 2 == 0) ee[p/2] = 1'b1; else eo[p/2] = 1'b1;
    end
    checks++;
    if (q !== eq || even !== ee || odd !== eo || last !== (p == STAGES - 1)) begin
      failures++;
      $display("FAIL pos %0d q=%h even=%h odd=%h last=%b", p, q, even, odd, last);
    end
  endtask

  initial begin
    rst_n = 0; load = 0; shift = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); check(-1);
    load = 1; @(negedge clk); load = 0;
    pos = 0; check(pos);
    while (pos < STAGES) begin
      shift = 1'($urandom);
      @(negedge clk);
      if (shift) pos++;
      check(pos);
    end
    shift = 0;
    load = 1; shift = 1; @(negedge clk); load = 0; shift = 0;
    check(0);
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
