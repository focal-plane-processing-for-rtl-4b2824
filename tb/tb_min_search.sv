// tb_min_search: feeds nine thermometer codes and checks the minimum code
// and the set of candidates equal to it against an integer model.  Starts
// with the block matching result printed for a worked example,
// {5,6,2 / 3,2,6 / 4,4,2}, whose minimum 2 is held by Y2, Y4 and Y8.
module tb_min_search;
  import mv_pkg::*;
  logic [NCAND-1:0][ACC_BITS-1:0] a;
  logic [ACC_BITS-1:0] min_code;
  logic [NCAND-1:0] hit;
  int checks = 0, failures = 0;
  int d[9];

  min_search dut (.*);

  task automatic apply_check();
    int m;
    logic [NCAND-1:0] eh;
    m = 99;
    for (int k = 0; k < 9; k++) begin
      a[k] = '0;
      for (int b = 0; b < d[k]; b++) a[k][7-b] = 1'b1;
      if (d[k] < m) m = d[k];
    end
    for (int k = 0; k < 9; k++) eh[k] = (d[k] == m);
    #1;
    checks++;
    if ($countones(min_code) != m || hit !== eh) begin
      failures++;
      $display("FAIL min=%b hit=%b exp min %0d hit %b", min_code, hit, m, eh);
    end
  endtask

  initial begin
    d = '{5, 6, 2, 3, 2, 6, 4, 4, 2};
    apply_check();
    checks++; if (hit !== 9'b1_0001_0100) failures++;
    repeat (3000) begin
      for (int k = 0; k < 9; k++) d[k] = $urandom_range(0, 8);
      apply_check();
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
