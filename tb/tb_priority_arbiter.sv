// tb_priority_arbiter: checks all 511 non-empty tie patterns against a model
// that ranks candidates by squared distance of their 3x3 grid position from
// the centre and then by vector order index, and checks the named cases:
// Y4 is index 0, Y1 1, Y3 2, Y7 4, Y0 5, and the tie {Y2, Y4, Y8} of the
// worked example resolves to Y4.
module tb_priority_arbiter;
  import mv_pkg::*;
  logic [NCAND-1:0] hit, y;
  logic [3:0] index;
  int checks = 0, failures = 0;
  // vector order index of Y0..Y8, written out independently of the package
  int order[9] = '{5, 1, 6, 2, 0, 3, 7, 4, 8};

  priority_arbiter dut (.*);

  initial begin
    for (int h = 1; h < 512; h++) begin
      int best, bd, bi;
      hit = 9'(h); #1;
      best = -1; bd = 99; bi = 99;
      for (int k = 0; k < 9; k++) begin
        if (hit[k]) begin
          int dd;
          dd = (k / 3 - 1) * (k / 3 - 1) + (k % 3 - 1) * (k % 3 - 1);
          if (dd < bd || (dd == bd && order[k] < bi)) begin
            best = k; bd = dd; bi = order[k];
          end
        end
      end
      checks++;
      if (y !== (9'b1 << best) || index !== 4'(bi)) begin
        failures++;
        $display("FAIL hit=%b y=%b idx=%0d exp Y%0d idx %0d", hit, y, index, best, bi);
      end
    end
    hit = 9'b1_0001_0100; #1; checks++; if (y !== 9'b0_0001_0000 || index !== 0) failures++;
    hit = 9'b0_0000_0010; #1; checks++; if (index !== 1) failures++;
    hit = 9'b0_0000_1000; #1; checks++; if (index !== 2) failures++;
    hit = 9'b0_1000_0000; #1; checks++; if (index !== 4) failures++;
    hit = 9'b0_0000_0001; #1; checks++; if (index !== 5) failures++;
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
