// tb_tmed_edge_detector: random and corner-case check of the time-multiplexed
// edge detector against edge = has_neighbour && |a - b| >= thr, for both
// time slots (horizontal with the right neighbour, vertical with the one
// below).  Combinational; a watchdog ends the run if it ever stalls.
module tb_tmed_edge_detector;
  localparam int unsigned PIX_W = 8;
  logic [PIX_W-1:0] f_ij, f_right, f_below, thr;
  logic has_right, has_below, sel_v, edge_o;
  int checks = 0, failures = 0;

  tmed_edge_detector #(.PIX_W(PIX_W)) dut (.*);

  task automatic check_one();
    int a, b, d;
    logic exp;
    a = int'(f_ij);
    b = sel_v ? int'(f_below) : int'(f_right);
    d = (a > b) ? a - b : b - a;
    exp = (sel_v ? has_below : has_right) && (d >= int'(thr));
    #1;
    checks++;
    if (edge_o !== exp) begin
      failures++;
      $display("FAIL f=%0d other=%0d thr=%0d sel_v=%0b got %0b exp %0b", a, b, thr, sel_v, edge_o, exp);
    end
  endtask

  initial begin
    // exact threshold boundary, both directions of the difference
    f_ij = 100; f_right = 90; f_below = 110; has_right = 1; has_below = 1;
    thr = 10; sel_v = 0; check_one();
    thr = 11; sel_v = 0; check_one();
    thr = 10; sel_v = 1; check_one();
    has_right = 0; thr = 0; sel_v = 0; check_one();
    has_below = 0; sel_v = 1; check_one();
    f_ij = 255; f_right = 0; f_below = 0; has_right = 1; has_below = 1; thr = 255;
    sel_v = 0; check_one(); sel_v = 1; check_one();
    repeat (4000) begin
      f_ij = PIX_W'($urandom); f_right = PIX_W'($urandom); f_below = PIX_W'($urandom);
      thr = PIX_W'($urandom_range(0, 128));
      has_right = 1'($urandom_range(0, 7) != 0); has_below = 1'($urandom_range(0, 7) != 0);
      sel_v = 1'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
