// tb_tg_memory_cell: drives random swap / t1 write / t2 write sequences into
// one 4-bit pixel memory and compares all four bits with a reference model
// after every clock.
module tb_tg_memory_cell;
  import mv_pkg::*;
  logic clk = 0, rst_n, swap, wr_h, wr_v, edge_in;
  edge_mem_t mem;
  logic [3:0] model;
  int checks = 0, failures = 0, cycles = 0;

  tg_memory_cell dut (.*);
  always #5 clk = ~clk;

  initial begin
    rst_n = 0; swap = 0; wr_h = 0; wr_v = 0; edge_in = 0;
    @(posedge clk); @(posedge clk);
    rst_n = 1;
    model = '0;
    // directed frame: h=1, v=0, swap -> prev {1,0}; then h=0, v=1
    repeat (2000) begin
      @(negedge clk);
      swap = 1'($urandom_range(0, 3) == 0);
      wr_h = 1'($urandom); wr_v = 1'($urandom); edge_in = 1'($urandom);
      @(posedge clk);
      if (swap) begin
        model[1] = model[3];
        model[0] = model[2];
      end else begin
        if (wr_h) model[3] = edge_in;
        if (wr_v) model[2] = edge_in;
      end
      #1;
      checks++;
      if (mem !== model) begin
        failures++;
        $display("FAIL mem=%b exp=%b", mem, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
