// tb_control_unit: checks the enable schedule of one block: nine cycles of E1/E2
// with select 0..8, med_load LATCH_STAGES cycles into the sorting phase, dmr_load
// one cycle later, E3 after SORT_EDGES sorting cycles, then E4 with done: 19 busy
// cycles in all.
// Also checks that start is ignored while busy.
module tb_control_unit;
  import median_pkg::*;
  logic clk = 0, rst_n = 1, start = 0;
  logic busy, e1, e2, med_load, dmr_load, e3, e4, done;
  logic [SEL_W-1:0] sel;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;             // falling edge applies the asynchronous reset

  control_unit dut (.clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .sel(sel),
                    .e1(e1), .e2(e2), .med_load(med_load), .dmr_load(dmr_load),
                    .e3(e3), .e4(e4), .done(done));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 5; blk++) begin
      @(negedge clk);
      check(!busy && !e1 && !e2 && !e3 && !e4 && !med_load && !dmr_load, "idle outputs");
      repeat (blk) @(negedge clk);     // idle gaps of different length
      start = 1;
      @(negedge clk);
      start = (blk % 2 == 1);          // odd blocks: keep start high while busy
      for (int c = 0; c < 19; c++) begin
        check(busy, $sformatf("busy in cycle %0d", c));
        check(e1 == (c < 9) && e2 == (c < 9), $sformatf("E1/E2 in cycle %0d", c));
        if (c < 9) check(sel == 4'(c), $sformatf("sel %0d in cycle %0d", sel, c));
        check(med_load == (c == 9 + LATCH_STAGES), $sformatf("med_load in cycle %0d", c));
        check(dmr_load == (c == 10 + LATCH_STAGES), $sformatf("dmr_load in cycle %0d", c));
        check(e3 == (c == 17), $sformatf("E3 in cycle %0d", c));
        check(e4 == (c == 18) && done == (c == 18), $sformatf("E4/done in cycle %0d", c));
        @(negedge clk);
      end
      start = 0;
      if (blk % 2 == 1) begin
        // start was held: one idle cycle, then the next block begins
        check(!busy, "idle cycle after done");
        start = 1;
        @(negedge clk);
        start = 0;
        check(busy && e1 && sel == 0, "restart when start held");
        repeat (19) @(negedge clk);
      end
      check(!busy, "idle after 19 cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
