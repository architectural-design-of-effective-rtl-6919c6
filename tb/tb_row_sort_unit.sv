// tb_row_sort_unit: streams windows through the row sorter exactly as the MUX unit
// presents them (p = {Z0,Z1,FF,...}, q = {00,00,Z2,...}, select 0..8) and checks
// that a0..a8 hold the rows sorted (a0,a3,a6 maxima; a2,a5,a8 minima)
// LATCH_STAGES + 1 edges after select 8 - and not one edge earlier - against a
// sort done in the testbench.
module tb_row_sort_unit;
  import median_pkg::*;
  logic clk = 0, rst_n = 1, en = 0;
  logic [SEL_W-1:0] sel = 0;
  pixel_t p = 0, q = 0;
  pixel_t [NPIX-1:0] a;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;             // falling edge applies the asynchronous reset

  row_sort_unit dut (.clk(clk), .rst_n(rst_n), .en(en), .sel(sel), .p(p), .q(q), .a(a));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic void sort_row(input pixel_t z[9], input int row, output pixel_t r[3]);
    pixel_t t;
    r[0] = z[3*row]; r[1] = z[3*row+1]; r[2] = z[3*row+2];
    for (int i = 0; i < 2; i++) for (int j = 0; j < 2 - i; j++)
      if (r[j] < r[j+1]) begin t = r[j]; r[j] = r[j+1]; r[j+1] = t; end
  endfunction

  task automatic stream(input pixel_t z[9]);
    pixel_t r[3];
    for (int s = 0; s < 9; s++) begin
      @(negedge clk);
      en = 1; sel = 4'(s);
      p = (s % 3 == 2) ? 8'hFF : z[s];
      q = (s % 3 == 2) ? z[s] : 8'h00;
    end
    @(negedge clk);
    en = 0; sel = 0; p = 8'($urandom); q = 8'($urandom);
    // the last row needs LATCH_STAGES more edges through the pipeline ranks;
    // one edge before it lands, rows 0 and 1 sit one position back in the chains
    repeat (LATCH_STAGES - 1) @(negedge clk);
    for (int row = 0; row < 2; row++) begin
      sort_row(z, row, r);
      for (int k = 0; k < 3; k++)
        check(a[3*(row+1)+k] == r[k], $sformatf("before completion: row %0d in chain slot %0d", row, 3*(row+1)+k));
    end
    @(negedge clk);
    for (int row = 0; row < 3; row++) begin
      sort_row(z, row, r);
      for (int k = 0; k < 3; k++)
        check(a[3*row+k] == r[k], $sformatf("row %0d a%0d = %0d exp %0d", row, 3*row+k, a[3*row+k], r[k]));
    end
    // results hold while disabled
    repeat (3) @(negedge clk);
    sort_row(z, 0, r);
    check(a[0] == r[0] && a[1] == r[1] && a[2] == r[2], "row 0 held");
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pixel_t z[9];
    repeat (2) @(posedge clk);
    rst_n = 1;
    z = '{8'd197, 8'd2, 8'd71, 8'd28, 8'd121, 8'd39, 8'd109, 8'd37, 8'd111};
    stream(z);
    for (int n = 0; n < 300; n++) begin
      for (int k = 0; k < 9; k++) z[k] = (n % 5 == 0) ? 8'($urandom % 3) : 8'($urandom);
      stream(z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
