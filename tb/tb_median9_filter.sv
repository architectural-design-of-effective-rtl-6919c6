// tb_median9_filter: one 3x3 median filter module. Streams windows as the MUX unit
// would, pulses med_load, and checks the stored median against a full sort in the
// testbench; then checks that seu_mask inverts exactly the masked bits.
module tb_median9_filter;
  import median_pkg::*;
  logic clk = 0, rst_n = 1, en = 0, med_load = 0;
  logic [SEL_W-1:0] sel = 0;
  pixel_t p = 0, q = 0, seu = 0, median;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;             // falling edge applies the asynchronous reset

  median9_filter dut (.clk(clk), .rst_n(rst_n), .en(en), .sel(sel), .p(p), .q(q),
                      .med_load(med_load), .seu_mask(seu), .median(median));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic pixel_t ref_median(input pixel_t v[9]);
    pixel_t s[9]; pixel_t t;
    s = v;
    for (int i = 0; i < 9; i++)
      for (int j = 0; j < 8 - i; j++)
        if (s[j] > s[j+1]) begin t = s[j]; s[j] = s[j+1]; s[j+1] = t; end
    return s[4];
  endfunction

  task automatic run(input pixel_t z[9], input pixel_t mask);
    pixel_t prev;
    for (int s = 0; s < 9; s++) begin
      @(negedge clk);
      en = 1; sel = 4'(s);
      p = (s % 3 == 2) ? 8'hFF : z[s];
      q = (s % 3 == 2) ? z[s] : 8'h00;
    end
    @(negedge clk);
    en = 0; sel = 0; p = 0; q = 0;
    prev = median;
    repeat (LATCH_STAGES) @(negedge clk);      // last row reaches the storing unit
    check(median == prev, "median register holds until med_load");
    med_load = 1; seu = mask;
    @(negedge clk);
    med_load = 0; seu = 0;
    check(median == (ref_median(z) ^ mask), $sformatf("median %0d exp %0d", median, ref_median(z) ^ mask));
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
    z = '{8'd222, 8'd25, 8'd97, 8'd37, 8'd183, 8'd66, 8'd101, 8'd55, 8'd138};
    run(z, 8'h00);
    check(median == 8'd97, "example window median 97");
    for (int n = 0; n < 300; n++) begin
      for (int k = 0; k < 9; k++) z[k] = 8'($urandom);
      run(z, (n % 10 == 9) ? 8'(1 << ($urandom % 8)) : 8'h00);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
