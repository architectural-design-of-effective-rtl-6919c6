// tb_median9_network: feeds three independently sorted rows (maximum first) to
// the comparator network and compares its output with the median found by a
// full sort in the testbench. Random rows plus rows with many equal values.
module tb_median9_network;
  import median_pkg::*;
  pixel_t [NPIX-1:0] a;
  pixel_t median;
  median9_network dut (.a(a), .median(median));

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

  initial begin
    pixel_t v[9]; pixel_t r[3]; pixel_t t;
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < 9; k++) v[k] = (n % 4 == 0) ? 8'($urandom % 4) : 8'($urandom);
      for (int row = 0; row < 3; row++) begin
        r[0] = v[3*row]; r[1] = v[3*row+1]; r[2] = v[3*row+2];
        for (int i = 0; i < 2; i++) for (int j = 0; j < 2 - i; j++)
          if (r[j] < r[j+1]) begin t = r[j]; r[j] = r[j+1]; r[j+1] = t; end
        a[3*row] = r[0]; a[3*row+1] = r[1]; a[3*row+2] = r[2];
      end
      #1 check(median == ref_median(v), $sformatf("median %0d exp %0d", median, ref_median(v)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
