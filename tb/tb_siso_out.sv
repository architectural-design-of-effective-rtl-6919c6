// tb_siso_out: checks the SISO(n) / SISO(n)a ranks: SISO(n) loads on E3 only,
// SISO(n)a copies SISO(n) on E4 only, the 36 outputs replicate each median over its
// quadrant, and a repeated median gives no gated clock pulse.
module tb_siso_out;
  import median_pkg::*;
  logic clk = 0, rst_n = 1, e3 = 0, e4 = 0;
  pixel_t [LANES-1:0] med_in = '0, siso_n, siso_na;
  pixel_t [SIDE-1:0][SIDE-1:0] pix_out;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;             // falling edge applies the asynchronous reset

  siso_out dut (.clk(clk), .rst_n(rst_n), .e3(e3), .e4(e4), .med_in(med_in),
                .siso_n(siso_n), .siso_na(siso_na), .pix_out(pix_out));

  int checks = 0, failures = 0;
  int pulses = 0;
  always @(posedge dut.g_lane[0].u_siso_n.gclk[0]) pulses++;
  always @(posedge dut.g_lane[0].u_siso_n.gclk[1]) pulses++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  pixel_t [LANES-1:0] mn = '0, mna = '0;
  task automatic step(input logic le3, input logic le4, input pixel_t [LANES-1:0] m);
    @(negedge clk);
    e3 = le3; e4 = le4; med_in = m;
    if (le4) mna = mn;
    if (le3) mn = m;
    @(negedge clk);
    e3 = 0; e4 = 0;
    check(siso_n == mn, "SISO(n) contents");
    check(siso_na == mna, "SISO(n)a contents");
    for (int r = 0; r < SIDE; r++)
      for (int c = 0; c < SIDE; c++)
        check(pix_out[r][c] == mna[(r/3)*2 + c/3], "quadrant replication");
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pixel_t [LANES-1:0] m;
    int p0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m = {8'd70, 8'd73, 8'd97, 8'd71};
    step(1, 0, m);
    step(0, 1, m);
    check(siso_na[0] == 71 && siso_na[1] == 97 && siso_na[2] == 73 && siso_na[3] == 70, "example 71 97 73 70");
    p0 = pulses;
    step(1, 0, m);                                  // same medians again
    check(pulses == p0, "repeated median: SISO(n) clock gated");
    for (int n = 0; n < 300; n++) begin
      for (int l = 0; l < LANES; l++) m[l] = 8'($urandom);
      step(($urandom % 2) == 1, ($urandom % 2) == 1, m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
