// tb_image_workload: runs image data through the complete filter at its default
// parameters.
//  1. The 10x10 image segment used as the worked example: its top-left 6x6 block
//     is filtered and each quadrant median is checked against an independent sort.
//  2. A 12x12 image with a step edge (left half 40, right half 200) and about 10%
//     salt-and-pepper noise (0 / 255), generated here, is filtered as four 6x6
//     blocks sent back to back. Every window median is checked against a sort,
//     and the noise-free result is checked too: each 3x3 quadrant that lies fully
//     on one side of the edge must come out at that side's level, so the edge at
//     column 6 survives in the output.
module tb_image_workload;
  import median_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;             // falling edge applies the asynchronous reset

  logic in_valid = 0, in_ready, out_valid;
  pixel_t [SIDE-1:0][SIDE-1:0] pix_in = '0, pix_out;
  pixel_t [LANES-1:0] medians;
  logic [LANES-1:0] m1, m2;

  median6x6_top dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .pix_in(pix_in), .seu_mask1('0), .seu_mask2('0), .out_valid(out_valid),
    .pix_out(pix_out), .medians(medians), .dmr_match1(m1), .dmr_match2(m2));

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

  // top-left 6x6 of the example segment
  pixel_t seg [6][6] = '{ '{  3, 34, 56,123, 98, 32},
                          '{ 65, 78, 67, 35, 23,  0},
                          '{  4, 56, 33,  6,  1, 98},
                          '{  5, 89, 99, 45, 66, 90},
                          '{ 78, 23, 11, 12,  7, 76},
                          '{ 24, 67, 22,  4, 50, 38} };

  pixel_t img [12][12];
  pixel_t res [12][12];

  task automatic filter_block(input int r0, input int c0, input bit from_img);
    pixel_t w[9]; int cyc;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    for (int r = 0; r < 6; r++)
      for (int c = 0; c < 6; c++) pix_in[r][c] = from_img ? img[r0+r][c0+c] : seg[r][c];
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    cyc = 1;
    while (!out_valid && cyc < 100) begin @(negedge clk); cyc++; end
    check(cyc == 20, $sformatf("latency %0d", cyc));
    for (int l = 0; l < 4; l++) begin
      for (int k = 0; k < 9; k++)
        w[k] = from_img ? img[r0 + (l/2)*3 + k/3][c0 + (l%2)*3 + k%3] : seg[(l/2)*3 + k/3][(l%2)*3 + k%3];
      check(medians[l] == ref_median(w), $sformatf("block (%0d,%0d) lane %0d median %0d exp %0d",
            r0, c0, l, medians[l], ref_median(w)));
      check(m1[l] && m2[l], "both modules agree with the inputs");
    end
    for (int r = 0; r < 6; r++)
      for (int c = 0; c < 6; c++) res[r0+r][c0+c] = pix_out[r][c];
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int noisy = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    filter_block(0, 0, 0);
    $display("segment quadrant medians: %0d %0d %0d %0d", medians[0], medians[1], medians[2], medians[3]);
    check(medians[0] == 56, "top-left quadrant of the segment has median 56");

    for (int r = 0; r < 12; r++)
      for (int c = 0; c < 12; c++) begin
        img[r][c] = (c < 6) ? 8'd40 : 8'd200;
        // at most one impulse per row of each 3x3 window keeps every window's
        // median at its level
        if (($urandom % 10) == 0 && (c % 3) == 1) begin
          img[r][c] = ($urandom % 2) ? 8'd255 : 8'd0;
          noisy++;
        end
      end
    for (int br = 0; br < 2; br++)
      for (int bc = 0; bc < 2; bc++) filter_block(br*6, bc*6, 1);
    for (int r = 0; r < 12; r++)
      for (int c = 0; c < 12; c++)
        check(res[r][c] == ((c < 6) ? 8'd40 : 8'd200), $sformatf("pixel (%0d,%0d) = %0d", r, c, res[r][c]));
    $display("impulses injected: %0d", noisy);
    check(noisy > 0, "noise present in the test image");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
