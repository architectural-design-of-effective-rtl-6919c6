// tb_median6x6_top: end-to-end test of the 6x6 median filter with DMR.
// Sends 6x6 blocks (a worked example with window medians 71, 97, 73, 70, blocks
// of random pixels, a repeated block and blocks with injected soft errors),
// computes every window median with an independent sort, and checks medians,
// the 36 replicated output pixels, the DMR match flags, the 19-cycle busy time
// and the 20-cycle accept-to-output latency. It counts how often each mechanism
// occurred: error corrected in module 1 / module 2, both modules hit (output
// 0), a stalled request while busy, gated FIFO clock cycles (enable high, no
// data change) and a suppressed SISO clock on a repeated median. Any mechanism that never occurs is a failure.
module tb_median6x6_top;
  import median_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;             // falling edge applies the asynchronous reset

  logic in_valid, in_ready, out_valid;
  pixel_t [SIDE-1:0][SIDE-1:0] pix_in, pix_out;
  pixel_t [LANES-1:0] seu1, seu2, medians;
  logic [LANES-1:0] m1, m2;

  median6x6_top dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .pix_in(pix_in), .seu_mask1(seu1), .seu_mask2(seu2), .out_valid(out_valid),
    .pix_out(pix_out), .medians(medians), .dmr_match1(m1), .dmr_match2(m2));

  int checks = 0, failures = 0;
  int n_both = 0, n_fix1 = 0, n_fix2 = 0, n_stall = 0, n_fifo_gated = 0, n_siso_gated = 0, n_blocks = 0;

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

  function automatic void get_win(input pixel_t [SIDE-1:0][SIDE-1:0] b, input int l, output pixel_t w[9]);
    for (int k = 0; k < 9; k++) w[k] = b[(l/2)*3 + k/3][(l%2)*3 + k%3];
  endfunction

  function automatic bit in_win(input pixel_t w[9], input pixel_t v);
    for (int k = 0; k < 9; k++) if (w[k] == v) return 1;
    return 0;
  endfunction

  // gated-clock observation: FIFO1 of lane 0 module 1, SISO(n) of lane 0
  always @(negedge clk) begin
    // a FIFO nibble whose enable is on but whose data does not change is gated
    if (rst_n && dut.e2 && !dut.g_lane[0].u_mod1.u_rows.u_fifo1.g_grp[0].changed)
      n_fifo_gated++;
  end
  int siso_pulses = 0;
  always @(posedge dut.u_out.g_lane[0].u_siso_n.gclk[0]) siso_pulses++;
  always @(posedge dut.u_out.g_lane[0].u_siso_n.gclk[1]) siso_pulses++;

  // run one block; masks are applied for the whole block
  task automatic run_block(input pixel_t [SIDE-1:0][SIDE-1:0] b,
                           input pixel_t [LANES-1:0] mk1, input pixel_t [LANES-1:0] mk2,
                           input bit expect_siso_gated);
    pixel_t w[9]; pixel_t exp_med; int cyc; int busy_cyc; int sp0;
    pixel_t bad1, bad2; bit ok1, ok2;
    @(negedge clk);
    pix_in = b; seu1 = mk1; seu2 = mk2; in_valid = 1;
    check(in_ready, "in_ready high when idle");
    @(posedge clk); #1;
    in_valid = 0;
    sp0 = siso_pulses;
    cyc = 0; busy_cyc = 0;
    // present a second request while busy: it must be held off
    @(negedge clk); in_valid = 1;
    if (!in_ready) n_stall++;
    @(negedge clk); in_valid = 0;
    busy_cyc = 2; cyc = 2;
    while (!out_valid && cyc < 100) begin
      @(negedge clk); cyc++;
      if (!in_ready) busy_cyc++;
    end
    check(cyc == 20, $sformatf("accept-to-output latency %0d, expected 20", cyc));
    check(busy_cyc == 19, $sformatf("busy cycles %0d, expected 19", busy_cyc));
    for (int l = 0; l < LANES; l++) begin
      get_win(b, l, w);
      exp_med = ref_median(w);
      bad1 = exp_med ^ mk1[l]; bad2 = exp_med ^ mk2[l];
      ok1 = in_win(w, bad1); ok2 = in_win(w, bad2);
      check(m1[l] == ok1, $sformatf("lane %0d match1 %0b exp %0b", l, m1[l], ok1));
      check(m2[l] == ok2, $sformatf("lane %0d match2 %0b exp %0b", l, m2[l], ok2));
      if (ok1 || ok2) begin
        check(medians[l] == ((ok1 ? bad1 : 8'h00) | (ok2 ? bad2 : 8'h00)),
              $sformatf("lane %0d median %0d exp %0d", l, medians[l], exp_med));
        if (mk1[l] == 0 && mk2[l] != 0 && !ok2) n_fix2++;
        if (mk2[l] == 0 && mk1[l] != 0 && !ok1) n_fix1++;
      end else begin
        check(medians[l] == 8'h00, $sformatf("lane %0d both modules hit: output %0d, expected 0", l, medians[l]));
        n_both++;
      end
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          check(pix_out[(l/2)*3 + r][(l%2)*3 + c] == medians[l], "replicated output pixel");
    end
    if (expect_siso_gated) begin
      check(siso_pulses == sp0, "SISO(n) lane 0 not clocked for a repeated median");
      if (siso_pulses == sp0) n_siso_gated++;
    end
    n_blocks++;
  endtask

  // block whose windows are the sorted sequences of the worked example
  function automatic pixel_t [SIDE-1:0][SIDE-1:0] example_block();
    pixel_t [SIDE-1:0][SIDE-1:0] b;
    pixel_t v [4][9] = '{ '{197,121,111,109,71,39,37,28,2},
                          '{222,183,138,101,97,66,55,37,25},
                          '{221,141,139,81,73,65,40,12,5},
                          '{250,180,120,95,70,60,33,20,9} };
    for (int l = 0; l < 4; l++)
      for (int k = 0; k < 9; k++) b[(l/2)*3 + k/3][(l%2)*3 + k%3] = v[l][(k*4) % 9];
    return b;
  endfunction

  function automatic pixel_t [SIDE-1:0][SIDE-1:0] rand_block();
    pixel_t [SIDE-1:0][SIDE-1:0] b;
    for (int r = 0; r < SIDE; r++) for (int c = 0; c < SIDE; c++) b[r][c] = 8'($urandom);
    return b;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pixel_t [SIDE-1:0][SIDE-1:0] b;
    pixel_t [LANES-1:0] z = '0, mk;
    in_valid = 0; pix_in = '0; seu1 = '0; seu2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    b = example_block();
    run_block(b, z, z, 0);
    check(medians[0] == 71 && medians[1] == 97 && medians[2] == 73 && medians[3] == 70,
          "worked example medians 71 97 73 70");
    run_block(b, z, z, 1);                      // same block again: SISO clocks stay off

    for (int n = 0; n < 20; n++) run_block(rand_block(), z, z, 0);
    b = '{default: '{default: 8'h5A}};          // flat block: FIFO data repeats
    run_block(b, z, z, 0);

    // soft errors: module 2 hit in every lane, then module 1, then mixed
    for (int n = 0; n < 10; n++) begin
      for (int l = 0; l < 4; l++) mk[l] = 8'(1 << (n % 8));
      b = rand_block();
      if (n % 3 == 0) run_block(b, z, mk, 0);
      else if (n % 3 == 1) run_block(b, mk, z, 0);
      else run_block(b, {z[3:2], mk[1:0]}, {mk[3:2], z[1:0]}, 0);
    end
    // both modules hit in every lane: nothing can be corrected, output is 0
    for (int l = 0; l < 4; l++) mk[l] = 8'h80;
    run_block(rand_block(), mk, mk, 0);

    check(n_fix1 > 0, "module-1 error corrected at least once");
    check(n_fix2 > 0, "module-2 error corrected at least once");
    check(n_stall > 0, "request held off while busy");
    check(n_both > 0, "double error reported as 0 at least once");
    check(n_fifo_gated > 0, "FIFO clock gated on unchanged data");
    check(n_siso_gated > 0, "SISO clock gated on repeated median");
    $display("both=%0d blocks=%0d fix1=%0d fix2=%0d stall=%0d fifo_gated=%0d siso_gated=%0d",
             n_both, n_blocks, n_fix1, n_fix2, n_stall, n_fifo_gated, n_siso_gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
