// median6x6_top: 6x6 edge-preserving median filter with DMR error correction.
//
// A 6x6 block of 8-bit pixels is accepted in one cycle and split into four 3x3
// windows (lane 0 top-left, 1 top-right, 2 bottom-left, 3 bottom-right). Each
// window gets its own 3x3 median, so edges survive as they would with a 3x3
// filter while 36 pixels are processed per block. Per lane:
//   MUX unit (MUX A/B) -> two identical median9_filter modules -> dmr_corrector
// and the four corrected medians go through SISO(n) (E3) and SISO(n)a (E4) to the
// output, each median repeated over its quadrant. The control_unit sequences it.
// Registers on the FIFO and SISO paths use data-driven clock gating (gated_fifo).
//
// Handshake: a block is taken when in_valid and in_ready are both high at a rising
// edge; in_ready is low for the 19 cycles the block is in flight. out_valid pulses
// for one cycle, 20 cycles after the accepting edge; pix_out and medians hold until
// the next block's result. seu_mask1/seu_mask2 flip bits in the median register of
// module 1/2 of each lane to model a soft error (tie to zero in normal use).
// dmr_match1/2 report, per lane, whether each module's median was found among the
// window pixels in the last block.
module median6x6_top
  import median_pkg::*;
#(
  parameter int unsigned SORT_EDGES = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  pixel_t [SIDE-1:0][SIDE-1:0] pix_in,
  input  pixel_t [LANES-1:0]          seu_mask1,
  input  pixel_t [LANES-1:0]          seu_mask2,
  output logic                        out_valid,
  output pixel_t [SIDE-1:0][SIDE-1:0] pix_out,
  output pixel_t [LANES-1:0]          medians,
  output logic   [LANES-1:0]          dmr_match1,
  output logic   [LANES-1:0]          dmr_match2
);
  // ---------------- control
  logic             busy, start, e1, e2, med_load, dmr_load, e3, e4, done;
  logic [SEL_W-1:0] sel;

  assign in_ready = !busy;
  assign start    = in_valid && in_ready;

  control_unit #(.SORT_EDGES(SORT_EDGES)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .sel(sel),
    .e1(e1), .e2(e2), .med_load(med_load), .dmr_load(dmr_load),
    .e3(e3), .e4(e4), .done(done));

  // ---------------- input block register and partition into windows
  pixel_t [SIDE-1:0][SIDE-1:0] blk;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     blk <= '0;
    else if (start) blk <= pix_in;
  end

  pixel_t [LANES-1:0][NPIX-1:0] win;
  for (genvar r = 0; r < SIDE; r++) begin : g_r
    for (genvar c = 0; c < SIDE; c++) begin : g_c
      assign win[(r/3)*2 + (c/3)][(r%3)*3 + (c%3)] = blk[r][c];
    end
  end

  // ---------------- MUX unit
  pixel_t [LANES-1:0] p, q;
  mux_unit u_mux (.win(win), .sel(sel), .en(e1), .p(p), .q(q));

  // ---------------- per lane: two median modules and DMR
  pixel_t [LANES-1:0] med1, med2, med_ok;
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    median9_filter u_mod1 (.clk(clk), .rst_n(rst_n), .en(e2), .sel(sel), .p(p[l]), .q(q[l]),
                           .med_load(med_load), .seu_mask(seu_mask1[l]), .median(med1[l]));
    median9_filter u_mod2 (.clk(clk), .rst_n(rst_n), .en(e2), .sel(sel), .p(p[l]), .q(q[l]),
                           .med_load(med_load), .seu_mask(seu_mask2[l]), .median(med2[l]));
    dmr_corrector u_dmr (.clk(clk), .rst_n(rst_n), .load(dmr_load), .pix(win[l]),
                         .med1(med1[l]), .med2(med2[l]),
                         .match1(dmr_match1[l]), .match2(dmr_match2[l]), .med_out(med_ok[l]));
  end

  // ---------------- SISO(n) / SISO(n)a
  pixel_t [LANES-1:0] siso_n;
  siso_out u_out (.clk(clk), .rst_n(rst_n), .e3(e3), .e4(e4), .med_in(med_ok),
                  .siso_n(siso_n), .siso_na(medians), .pix_out(pix_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= done;
  end

  // handshake rule: a result is delivered only when the filter is idle again
  assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> in_ready)
    else $error("median6x6_top: out_valid while busy");
endmodule
