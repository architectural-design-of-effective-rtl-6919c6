// row_sort_unit: streaming row sorter and storing unit of one 3x3 median filter.
//
// The MUX unit delivers one window pixel per cycle on bus p (MUX A) together with
// bus q (MUX B). p passes through a two-stage delay line, FIFO1 then FIFO2, both
// data-driven clock-gated registers. At select value i, FIFO1 holds p(i-1), FIFO2
// holds p(i-2) and the AND gate gives p(i)&q(i), which is zero except at i = 2, 5, 8
// where it equals the third pixel of the row. So at i = 2, 5, 8 the three pixels of
// row 0, 1, 2 are presented together:
//   CU1 sorts (FIFO1, FIFO2)       -> h1, l1
//   CU2 sorts (AND, l1)            -> h2, l2   (l2 = row minimum)
//   CU3 sorts (h2, h1)             -> h3, l3   (l3 = row middle, h3 = row maximum)
// The sorted row (min, mid, max) then passes through LATCH_STAGES pipeline ranks
// of three registers (two by default: three registers at the comparator outputs
// followed by three more) and is shifted into the storing unit: three chains of
// three SISO registers, a->d->g, b->e->h, c->f->i (a,b,c take min, mid, max).
// A strobe travels with the row so that each rank loads only real rows. After the
// third row has arrived:
//   a0 = i, a1 = h, a2 = g   (row 0: max, mid, min)
//   a3 = f, a4 = e, a5 = d   (row 1)
//   a6 = c, a7 = b, a8 = a   (row 2)
// All registers (FIFO1, FIFO2, pipeline ranks, SISO a..i) are data-driven
// clock-gated, so a value equal to the one stored causes no clock edge.
// The comparator wiring, the pipeline ranks, the SISO chains and the a0..a8 naming
// follow the original architecture; its "latches" are built as edge-triggered
// registers here.
//
// Interface: en = E2, sel = current MUX select. Timing: a0..a8 are complete
// LATCH_STAGES + 1 clock edges after the cycle with sel = 8, and hold until the
// next window.
module row_sort_unit
  import median_pkg::*;
#(
  parameter int unsigned LATCH_STAGES_P = LATCH_STAGES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [SEL_W-1:0]  sel,
  input  pixel_t            p,
  input  pixel_t            q,
  output pixel_t [NPIX-1:0] a
);
  pixel_t fifo1, fifo2, y;
  pixel_t h1, l1, h2, l2, h3, l3;
  logic [1:0] gclk1, gclk2;
  logic       row_end;

  gated_fifo #(.WIDTH(PIX_W), .GROUP_W(PIX_W/2)) u_fifo1 (
    .clk(clk), .rst_n(rst_n), .en(en), .d(p), .q(fifo1), .gclk(gclk1));
  gated_fifo #(.WIDTH(PIX_W), .GROUP_W(PIX_W/2)) u_fifo2 (
    .clk(clk), .rst_n(rst_n), .en(en), .d(fifo1), .q(fifo2), .gclk(gclk2));

  assign y = p & q;

  cmp_swap #(.W(PIX_W)) u_cu1 (.x(fifo1), .y(fifo2), .hi(h1), .lo(l1));
  cmp_swap #(.W(PIX_W)) u_cu2 (.x(y),     .y(l1),    .hi(h2), .lo(l2));
  cmp_swap #(.W(PIX_W)) u_cu3 (.x(h2),    .y(h1),    .hi(h3), .lo(l3));

  assign row_end = en && (sel == 4'd2 || sel == 4'd5 || sel == 4'd8);

  // pipeline ranks ("latches") between the comparators and the storing unit
  pixel_t [2:0]                     row_sorted;  // {max, mid, min}
  pixel_t [LATCH_STAGES_P-1:0][2:0] lat_q;
  logic   [LATCH_STAGES_P-1:0]      lat_v;       // row strobe travelling with the data
  assign row_sorted = {h3, l3, l2};

  initial begin
    assert (LATCH_STAGES_P >= 1) else $error("LATCH_STAGES_P must be at least 1");
  end

  for (genvar s = 0; s < LATCH_STAGES_P; s++) begin : g_lat
    pixel_t [2:0] rank_d;
    logic         rank_en;
    if (s == 0) begin : g_first
      assign rank_d  = row_sorted;
      assign rank_en = row_end;
    end else begin : g_next
      assign rank_d  = lat_q[s-1];
      assign rank_en = lat_v[s-1];
    end
    for (genvar k = 0; k < 3; k++) begin : g_reg
      logic [1:0] gclk_unused;
      gated_fifo #(.WIDTH(PIX_W), .GROUP_W(PIX_W/2)) u_lat (
        .clk(clk), .rst_n(rst_n), .en(rank_en), .d(rank_d[k]), .q(lat_q[s][k]), .gclk(gclk_unused));
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) lat_v[s] <= 1'b0;
      else        lat_v[s] <= rank_en;
    end
  end

  // storing unit: SISO a..i, three chains of data-driven clock-gated registers
  pixel_t s_a, s_b, s_c, s_d, s_e, s_f, s_g, s_h, s_i;
  pixel_t [8:0] siso_d, siso_q;
  assign siso_d = {s_f, s_e, s_d, s_c, s_b, s_a, lat_q[LATCH_STAGES_P-1]};
  assign {s_i, s_h, s_g, s_f, s_e, s_d, s_c, s_b, s_a} = siso_q;

  for (genvar k = 0; k < 9; k++) begin : g_siso
    logic [1:0] gclk_unused;
    gated_fifo #(.WIDTH(PIX_W), .GROUP_W(PIX_W/2)) u_siso (
      .clk(clk), .rst_n(rst_n), .en(lat_v[LATCH_STAGES_P-1]), .d(siso_d[k]), .q(siso_q[k]), .gclk(gclk_unused));
  end

  assign a[0] = s_i;  assign a[1] = s_h;  assign a[2] = s_g;
  assign a[3] = s_f;  assign a[4] = s_e;  assign a[5] = s_d;
  assign a[6] = s_c;  assign a[7] = s_b;  assign a[8] = s_a;
endmodule
