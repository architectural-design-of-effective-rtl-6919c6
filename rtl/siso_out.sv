// siso_out: the two output register ranks of the 6x6 filter.
//
// SISO(n) holds the four window medians, all loaded together on E3; SISO(n)a takes
// a copy on E4 and drives the output. Every register is a data-driven clock-gated
// register (gated_fifo), so a median equal to the one already stored causes no
// clock edge. The 36 output pixels are the four medians, each repeated over its
// 3x3 quadrant: lane 0 top-left, 1 top-right, 2 bottom-left, 3 bottom-right.
// The two ranks, their enables and the replication follow the original architecture; the quadrant
// numbering is this implementation's.
// Timing: siso_n updates on the edge with e3 high, siso_na on the edge with e4 high.
module siso_out
  import median_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        e3,
  input  logic                        e4,
  input  pixel_t [LANES-1:0]          med_in,
  output pixel_t [LANES-1:0]          siso_n,
  output pixel_t [LANES-1:0]          siso_na,
  output pixel_t [SIDE-1:0][SIDE-1:0] pix_out
);
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [1:0] gc_n, gc_na;
    gated_fifo #(.WIDTH(PIX_W), .GROUP_W(PIX_W/2)) u_siso_n (
      .clk(clk), .rst_n(rst_n), .en(e3), .d(med_in[l]), .q(siso_n[l]), .gclk(gc_n));
    gated_fifo #(.WIDTH(PIX_W), .GROUP_W(PIX_W/2)) u_siso_na (
      .clk(clk), .rst_n(rst_n), .en(e4), .d(siso_n[l]), .q(siso_na[l]), .gclk(gc_na));
  end

  for (genvar r = 0; r < SIDE; r++) begin : g_row
    for (genvar c = 0; c < SIDE; c++) begin : g_col
      assign pix_out[r][c] = siso_na[(r/3)*2 + (c/3)];
    end
  end
endmodule
