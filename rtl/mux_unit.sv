// mux_unit: the MUX unit of the 6x6 filter - two 9:1 multiplexers per 3x3 window,
// eight in all for four windows, sharing one 4-bit select.
//
// For window pixels Z0..Z8 (row-major), MUX A carries the first two pixels of each
// row and all-ones in the third column; MUX B carries zeros except the third pixel
// of each row:
//   A = { Z0, Z1, FF, Z3, Z4, FF, Z6, Z7, FF }
//   B = { 00, 00, Z2, 00, 00, Z5, 00, 00, Z8 }
// so p AND q is 00 for select 0,1,3,4,6,7 and the third-column pixel for 2,5,8.
// The downstream row sorter relies on this. The assignment follows the original
// input tables; the enable (E1) holding the outputs at zero when low is a choice
// of this implementation.
// Interface: win[lane][k] = Zk of window lane; sel 0..8; p[lane]/q[lane] out.
// Timing: purely combinational.
module mux_unit
  import median_pkg::*;
#(
  parameter int unsigned LANES_P = LANES
) (
  input  pixel_t [LANES_P-1:0][NPIX-1:0] win,
  input  logic   [SEL_W-1:0]             sel,
  input  logic                           en,
  output pixel_t [LANES_P-1:0]           p,
  output pixel_t [LANES_P-1:0]           q
);
  for (genvar l = 0; l < LANES_P; l++) begin : g_lane
    pixel_t [NPIX-1:0] a_in, b_in;
    pixel_t            pa, qb;
    for (genvar k = 0; k < NPIX; k++) begin : g_in
      if (k % 3 == 2) begin : g_third
        assign a_in[k] = '1;
        assign b_in[k] = win[l][k];
      end else begin : g_first
        assign a_in[k] = win[l][k];
        assign b_in[k] = '0;
      end
    end
    mux9 #(.W(PIX_W)) u_mux_a (.in(a_in), .sel(sel), .out(pa));
    mux9 #(.W(PIX_W)) u_mux_b (.in(b_in), .sel(sel), .out(qb));
    assign p[l] = en ? pa : '0;
    assign q[l] = en ? qb : '0;
  end
endmodule
