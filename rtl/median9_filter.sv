// median9_filter: one complete 3x3 median filter (one DMR module).
//
// The row_sort_unit sorts the three rows of the window as they stream in from the
// MUX unit (select 0..8), the median9_network reduces the sorted rows to the
// median, and the result is stored in the median register when med_load is high.
// seu_mask models a single-event upset in that register: its set bits are
// inverted in the stored value (all-zero in normal operation). It exists so that
// the error-correction path can be exercised.
// Interface: en = E2, sel and p/q from the MUX unit, med_load from the control
// unit. Timing: median is valid one edge after med_load, which must come at least
// one cycle after the cycle with sel = 8.
module median9_filter
  import median_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [SEL_W-1:0] sel,
  input  pixel_t           p,
  input  pixel_t           q,
  input  logic             med_load,
  input  pixel_t           seu_mask,
  output pixel_t           median
);
  pixel_t [NPIX-1:0] a;
  pixel_t            med_c;

  row_sort_unit   u_rows (.clk(clk), .rst_n(rst_n), .en(en), .sel(sel), .p(p), .q(q), .a(a));
  median9_network u_net  (.a(a), .median(med_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        median <= '0;
    else if (med_load) median <= med_c ^ seu_mask;
  end
endmodule
