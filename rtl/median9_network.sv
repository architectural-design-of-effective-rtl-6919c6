// median9_network: comparators 4..13 of the 9-pixel median sorter. Combinational.
//
// Input: three rows each already sorted, a0..a8 with a0,a3,a6 the row maxima,
// a1,a4,a7 the row middles and a2,a5,a8 the row minima. The median of the nine
// values is the median of {minimum of the maxima, median of the middles,
// maximum of the minima}:
//   CU4 (a0,a3), CU5 (l4,a6)          -> l5  = min of maxima
//   CU7 (a1,a4), CU8 (l7,a7),
//   CU9 (h7,h8)                       -> l9  = median of middles
//   CU10 (a5,a8), CU11 (h10,a2)       -> h11 = max of minima
//   CU6 (l5,l9), CU12 (l6,h11),
//   CU13 (h6,h12)                     -> l13 = z5, the median
// Comparator numbering and most connections follow the original sorting network;
// two inputs differ from it (CU9 takes h8 where the original shows h10, CU6 takes l9
// where it shows l8) because only these give the median for every input.
// Together with the three row comparators this is the 13-comparator sorter.
module median9_network
  import median_pkg::*;
(
  input  pixel_t [NPIX-1:0] a,
  output pixel_t            median
);
  pixel_t h4, l4, h5, l5, h6, l6, h7, l7, h8, l8, h9, l9;
  pixel_t h10, l10, h11, l11, h12, l12, h13, l13;

  cmp_swap #(.W(PIX_W)) u_cu4  (.x(a[0]), .y(a[3]), .hi(h4),  .lo(l4));
  cmp_swap #(.W(PIX_W)) u_cu5  (.x(l4),   .y(a[6]), .hi(h5),  .lo(l5));
  cmp_swap #(.W(PIX_W)) u_cu7  (.x(a[1]), .y(a[4]), .hi(h7),  .lo(l7));
  cmp_swap #(.W(PIX_W)) u_cu8  (.x(l7),   .y(a[7]), .hi(h8),  .lo(l8));
  cmp_swap #(.W(PIX_W)) u_cu9  (.x(h7),   .y(h8),   .hi(h9),  .lo(l9));
  cmp_swap #(.W(PIX_W)) u_cu10 (.x(a[5]), .y(a[8]), .hi(h10), .lo(l10));
  cmp_swap #(.W(PIX_W)) u_cu11 (.x(h10),  .y(a[2]), .hi(h11), .lo(l11));
  cmp_swap #(.W(PIX_W)) u_cu6  (.x(l5),   .y(l9),   .hi(h6),  .lo(l6));
  cmp_swap #(.W(PIX_W)) u_cu12 (.x(l6),   .y(h11),  .hi(h12), .lo(l12));
  cmp_swap #(.W(PIX_W)) u_cu13 (.x(h6),   .y(h12),  .hi(h13), .lo(l13));

  assign median = l13;
endmodule
