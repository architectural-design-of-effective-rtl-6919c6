// dmr_corrector: double-modular-redundancy error correction for one 3x3 window.
//
// Two identical median filters (modules 1 and 2) compute the median of the same
// window. A median filter can only output one of its input pixels, so a module
// whose median matches none of the nine window pixels must have suffered a soft
// error. For each module, the median is XNORed bit by bit with every pixel, the
// XNOR bits of a pixel are ANDed (pixel equals median) and the nine results are
// ORed into the module's match signal. When load is high, each module's stacked
// register takes its median if it matched and zero if it did not; the two
// registers are ORed to give the error-free median. The comparison, the stacked
// registers and the final OR follow the original architecture; clearing a non-matching module's
// register to zero (rather than holding its old contents) is this implementation's
// reading of "the median value is considered 0".
// Limitation inherited from the scheme: an upset that turns a median into another
// pixel of the same window is not detected, and if both modules fail the output is 0.
// Interface: pix = window pixels, med1/med2 = module medians. match1/match2 are the
// registered match signals. Timing: med_out and match1/2 update one edge after load.
module dmr_corrector
  import median_pkg::*;
#(
  parameter int unsigned NPIX_P = NPIX
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  pixel_t [NPIX_P-1:0] pix,
  input  pixel_t              med1,
  input  pixel_t              med2,
  output logic                match1,
  output logic                match2,
  output pixel_t              med_out
);
  logic [NPIX_P-1:0] eq1, eq2;
  logic              m1, m2;
  pixel_t            r1, r2;

  for (genvar k = 0; k < NPIX_P; k++) begin : g_cmp
    assign eq1[k] = &(~(pix[k] ^ med1));
    assign eq2[k] = &(~(pix[k] ^ med2));
  end
  assign m1 = |eq1;
  assign m2 = |eq2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= '0; r2 <= '0; match1 <= 1'b0; match2 <= 1'b0;
    end else if (load) begin
      r1     <= m1 ? med1 : '0;
      r2     <= m2 ? med2 : '0;
      match1 <= m1;
      match2 <= m2;
    end
  end

  assign med_out = r1 | r2;
endmodule
