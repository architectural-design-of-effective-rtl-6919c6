// cmp_swap: one compare-and-swap comparator unit (CU). Combinational.
// hi receives the larger of x and y, lo the smaller (ties: both equal).
module cmp_swap #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] hi,
  output logic [W-1:0] lo
);
  always_comb begin
    if (x >= y) begin
      hi = x;
      lo = y;
    end else begin
      hi = y;
      lo = x;
    end
  end
endmodule
