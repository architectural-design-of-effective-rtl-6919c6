// mux9: 9:1 multiplexer of W-bit words, select 0..8; select values above 8
// return input 0 (they do not occur: the select counter wraps at 8).
module mux9 #(
  parameter int unsigned W = 8
) (
  input  logic [8:0][W-1:0] in,
  input  logic [3:0]        sel,
  output logic [W-1:0]      out
);
  always_comb begin
    out = in[0];
    if (sel <= 4'd8) out = in[sel];
  end
endmodule
