// gated_fifo: parallel-in parallel-out register with data-driven clock gating.
//
// The stored word is split into groups of GROUP_W bits (two 4-bit nibbles for the
// 8-bit default: LSB and MSB). Each group has its own clock gate. A group's gate
// opens only when the register is enabled and the incoming group differs from the
// stored one (bitwise XOR of d and q, ORed over the group). A repeated value -
// typically the 8'h00 / 8'hFF padding words the MUX unit inserts - therefore
// produces no clock edge and no switching in that group.
//
// The per-nibble split, the XOR/OR change detector and the idea of separate gated
// clocks for LSB and MSB follow the original architecture; the gate itself is a standard
// latch-based clock-gating cell (clock_gate) rather than a flip-flop driving the
// register clock, which would delay the gated edge by a full cycle.
//
// Interface: d/q WIDTH bits, en is the stage enable (E2, E3 or E4). gclk exposes
// the gated clock of each group (bit 0 = LSB group, "clkg"; bit 1 = MSB, "clkg1").
// Timing: q takes d at the rising edge of clk when en=1; unchanged groups are not
// clocked. Reset is asynchronous, active low, and clears q.
module gated_fifo #(
  parameter int unsigned WIDTH   = 8,
  parameter int unsigned GROUP_W = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic [WIDTH-1:0]           d,
  output logic [WIDTH-1:0]           q,
  output logic [WIDTH/GROUP_W-1:0]   gclk
);
  localparam int unsigned NG = WIDTH / GROUP_W;

  initial begin
    assert (WIDTH % GROUP_W == 0) else $error("WIDTH must be a multiple of GROUP_W");
  end

  for (genvar g = 0; g < NG; g++) begin : g_grp
    logic               changed;
    logic [GROUP_W-1:0] stored;
    assign changed = |(d[g*GROUP_W +: GROUP_W] ^ stored);

    clock_gate u_cg (.clk(clk), .en(en & changed), .gclk(gclk[g]));

    always_ff @(posedge gclk[g] or negedge rst_n) begin
      if (!rst_n) stored <= '0;
      else        stored <= d[g*GROUP_W +: GROUP_W];
    end
    assign q[g*GROUP_W +: GROUP_W] = stored;
  end
endmodule
