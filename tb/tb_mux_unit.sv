// tb_mux_unit: checks the eight 9:1 multiplexers against the input assignment
// tables: MUX A = {Z0,Z1,FF,Z3,Z4,FF,Z6,Z7,FF}, MUX B = {00,00,Z2,00,00,Z5,00,00,Z8}.
// Includes the reference vector (sel 0: p = 00001111, q = 00000000) and the
// AND of p and q, which must be zero except at select 2, 5 and 8.
module tb_mux_unit;
  import median_pkg::*;
  pixel_t [LANES-1:0][NPIX-1:0] win;
  logic [SEL_W-1:0] sel;
  logic en;
  pixel_t [LANES-1:0] p, q;

  mux_unit dut (.win(win), .sel(sel), .en(en), .p(p), .q(q));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    // reference vector in lane 0
    win = '0;
    win[0] = '{8'hFF, 8'b11100011, 8'b00100100, 8'hFF, 8'b00110011, 8'b10110101, 8'hFF, 8'b01010101, 8'b00001111};
    en = 1; sel = 0;
    #1 check(p[0] == 8'b00001111 && q[0] == 8'h00, "reference vector sel 0");
    for (int n = 0; n < 50; n++) begin
      for (int l = 0; l < LANES; l++) for (int k = 0; k < NPIX; k++) win[l][k] = 8'($urandom);
      for (int s = 0; s < 9; s++) begin
        sel = 4'(s); en = 1;
        #1;
        for (int l = 0; l < LANES; l++) begin
          pixel_t ea, eb;
          ea = (s % 3 == 2) ? 8'hFF : win[l][s];
          eb = (s % 3 == 2) ? win[l][s] : 8'h00;
          check(p[l] == ea, $sformatf("lane %0d sel %0d p %h exp %h", l, s, p[l], ea));
          check(q[l] == eb, $sformatf("lane %0d sel %0d q %h exp %h", l, s, q[l], eb));
          check((p[l] & q[l]) == ((s % 3 == 2) ? win[l][s] : 8'h00), "AND of p and q");
        end
        en = 0;
        #1 check(p == '0 && q == '0, "disabled outputs zero");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
