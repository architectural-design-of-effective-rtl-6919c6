// tb_gated_fifo: checks the data-driven clock-gated register.
// Reproduces the gating sequence of the reference waveforms (stored 10101000,
// input 11110000: both nibble clocks pulse; same input again: neither pulses),
// then random data with the enable toggling. For every cycle it predicts which
// nibble clock must pulse (enable and nibble changed) and the stored value.
module tb_gated_fifo;
  logic clk = 0, rst_n = 1, en = 0;
  logic [7:0] d = 0, q;
  logic [1:0] gclk;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;             // falling edge applies the asynchronous reset

  gated_fifo dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q), .gclk(gclk));

  int checks = 0, failures = 0;
  int pulses [2] = '{0, 0};
  always @(posedge gclk[0]) pulses[0]++;
  always @(posedge gclk[1]) pulses[1]++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [7:0] model = 0;
  task automatic step(input logic en_i, input logic [7:0] d_i);
    int p0, p1; bit exp0, exp1;
    @(negedge clk);
    en = en_i; d = d_i;
    p0 = pulses[0]; p1 = pulses[1];
    exp0 = en_i && (d_i[3:0] != model[3:0]);
    exp1 = en_i && (d_i[7:4] != model[7:4]);
    if (en_i) model = d_i;
    @(negedge clk);
    check((pulses[0] - p0) == int'(exp0), $sformatf("LSB clock pulse %0d exp %0d", pulses[0]-p0, exp0));
    check((pulses[1] - p1) == int'(exp1), $sformatf("MSB clock pulse %0d exp %0d", pulses[1]-p1, exp1));
    check(q == model, $sformatf("q %h exp %h", q, model));
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(q == 8'h00, "reset value");
    step(1, 8'b1010_1000);
    step(1, 8'b1111_0000);   // both nibbles change: clkg and clkg1 pulse
    step(1, 8'b1111_0000);   // same value: both clocks gated
    step(1, 8'b1111_0101);   // only LSB changes
    step(0, 8'h33);          // disabled: nothing
    for (int n = 0; n < 300; n++) step(($urandom % 4) != 0, ($urandom % 3 == 0) ? model : 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
