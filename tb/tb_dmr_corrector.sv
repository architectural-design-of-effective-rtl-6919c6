// tb_dmr_corrector: checks the DMR error corrector. Includes the reference case
// (pixels 11, 10, 33, ...; module 1 median 33, module 2 median 63 -> output 33,
// match1 = 1, match2 = 0), random windows with one module corrupted, both
// corrupted (output 0) and both correct.
module tb_dmr_corrector;
  import median_pkg::*;
  logic clk = 0, rst_n = 1, load = 0;
  pixel_t [NPIX-1:0] pix;
  pixel_t med1, med2, med_out;
  logic match1, match2;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;             // falling edge applies the asynchronous reset

  dmr_corrector dut (.clk(clk), .rst_n(rst_n), .load(load), .pix(pix), .med1(med1), .med2(med2),
                     .match1(match1), .match2(match2), .med_out(med_out));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit in_win(input pixel_t v);
    for (int k = 0; k < NPIX; k++) if (pix[k] == v) return 1;
    return 0;
  endfunction

  task automatic apply(input pixel_t x1, input pixel_t x2);
    bit e1, e2; pixel_t eo;
    @(negedge clk);
    med1 = x1; med2 = x2; load = 1;
    e1 = in_win(x1); e2 = in_win(x2);
    eo = (e1 ? x1 : 8'h00) | (e2 ? x2 : 8'h00);
    @(negedge clk);
    load = 0;
    check(match1 == e1 && match2 == e2, $sformatf("match %0b%0b exp %0b%0b", match1, match2, e1, e2));
    check(med_out == eo, $sformatf("med_out %0d exp %0d", med_out, eo));
    // holds while load is low
    med1 = ~x1; med2 = ~x2;
    @(negedge clk);
    check(med_out == eo, "output held without load");
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pixel_t m;
    pix = '{8'd90, 8'd200, 8'd5, 8'd71, 8'd120, 8'd44, 8'd33, 8'd10, 8'd11};
    med1 = 0; med2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    apply(8'd33, 8'd63);
    check(med_out == 8'd33 && match1 && !match2, "reference case 33/63 -> 33");
    apply(8'd63, 8'd33);
    check(med_out == 8'd33, "module 1 corrupted -> 33");
    apply(8'd99, 8'd63);
    check(med_out == 8'd0, "both corrupted -> 0");
    for (int n = 0; n < 500; n++) begin
      for (int k = 0; k < NPIX; k++) pix[k] = 8'($urandom);
      m = pix[$urandom % NPIX];
      case (n % 4)
        0: apply(m, m);
        1: apply(m, m ^ 8'(1 << ($urandom % 8)));
        2: apply(m ^ 8'(1 << ($urandom % 8)), m);
        default: apply(8'($urandom), 8'($urandom));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
