// tb_weekday_decoder: exhaustive check of the weekday lamp decoder.
//
// Day d (0 = Monday .. 6 = Sunday) must light exactly lamp d; code 7 must
// light none.
module tb_weekday_decoder;

  logic [2:0] day;
  logic [6:0] led;
  int checks = 0, failures = 0;

  weekday_decoder dut (.day, .led);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 8; d++) begin
      logic [6:0] exp_led;
      day = 3'(d);
      exp_led = (d < 7) ? 7'(1 << d) : 7'b0;
      #1;
      checks++;
      if (led !== exp_led) begin
        failures++;
        $display("FAIL day=%0d led=%b expected %b", d, led, exp_led);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
