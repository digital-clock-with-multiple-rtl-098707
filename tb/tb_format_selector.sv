// tb_format_selector: self-checking testbench of the hour format selector.
//
// Walks through every pair of 24-hour (0..23) and 12-hour (1..12) counter
// values with both positions of the format toggle: the output must be the
// 24-hour value when fmt_12h=0 and the 12-hour value when fmt_12h=1.
module tb_format_selector;

  logic [4:0] h24, hour;
  logic [3:0] h12;
  logic       fmt_12h;
  int checks = 0, failures = 0;

  format_selector dut (.h24, .h12, .fmt_12h, .hour);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 24; a++)
      for (int b = 1; b <= 12; b++)
        for (int f = 0; f < 2; f++) begin
          h24 = 5'(a); h12 = 4'(b); fmt_12h = 1'(f);
          #1;
          checks++;
          if (hour !== 5'(f ? b : a)) begin
            failures++;
            $display("FAIL h24=%0d h12=%0d fmt=%0d hour=%0d", a, b, f, hour);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
