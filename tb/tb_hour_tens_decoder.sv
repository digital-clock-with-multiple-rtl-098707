// tb_hour_tens_decoder: exhaustive check of the hour tens digit decoder.
//
// Applies all 32 five-bit codes and compares the segments {a..g} with a
// 32-row truth table written out below: each row is the seven-segment
// pattern of the tens digit (0 for 0..9, 1 for 10..19, 2 for 20..29, 3 for 30..31) of its code.
module tb_hour_tens_decoder;

  logic [4:0] bin;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  localparam logic [6:0] TABLE [32] = '{
    7'b1111110, 7'b1111110, 7'b1111110, 7'b1111110,
    7'b1111110, 7'b1111110, 7'b1111110, 7'b1111110,
    7'b1111110, 7'b1111110, 7'b0110000, 7'b0110000,
    7'b0110000, 7'b0110000, 7'b0110000, 7'b0110000,
    7'b0110000, 7'b0110000, 7'b0110000, 7'b0110000,
    7'b1101101, 7'b1101101, 7'b1101101, 7'b1101101,
    7'b1101101, 7'b1101101, 7'b1101101, 7'b1101101,
    7'b1101101, 7'b1101101, 7'b1111001, 7'b1111001
  };

  hour_tens_decoder dut (.bin, .seg);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      bin = 5'(v);
      #1;
      checks++;
      if (seg !== TABLE[v]) begin
        failures++;
        $display("FAIL bin=%0d seg=%b expected %b", v, seg, TABLE[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
