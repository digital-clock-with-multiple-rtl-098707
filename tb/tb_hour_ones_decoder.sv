// tb_hour_ones_decoder: exhaustive check of the hour units digit decoder.
//
// Applies all 32 five-bit codes and compares the segments {a..g} with a
// 32-row truth table written out below: each row is the seven-segment
// pattern of the units digit (value mod 10) of its code.
module tb_hour_ones_decoder;

  logic [4:0] bin;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  localparam logic [6:0] TABLE [32] = '{
    7'b1111110, 7'b0110000, 7'b1101101, 7'b1111001,
    7'b0110011, 7'b1011011, 7'b1011111, 7'b1110000,
    7'b1111111, 7'b1111011, 7'b1111110, 7'b0110000,
    7'b1101101, 7'b1111001, 7'b0110011, 7'b1011011,
    7'b1011111, 7'b1110000, 7'b1111111, 7'b1111011,
    7'b1111110, 7'b0110000, 7'b1101101, 7'b1111001,
    7'b0110011, 7'b1011011, 7'b1011111, 7'b1110000,
    7'b1111111, 7'b1111011, 7'b1111110, 7'b0110000
  };

  hour_ones_decoder dut (.bin, .seg);

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
