// tb_demux_1to8: exhaustive check of the 1-to-8 demultiplexer.
//
// All 32 combinations of EN, IN and the select bits {s0,s1,s2} (s0 the most
// significant): with EN=1 and IN=1 only output f[s] is 1, otherwise every
// output is 0.
module tb_demux_1to8;

  logic       en, din;
  logic [2:0] s;
  logic [7:0] f;
  int checks = 0, failures = 0;

  demux_1to8 dut (.en, .din, .s, .f);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [7:0] exp_f;
      {en, din, s} = 5'(v);
      exp_f = 8'b0;
      if (en && din) exp_f[s] = 1'b1;
      #1;
      checks++;
      if (f !== exp_f) begin
        failures++;
        $display("FAIL en=%0b in=%0b s=%03b f=%b expected %b", en, din, s, f, exp_f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
