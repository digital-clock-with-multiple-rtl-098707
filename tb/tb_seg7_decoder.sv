// tb_seg7_decoder: exhaustive check of the BCD to seven-segment decoder.
//
// The expected patterns are written out per digit as the list of lit
// segments (for example 4 lights b, c, f, g) and converted to the {a..g}
// bit order here, so they do not come from the decoder's own constants.
// Codes 10..15 must be blank.
module tb_seg7_decoder;

  logic [3:0] bcd;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  // Lit segments of each digit, as a string over "abcdefg".
  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                      "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};

  seg7_decoder dut (.bcd, .seg);

  function automatic logic [6:0] pattern(string s);
    logic [6:0] p = '0;
    for (int i = 0; i < s.len(); i++) p[6 - (s[i] - "a")] = 1'b1;
    return p;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      logic [6:0] exp_seg;
      bcd = 4'(d);
      exp_seg = (d < 10) ? pattern(lit[d]) : 7'b0;
      #1;
      checks++;
      if (seg !== exp_seg) begin
        failures++;
        $display("FAIL bcd=%0d seg=%b expected %b", d, seg, exp_seg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
