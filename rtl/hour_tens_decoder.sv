// hour_tens_decoder: tens digit of a 5-bit binary hour, as seven segments.
//
// Combinational. Codes 0..9 show 0 (the leading zero is displayed), 10..19
// show 1, 20..29 show 2 and 30..31 show 3, as in the hour display's
// second-digit truth table. Segment order {a..g}, a in the MSB, 1 = lit.
module hour_tens_decoder
  import clock_pkg::*;
(
  input  logic [4:0] bin,
  output seg7_t      seg
);

  always_comb begin
    if      (bin >= 5'd30) seg = SEG_3;
    else if (bin >= 5'd20) seg = SEG_2;
    else if (bin >= 5'd10) seg = SEG_1;
    else                   seg = SEG_0;
  end

endmodule
