// hour_ones_decoder: units digit of a 5-bit binary hour, as seven segments.
//
// Combinational. For every one of the 32 input codes the output shows
// (bin mod 10), which is what the hour display's first-digit truth table
// specifies: 0..9, 10..19, 20..29 and 30..31 all map to their last decimal
// digit. Segment order {a..g}, a in the MSB, 1 = lit.
module hour_ones_decoder
  import clock_pkg::*;
(
  input  logic [4:0] bin,
  output seg7_t      seg
);

  logic [3:0] units;

  always_comb begin
    if      (bin >= 5'd30) units = 4'(bin - 5'd30);
    else if (bin >= 5'd20) units = 4'(bin - 5'd20);
    else if (bin >= 5'd10) units = 4'(bin - 5'd10);
    else                   units = bin[3:0];
    seg = digit_to_seg(units);
  end

endmodule
