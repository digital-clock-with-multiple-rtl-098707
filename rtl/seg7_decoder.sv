// seg7_decoder: BCD digit 0..9 to a seven-segment pattern.
//
// Purely combinational. Output bits are {a,b,c,d,e,f,g}, segment a in the
// MSB, 1 = lit (patterns in clock_pkg). It drives the four displays of the
// seconds and minutes sections. Codes 10..15 never occur on those counters
// and blank the display, which is this design's choice.
module seg7_decoder
  import clock_pkg::*;
(
  input  logic [3:0] bcd,
  output seg7_t      seg
);

  always_comb seg = digit_to_seg(bcd);

endmodule
