// min_sec_section: one base-60 section of the clock (seconds or minutes).
//
// A 0..9 counter holds the units and a 0..5 counter the tens; each drives a
// seven-segment decoder. The units counter steps when en is high (the tick
// for seconds, the seconds carry for minutes); the tens counter steps on the
// units carry (9 -> 0). carry is high in the cycle the section goes 59 -> 00
// and enables the next section. The same module serves seconds and minutes,
// as the two differ only in what drives their clock.
//
// adj_ones / adj_tens are one-cycle setting pulses. They are XORed onto the
// count enables, the way the setting outputs are XORed onto the counter
// clocks in the original circuit; a setting step that wraps a counter
// therefore also carries into the next counter. Setting happens only while
// the clock is paused, so en and adj are never high together in use.
module min_sec_section
  import clock_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic       adj_ones,
  input  logic       adj_tens,
  output logic [3:0] ones,
  output logic [2:0] tens,
  output seg7_t      seg_ones,
  output seg7_t      seg_tens,
  output logic       carry
);

  logic ones_en, ones_carry, tens_en;

  assign ones_en = en ^ adj_ones;
  assign tens_en = ones_carry ^ adj_tens;

  counter_0_9 u_ones (.clk, .rst, .en(ones_en), .q(ones), .carry(ones_carry));
  counter_0_5 u_tens (.clk, .rst, .en(tens_en), .q(tens), .carry(carry));

  seg7_decoder u_dec_ones (.bcd(ones),         .seg(seg_ones));
  seg7_decoder u_dec_tens (.bcd({1'b0, tens}), .seg(seg_tens));

endmodule
