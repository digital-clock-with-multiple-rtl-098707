// digital_clock_top: digital clock with 12/24-hour format, weekday and setting.
//
// Structure (all on one clock, clk; every counter steps on a count enable):
//   tick --[pause mux]--> seconds section --carry--> minutes section
//        --carry--> 12-hour and 24-hour counters in parallel
//        --24-hour wrap--> weekday counter
// * tick is a one-cycle pulse, once per second. The pause multiplexer puts
//   ground in its place while pause=1, freezing the clock.
// * The 12-hour (1..12) and 24-hour (0..23) counters always advance together;
//   the format selector shows one of them (fmt_12h=1: 12-hour) on the two hour
//   displays through the units and tens hour decoders.
// * The weekday counter (0 = Monday) advances when the 24-hour counter wraps
//   23 -> 0 and lights one of seven lamps.
// * While paused, the selection system steps the selected section by one per
//   press of inc_btn. The setting pulse is XORed onto that counter's enable,
//   so a wrap carries into the next section exactly as a normal count does.
//   sel_led shows the selected section while paused.
// Outputs change on the clock edge that ends the cycle in which tick (or a
// setting press) is high; the segment outputs follow combinationally.
// The structure follows the original circuit; the single clock with count
// enables in place of rippled clocks, the reset values, the section order of
// the selection counter and the button edge detection are this design's.
module digital_clock_top
  import clock_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic           tick,
  input  logic           pause,
  input  logic           fmt_12h,
  input  logic           sel_btn,
  input  logic           inc_btn,
  output logic [3:0]     sec_ones,
  output logic [2:0]     sec_tens,
  output logic [3:0]     min_ones,
  output logic [2:0]     min_tens,
  output logic [4:0]     hour_bin,
  output logic [4:0]     hour24,
  output logic [3:0]     hour12,
  output logic [2:0]     weekday,
  output seg7_t [5:0]    seg,
  output logic [6:0]     day_led,
  output logic [2:0]     sel,
  output logic [7:0]     sel_led
);

  logic       tick_g;
  logic       sec_carry, min_carry, h24_carry;
  logic       hour_en, day_en;
  logic [7:0] adj;

  // Pause: input 0 is the tick, input 1 is ground.
  mux2 #(.WIDTH(1)) u_pause_mux (.d0(tick), .d1(1'b0), .s(pause), .y(tick_g));

  selection_system u_select (
    .clk, .rst, .pause, .sel_btn, .inc_btn,
    .sel, .adj, .led(sel_led)
  );

  min_sec_section u_seconds (
    .clk, .rst, .en(tick_g),
    .adj_ones(adj[SEL_SEC_ONES]), .adj_tens(adj[SEL_SEC_TENS]),
    .ones(sec_ones), .tens(sec_tens),
    .seg_ones(seg[0]), .seg_tens(seg[1]), .carry(sec_carry)
  );

  min_sec_section u_minutes (
    .clk, .rst, .en(sec_carry),
    .adj_ones(adj[SEL_MIN_ONES]), .adj_tens(adj[SEL_MIN_TENS]),
    .ones(min_ones), .tens(min_tens),
    .seg_ones(seg[2]), .seg_tens(seg[3]), .carry(min_carry)
  );

  assign hour_en = min_carry ^ adj[SEL_HOUR];

  hour12_counter u_h12 (.clk, .rst, .en(hour_en), .q(hour12));
  hour24_counter u_h24 (.clk, .rst, .en(hour_en), .q(hour24), .carry(h24_carry));

  format_selector u_format (.h24(hour24), .h12(hour12), .fmt_12h, .hour(hour_bin));

  hour_ones_decoder u_hour_ones (.bin(hour_bin), .seg(seg[4]));
  hour_tens_decoder u_hour_tens (.bin(hour_bin), .seg(seg[5]));

  assign day_en = h24_carry ^ adj[SEL_WEEKDAY];

  weekday_counter u_day     (.clk, .rst, .en(day_en), .q(weekday));
  weekday_decoder u_day_dec (.day(weekday), .led(day_led));

  // The two hour counters must always show the same time of day.
  assert property (@(posedge clk) disable iff (rst)
    hour12 == ((hour24 == 5'd0) ? 4'd12 : (hour24 > 5'd12) ? 4'(hour24 - 5'd12) : hour24[3:0]));

endmodule
