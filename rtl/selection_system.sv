// selection_system: lets the user pick a section and step it while paused.
//
// A 0..5 selection counter advances once per press of the select button.
// Its value drives two 1-to-8 demultiplexers:
//   * the setting demultiplexer routes an increase-button press to output
//     adj[sel]; it is enabled only while the clock is paused;
//   * the lamp demultiplexer has a constant 1 as data input, so led[sel] is
//     lit to show which section is selected.
// Section order (clock_pkg::select_e) is this design's choice: seconds ones,
// seconds tens, minutes ones, minutes tens, hours, weekday; outputs 6 and 7
// are never selected.
//
// Buttons are clean levels synchronous to clk (debouncing and synchronising
// are outside this block). A press is detected on its rising edge: adj[sel]
// is high for the one cycle in which inc_btn is first seen high, and sel
// steps on the clock edge that ends the cycle in which sel_btn is first seen
// high (5 wraps to 0). The lamp demultiplexer is enabled by
// pause too (this design's choice). One selection counter serves both
// demultiplexers; a second counter on the same clock would always hold the
// same value.
module selection_system
  import clock_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       pause,
  input  logic       sel_btn,
  input  logic       inc_btn,
  output logic [2:0] sel,
  output logic [7:0] adj,
  output logic [7:0] led
);

  logic sel_btn_q, inc_btn_q;
  logic sel_press, inc_press;
  logic sel_carry;

  always_ff @(posedge clk) begin
    if (rst) begin
      sel_btn_q <= 1'b0;
      inc_btn_q <= 1'b0;
    end else begin
      sel_btn_q <= sel_btn;
      inc_btn_q <= inc_btn;
    end
  end

  assign sel_press = sel_btn & ~sel_btn_q;
  assign inc_press = inc_btn & ~inc_btn_q;

  counter_0_5 u_sel_cnt (.clk, .rst, .en(sel_press), .q(sel), .carry(sel_carry));

  demux_1to8 u_set_dmux (.en(pause), .din(inc_press), .s(sel), .f(adj));
  demux_1to8 u_led_dmux (.en(pause), .din(1'b1),      .s(sel), .f(led));

  // Selections 6 and 7 are unreachable.
  assert property (@(posedge clk) disable iff (rst) sel <= 3'(SEL_WEEKDAY));
  // A setting pulse only ever appears while paused.
  assert property (@(posedge clk) disable iff (rst) (adj != '0) |-> pause);

endmodule
