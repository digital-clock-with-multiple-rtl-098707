// clock_pkg: types and constants shared by the digital clock.
//
// Seven-segment patterns are 7 bits {a,b,c,d,e,f,g}, segment a in the MSB,
// a 1 lighting the segment. The glyph set (6 and 9 drawn with tails, 7 drawn
// with segments a, b, c only) is the one used by the hour-digit decoders.
// The selection indices name the six sections the user can set while the
// clock is paused; their order is this design's choice.
package clock_pkg;

  typedef logic [6:0] seg7_t;

  localparam seg7_t SEG_BLANK = 7'b000_0000;
  localparam seg7_t SEG_0 = 7'b111_1110;
  localparam seg7_t SEG_1 = 7'b011_0000;
  localparam seg7_t SEG_2 = 7'b110_1101;
  localparam seg7_t SEG_3 = 7'b111_1001;
  localparam seg7_t SEG_4 = 7'b011_0011;
  localparam seg7_t SEG_5 = 7'b101_1011;
  localparam seg7_t SEG_6 = 7'b101_1111;
  localparam seg7_t SEG_7 = 7'b111_0000;
  localparam seg7_t SEG_8 = 7'b111_1111;
  localparam seg7_t SEG_9 = 7'b111_1011;

  // Days of the weekday counter: it counts Monday (0) to Sunday (6).
  typedef enum logic [2:0] {
    MONDAY, TUESDAY, WEDNESDAY, THURSDAY, FRIDAY, SATURDAY, SUNDAY
  } weekday_e;

  // Outputs of the setting demultiplexer (selection counter values 0..5).
  typedef enum logic [2:0] {
    SEL_SEC_ONES  = 3'd0,
    SEL_SEC_TENS  = 3'd1,
    SEL_MIN_ONES  = 3'd2,
    SEL_MIN_TENS  = 3'd3,
    SEL_HOUR      = 3'd4,
    SEL_WEEKDAY   = 3'd5
  } select_e;

  // Segment pattern of one decimal digit 0..9; other codes are blank.
  function automatic seg7_t digit_to_seg(input logic [3:0] d);
    case (d)
      4'd0: return SEG_0;
      4'd1: return SEG_1;
      4'd2: return SEG_2;
      4'd3: return SEG_3;
      4'd4: return SEG_4;
      4'd5: return SEG_5;
      4'd6: return SEG_6;
      4'd7: return SEG_7;
      4'd8: return SEG_8;
      4'd9: return SEG_9;
      default: return SEG_BLANK;
    endcase
  endfunction

endpackage
