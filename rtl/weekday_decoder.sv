// weekday_decoder: 3-to-7 one-hot decoder for the weekday lamps.
//
// Combinational. led[d] is lit for day d (0 = Monday .. 6 = Sunday); code 7
// lights nothing, which is this design's choice (the counter never holds 7).
module weekday_decoder (
  input  logic [2:0] day,
  output logic [6:0] led
);

  always_comb begin
    led = '0;
    if (day != 3'd7) led[day] = 1'b1;
  end

endmodule
