// mux2: 2:1 multiplexer, y = s ? d1 : d0, WIDTH bits wide.
//
// Combinational. One instance pauses the clock (the tick on input 0, ground
// on input 1); five one-bit instances form the hour format selector.
module mux2 #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             s,
  output logic [WIDTH-1:0] y
);

  always_comb y = s ? d1 : d0;

endmodule
