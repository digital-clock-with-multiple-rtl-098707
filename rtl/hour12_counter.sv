// hour12_counter: counts the hour 1..12 in binary with four JK flip-flops.
//
// One counter covers both display digits; the hour decoders split the
// binary value into tens and units. A step happens on a clock edge with
// en=1; 12 -> 1 is built into the J/K equations (excitation method):
//   J0=K0=1   J1=K1=Q0   J2=Q0&Q1, K2=Q0&Q1 | Q3   J3=Q0&Q1&Q2, K3=Q2
// Unused codes 0 and 13..15 return to the sequence. It runs in parallel with
// the 24-hour counter on the same enable. Reset loads 12 (this design's
// choice) so that it agrees with the 24-hour counter's 0 at midnight.
module hour12_counter (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  output logic [3:0] q
);

  logic [3:0] j, k;

  always_comb begin
    j[0] = 1'b1;                k[0] = 1'b1;
    j[1] = q[0];                k[1] = q[0];
    j[2] = q[0] & q[1];         k[2] = (q[0] & q[1]) | q[3];
    j[3] = q[0] & q[1] & q[2];  k[3] = q[2];
  end

  // Reset value 12 = 4'b1100.
  localparam logic [3:0] RESET_HOUR = 4'd12;

  for (genvar i = 0; i < 4; i++) begin : g_ff
    jk_ff #(.RESET_VAL(RESET_HOUR[i])) u_ff (.clk, .rst, .en, .j(j[i]), .k(k[i]), .q(q[i]));
  end

endmodule
