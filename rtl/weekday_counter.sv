// weekday_counter: counts the day 0..6 (Monday..Sunday), three JK flip-flops.
//
// A step happens on a clock edge with en=1; the top enables it when the
// 24-hour counter wraps to 0. The wrap 6 -> 0 is part of the J/K equations
// (excitation method), rather than a reset on reaching 7:
//   J0=~(Q1&Q2), K0=1   J1=Q0, K1=Q0|Q2   J2=Q0&Q1, K2=Q1
// Code 7 returns to 0. Reset clears to 0 (Monday).
module weekday_counter (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  output logic [2:0] q
);

  logic [2:0] j, k;

  always_comb begin
    j[0] = ~(q[1] & q[2]); k[0] = 1'b1;
    j[1] = q[0];           k[1] = q[0] | q[2];
    j[2] = q[0] & q[1];    k[2] = q[1];
  end

  for (genvar i = 0; i < 3; i++) begin : g_ff
    jk_ff u_ff (.clk, .rst, .en, .j(j[i]), .k(k[i]), .q(q[i]));
  end

endmodule
