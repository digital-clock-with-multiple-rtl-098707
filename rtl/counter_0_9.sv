// counter_0_9: synchronous decade counter 0..9 built from four JK flip-flops.
//
// Every flip-flop shares the clock; a count step happens on a clock edge with
// en=1. The J/K equations come from the excitation ("quick") method applied
// to the 0..9 state table; the wrap 9 -> 0 is part of those equations, so no
// reset is needed to shorten the sequence (unused codes 10..15 return to the
// sequence within two steps):
//   J0=K0=1   J1=Q0&~Q3, K1=Q0   J2=K2=Q0&Q1   J3=Q0&Q1&Q2, K3=Q0
// carry is high in the cycle in which the counter steps from 9 to 0; it is the
// count enable of the next counter (the tens digit), taking the place of the
// rippled clock of a breadboard build. Reset (synchronous) clears to 0.
module counter_0_9 (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  output logic [3:0] q,
  output logic       carry
);

  logic [3:0] j, k;

  always_comb begin
    j[0] = 1'b1;               k[0] = 1'b1;
    j[1] = q[0] & ~q[3];       k[1] = q[0];
    j[2] = q[0] & q[1];        k[2] = q[0] & q[1];
    j[3] = q[0] & q[1] & q[2]; k[3] = q[0];
  end

  for (genvar i = 0; i < 4; i++) begin : g_ff
    jk_ff u_ff (.clk, .rst, .en, .j(j[i]), .k(k[i]), .q(q[i]));
  end

  assign carry = en & (q == 4'd9);

endmodule
