// counter_0_5: synchronous 0..5 counter built from three JK flip-flops.
//
// Used for the tens digit of seconds and minutes and as the selection counter
// of the setting logic. A count step happens on a clock edge with en=1. The
// J/K equations (excitation method on the 0..5 state table) wrap 5 -> 0
// directly; unused codes 6 and 7 return to the sequence:
//   J0=K0=1   J1=Q0&~Q2, K1=Q0   J2=Q0&Q1, K2=Q0
// carry is high in the cycle in which the counter steps from 5 to 0 and feeds
// the next counter's enable. Reset (synchronous) clears to 0.
module counter_0_5 (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  output logic [2:0] q,
  output logic       carry
);

  logic [2:0] j, k;

  always_comb begin
    j[0] = 1'b1;         k[0] = 1'b1;
    j[1] = q[0] & ~q[2]; k[1] = q[0];
    j[2] = q[0] & q[1];  k[2] = q[0];
  end

  for (genvar i = 0; i < 3; i++) begin : g_ff
    jk_ff u_ff (.clk, .rst, .en, .j(j[i]), .k(k[i]), .q(q[i]));
  end

  assign carry = en & (q == 3'd5);

endmodule
