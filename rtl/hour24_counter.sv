// hour24_counter: counts the hour 0..23 in binary with five JK flip-flops.
//
// A step happens on a clock edge with en=1; 23 -> 0 is built into the J/K
// equations (excitation method):
//   J0=K0=1  J1=K1=Q0  J2=K2=Q0&Q1  J3=Q0&Q1&Q2&~Q4, K3=Q0&Q1&Q2
//   J4=Q0&Q1&Q2&Q3, K4=Q0&Q1&Q2
// Unused codes 24..31 count up and return to 0. carry is high in the cycle
// the counter wraps 23 -> 0; it advances the weekday counter. Reset clears
// to 0.
module hour24_counter (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  output logic [4:0] q,
  output logic       carry
);

  logic [4:0] j, k;
  logic       q012;

  always_comb begin
    q012 = q[0] & q[1] & q[2];
    j[0] = 1'b1;                k[0] = 1'b1;
    j[1] = q[0];                k[1] = q[0];
    j[2] = q[0] & q[1];         k[2] = q[0] & q[1];
    j[3] = q012 & ~q[4];        k[3] = q012;
    j[4] = q012 & q[3];         k[4] = q012;
  end

  for (genvar i = 0; i < 5; i++) begin : g_ff
    jk_ff u_ff (.clk, .rst, .en, .j(j[i]), .k(k[i]), .q(q[i]));
  end

  assign carry = en & (q == 5'd23);

endmodule
