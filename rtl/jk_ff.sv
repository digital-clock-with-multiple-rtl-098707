// jk_ff: rising-edge JK flip-flop, the storage element of every counter.
//
// On a clock edge with en=1: J=0,K=0 holds, J=1,K=0 sets, J=0,K=1 clears and
// J=1,K=1 toggles. With en=0 the state holds. rst (synchronous, active high)
// loads RESET_VAL and wins over en. The counters are JK based as in the
// original design; the enable input is this design's replacement for giving
// each counter its own rippled clock, so that everything runs on one clock.
module jk_ff #(
  parameter logic RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic j,
  input  logic k,
  output logic q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VAL;
    else if (en) q <= (j & ~q) | (~k & q);
  end

endmodule
