// demux_1to8: 1-to-8 demultiplexer with enable.
//
// Combinational. f[s] = en & din and every other output is 0; with en=0 all
// outputs are 0. The select bus is {s0,s1,s2} with s0 the most significant
// bit, so s=3'b001 selects f1.
module demux_1to8 (
  input  logic       en,
  input  logic       din,
  input  logic [2:0] s,
  output logic [7:0] f
);

  always_comb begin
    f    = '0;
    f[s] = en & din;
  end

endmodule
