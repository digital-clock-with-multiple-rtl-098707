// format_selector: chooses which hour counter is shown.
//
// Five one-bit 2:1 multiplexers, one per hour bit, share the format toggle as
// select: 0 shows the 24-hour counter, 1 the 12-hour counter. The 12-hour
// counter has four bits; its missing fifth bit is 0. Combinational.
module format_selector (
  input  logic [4:0] h24,
  input  logic [3:0] h12,
  input  logic       fmt_12h,
  output logic [4:0] hour
);

  logic [4:0] h12_ext;
  assign h12_ext = {1'b0, h12};

  for (genvar i = 0; i < 5; i++) begin : g_mux
    mux2 #(.WIDTH(1)) u_mux (.d0(h24[i]), .d1(h12_ext[i]), .s(fmt_12h), .y(hour[i]));
  end

endmodule
