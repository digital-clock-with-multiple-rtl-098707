// tb_mux2: self-checking testbench of the 2:1 multiplexer.
//
// Instantiates a 1-bit copy (as used for pausing) exhaustively and a 5-bit
// copy (the width of an hour) with 200 random vectors; y must equal d1 when
// s=1 and d0 when s=0.
module tb_mux2;

  logic       a0, a1, as, ay;
  logic [4:0] b0, b1, by;
  logic       bs;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(1)) dut1 (.d0(a0), .d1(a1), .s(as), .y(ay));
  mux2 #(.WIDTH(5)) dut5 (.d0(b0), .d1(b1), .s(bs), .y(by));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {as, a1, a0} = 3'(v);
      #1;
      checks++;
      if (ay !== (as ? a1 : a0)) begin failures++; $display("FAIL 1-bit s=%0b d1=%0b d0=%0b y=%0b", as, a1, a0, ay); end
    end
    for (int v = 0; v < 200; v++) begin
      b0 = 5'($urandom); b1 = 5'($urandom); bs = 1'($urandom);
      #1;
      checks++;
      if (by !== (bs ? b1 : b0)) begin failures++; $display("FAIL 5-bit s=%0b d1=%0d d0=%0d y=%0d", bs, b1, b0, by); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
