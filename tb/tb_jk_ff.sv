// tb_jk_ff: self-checking testbench of the JK flip-flop.
//
// Applies random J, K, enable and reset values for 1000 cycles and compares
// q after every rising edge with the JK characteristic table: 00 hold,
// 10 set, 01 clear, 11 toggle; en=0 holds; reset loads 0. Every one of the
// four J/K actions must have been exercised with en=1.
module tb_jk_ff;

  logic clk = 1'b0;
  logic rst, en, j, k, q;
  logic exp_q;
  int checks = 0, failures = 0;
  int seen [4];

  jk_ff dut (.clk, .rst, .en, .j, .k, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0; j = 1'b0; k = 1'b0;
    exp_q = 1'b0;
    @(negedge clk);
    for (int cyc = 0; cyc < 1000; cyc++) begin
      rst = ($urandom_range(0, 49) == 0);
      en  = ($urandom_range(0, 4) != 0);
      j   = 1'($urandom_range(0, 1));
      k   = 1'($urandom_range(0, 1));
      @(posedge clk);
      if (rst) exp_q = 1'b0;
      else if (en) begin
        seen[{j, k}]++;
        case ({j, k})
          2'b00: exp_q = exp_q;
          2'b10: exp_q = 1'b1;
          2'b01: exp_q = 1'b0;
          2'b11: exp_q = ~exp_q;
        endcase
      end
      @(negedge clk);
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL cycle %0d: j=%0b k=%0b en=%0b q=%0b expected %0b", cyc, j, k, en, q, exp_q);
      end
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL JK input %0d never applied", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
