// tb_counter_0_9: self-checking testbench of the decade counter 0..9.
//
// Drives a random count enable (and an occasional reset) for 2000 cycles and
// compares the state after every clock edge with a behavioural model: the
// value steps by one per enabled edge and returns from 9 to 0. The carry output must be high exactly in the enabled cycles that hold 9.
// It also checks that a full cycle through the sequence takes 10 enabled edges.
module tb_counter_0_9;

  logic clk = 1'b0;
  logic rst, en;
  logic [3:0] q;
  logic carry;
  int checks = 0, failures = 0;
  int exp_q;
  int wraps = 0;

  counter_0_9 dut (.clk, .rst, .en, .q, .carry(carry));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0;
    exp_q = 0;
    @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    checks++;
    if (q !== 4'd0) begin failures++; $display("FAIL reset value %0d", q); end
    // One full sequence with en held high: count the enabled edges to return.
    en = 1'b1;
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
    end
    checks++;
    if (q !== 4'd0) begin failures++; $display("FAIL period: q=%0d after 10 steps", q); end
    // Random enables and resets.
    for (int cyc = 0; cyc < 2000; cyc++) begin
      en  = ($urandom_range(0, 3) != 0);
      rst = ($urandom_range(0, 199) == 0);
      #1;
      checks++;
      if (carry !== (en && exp_q == 4'd9)) begin
        failures++;
        $display("FAIL carry: q=%0d en=%0b carry=%0b", q, en, carry);
      end
      @(posedge clk);
      if (rst) exp_q = 0;
      else if (en) begin
        if (exp_q == 9) begin exp_q = 0; wraps++; end
        else exp_q = exp_q + 1;
      end
      @(negedge clk);
      checks++;
      if (q !== 4'(exp_q)) begin
        failures++;
        $display("FAIL cycle %0d: q=%0d expected %0d", cyc, q, exp_q);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL the counter never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
