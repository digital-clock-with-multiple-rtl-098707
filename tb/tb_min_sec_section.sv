// tb_min_sec_section: self-checking testbench of one base-60 section.
//
// First, with en high every cycle, the section must produce its carry
// exactly once per 60 enabled cycles (the 59 -> 00 step). Then random
// cycles mix count enables with setting pulses on the units and the tens
// counter; a behavioural model of two decimal digits (units 0..9 carrying
// into tens 0..5) predicts the digits, the carry and the segment patterns.
// A units setting pulse at 9 must carry into the tens, and a tens pulse at
// 5 must wrap to 0 and produce the carry.
module tb_min_sec_section;

  logic       clk = 1'b0;
  logic       rst, en, adj_ones, adj_tens;
  logic [3:0] ones;
  logic [2:0] tens;
  logic [6:0] seg_ones, seg_tens;
  logic       carry;
  int checks = 0, failures = 0;
  int m_ones, m_tens, exp_carry;
  int carries = 0, set_carries = 0;

  localparam logic [6:0] GLYPH [10] = '{7'h7E, 7'h30, 7'h6D, 7'h79, 7'h33,
                                        7'h5B, 7'h5F, 7'h70, 7'h7F, 7'h7B};

  min_sec_section dut (.clk, .rst, .en, .adj_ones, .adj_tens,
                       .ones, .tens, .seg_ones, .seg_tens, .carry);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model step: returns the carry out of the section for this cycle.
  function automatic int step(int e, int a1, int a10);
    int c1, c10;
    c1 = 0; c10 = 0;
    if (e ^ a1) begin
      if (m_ones == 9) begin m_ones = 0; c1 = 1; end else m_ones++;
    end
    if (c1 ^ a10) begin
      if (m_tens == 5) begin m_tens = 0; c10 = 1; end else m_tens++;
    end
    return c10;
  endfunction

  task automatic compare(int cyc);
    checks++;
    if (ones !== 4'(m_ones) || tens !== 3'(m_tens) ||
        seg_ones !== GLYPH[m_ones] || seg_tens !== GLYPH[m_tens]) begin
      failures++;
      $display("FAIL cycle %0d: %0d%0d expected %0d%0d (seg %h %h)", cyc, tens, ones, m_tens, m_ones, seg_tens, seg_ones);
    end
  endtask

  initial begin
    int run_carries;
    rst = 1'b1; en = 1'b0; adj_ones = 1'b0; adj_tens = 1'b0;
    m_ones = 0; m_tens = 0;
    @(negedge clk);
    rst = 1'b0;
    // Rate: 120 enabled cycles give exactly two carries, at cycles 60 and 120.
    en = 1'b1;
    run_carries = 0;
    for (int i = 1; i <= 120; i++) begin
      #1;
      if (carry) begin
        run_carries++;
        checks++;
        if (i % 60 != 0) begin failures++; $display("FAIL carry at enabled cycle %0d", i); end
      end
      void'(step(1, 0, 0));
      @(negedge clk);
    end
    checks++;
    if (run_carries != 2) begin failures++; $display("FAIL %0d carries in 120 steps", run_carries); end
    compare(-1);
    // Random mix of counting and setting.
    for (int cyc = 0; cyc < 8000; cyc++) begin
      int r;
      r = $urandom_range(0, 9);
      en = (r < 5); adj_ones = (r == 6); adj_tens = (r == 7);
      #1;
      exp_carry = step(int'(en), int'(adj_ones), int'(adj_tens));
      checks++;
      if (carry !== 1'(exp_carry)) begin
        failures++;
        $display("FAIL cycle %0d: carry=%0b expected %0d", cyc, carry, exp_carry);
      end
      if (exp_carry != 0) begin
        carries++;
        if (!en) set_carries++;
      end
      @(negedge clk);
      compare(cyc);
    end
    checks++;
    if (carries == 0 || set_carries == 0) begin
      failures++;
      $display("FAIL carries=%0d of which from setting=%0d", carries, set_carries);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
