// tb_selection_system: self-checking testbench of the setting logic.
//
// Drives the select and increase buttons as levels that stay high or low for
// random stretches, and the pause switch. A model predicts the selection
// counter (one step per select press, 5 wraps to 0), the lamp outputs
// (led[sel] while paused) and the setting pulses (adj[sel] for one cycle
// per increase press, only while paused). Every selection must be seen and
// every one of the six setting outputs must have pulsed; presses while
// running must produce no pulse.
module tb_selection_system;

  logic       clk = 1'b0;
  logic       rst, pause, sel_btn, inc_btn;
  logic [2:0] sel;
  logic [7:0] adj, led;
  int checks = 0, failures = 0;
  int m_sel;
  logic prev_sel_btn, prev_inc_btn;
  int pulses [8];
  int blocked = 0;

  selection_system dut (.clk, .rst, .pause, .sel_btn, .inc_btn, .sel, .adj, .led);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; pause = 1'b0; sel_btn = 1'b0; inc_btn = 1'b0;
    m_sel = 0; prev_sel_btn = 1'b0; prev_inc_btn = 1'b0;
    @(negedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      logic [7:0] exp_adj, exp_led;
      if ($urandom_range(0, 2) == 0) sel_btn = ~sel_btn;
      if ($urandom_range(0, 1) == 0) inc_btn = ~inc_btn;
      if ($urandom_range(0, 49) == 0) pause = ~pause;
      #1;
      exp_adj = '0; exp_led = '0;
      if (pause) begin
        exp_led[m_sel] = 1'b1;
        if (inc_btn && !prev_inc_btn) begin exp_adj[m_sel] = 1'b1; pulses[m_sel]++; end
      end else if (inc_btn && !prev_inc_btn) blocked++;
      checks++;
      if (sel !== 3'(m_sel) || adj !== exp_adj || led !== exp_led) begin
        failures++;
        $display("FAIL cycle %0d: sel=%0d adj=%b led=%b expected %0d %b %b", cyc, sel, adj, led, m_sel, exp_adj, exp_led);
      end
      if (sel_btn && !prev_sel_btn) m_sel = (m_sel == 5) ? 0 : m_sel + 1;
      prev_sel_btn = sel_btn; prev_inc_btn = inc_btn;
      @(negedge clk);
    end
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (pulses[i] == 0) begin failures++; $display("FAIL setting output %0d never pulsed", i); end
    end
    checks++;
    if (blocked == 0) begin failures++; $display("FAIL no increase press while running"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
