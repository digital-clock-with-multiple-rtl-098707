// tb_logging_run: repeats the logged bench run of the clock.
//
// The run watches the tens digit of the seconds and the units digit of the
// minutes while the clock runs, is paused and is set:
//   1. Running: the minutes units digit must stay constant except on the
//      step where the seconds tens digit goes from 5 (3'b101) to 0, where it
//      must advance by one; the run covers 200 seconds (three such steps).
//   2. Paused: ticks keep arriving but neither digit may change, unless the
//      increase button is pressed; with the seconds tens digit selected,
//      each press advances that digit by one and nothing else.
//   3. Resumed: counting continues from the set value.
// The tick arrives every other cycle, like the bench clock that needs two
// level changes per count.
module tb_logging_run;

  logic clk = 1'b0;
  logic rst, tick, pause, fmt_12h, sel_btn, inc_btn;
  logic [3:0] sec_ones, min_ones, hour12;
  logic [2:0] sec_tens, min_tens, weekday, sel;
  logic [4:0] hour_bin, hour24;
  logic [5:0][6:0] seg;
  logic [6:0] day_led;
  logic [7:0] sel_led;
  int checks = 0, failures = 0;
  int minute_steps = 0, set_steps = 0;

  digital_clock_top dut (
    .clk, .rst, .tick, .pause, .fmt_12h, .sel_btn, .inc_btn,
    .sec_ones, .sec_tens, .min_ones, .min_tens, .hour_bin, .hour24, .hour12,
    .weekday, .seg, .day_led, .sel, .sel_led
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs n cycles with a tick every other cycle; checks the minute rule.
  task automatic run(int n);
    logic [2:0] st_old;
    logic [3:0] mo_old;
    for (int i = 0; i < n; i++) begin
      tick = i[0];
      st_old = sec_tens; mo_old = min_ones;
      @(negedge clk);
      checks++;
      if (st_old == 3'b101 && sec_tens == 3'b000) begin
        minute_steps++;
        if (min_ones !== 4'(mo_old + 4'd1)) begin
          failures++;
          $display("FAIL minutes %0d -> %0d at the seconds wrap", mo_old, min_ones);
        end
      end else if (min_ones !== mo_old) begin
        failures++;
        $display("FAIL minutes changed %0d -> %0d with seconds tens %0d -> %0d", mo_old, min_ones, st_old, sec_tens);
      end
    end
    tick = 1'b0;
  endtask

  initial begin
    logic [2:0] st_hold;
    logic [3:0] so_hold, mo_hold;
    rst = 1'b1; tick = 1'b0; pause = 1'b0; fmt_12h = 1'b0; sel_btn = 1'b0; inc_btn = 1'b0;
    @(negedge clk);
    rst = 1'b0;
    run(2 * 200);
    checks++;
    if (minute_steps != 3 || min_ones !== 4'd3 || sec_tens !== 3'd2 || sec_ones !== 4'd0) begin
      failures++;
      $display("FAIL after 200 s: %0d:%0d%0d, %0d minute steps", min_ones, sec_tens, sec_ones, minute_steps);
    end
    // Pause, select the seconds tens digit (selection 1).
    pause = 1'b1;
    sel_btn = 1'b1; @(negedge clk); sel_btn = 1'b0; @(negedge clk);
    checks++;
    if (sel !== 3'd1 || sel_led !== 8'b0000_0010) begin failures++; $display("FAIL selection %0d lamps %b", sel, sel_led); end
    st_hold = sec_tens; so_hold = sec_ones; mo_hold = min_ones;
    for (int i = 0; i < 60; i++) begin
      tick = ~tick;
      @(negedge clk);
      checks++;
      if (sec_tens !== st_hold || sec_ones !== so_hold || min_ones !== mo_hold) begin
        failures++;
        $display("FAIL paused clock moved");
      end
    end
    tick = 1'b0;
    // Five presses: 2 -> 3 -> 4 -> 5 -> 0 (carry into minutes) -> 1.
    for (int p = 0; p < 5; p++) begin
      inc_btn = 1'b1; @(negedge clk);
      inc_btn = 1'b0; @(negedge clk);
      set_steps++;
    end
    checks++;
    if (sec_tens !== 3'd1 || sec_ones !== so_hold || min_ones !== 4'(mo_hold + 4'd1)) begin
      failures++;
      $display("FAIL after setting: %0d:%0d%0d", min_ones, sec_tens, sec_ones);
    end
    // Resume.
    pause = 1'b0;
    minute_steps = 0;
    run(2 * 60);
    checks++;
    if (minute_steps != 1 || sec_tens !== 3'd1) begin
      failures++;
      $display("FAIL after resuming: %0d:%0d%0d", min_ones, sec_tens, sec_ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
