// tb_digital_clock_top: end-to-end test of the digital clock.
//
// Runs the clock at its default configuration through one complete week
// (7 x 86400 ticks, a tick in every cycle) followed by a random mix of
// ticks, pausing, format switching and setting. A cycle-level model of the
// clock (digits of seconds and minutes, 24-hour and 12-hour counters,
// weekday, selection counter and button edge detection) predicts every
// output in every cycle, including all six seven-segment patterns and the
// lamps. The model is written from the behaviour, not from the RTL's
// structure.
//
// Mechanisms that must each happen at least once (a failure is counted for
// any that never does): seconds carry into minutes, minutes carry into
// hours, 12-hour wrap 12 -> 1, 24-hour wrap 23 -> 0 advancing the weekday,
// weekday wrap Sunday -> Monday, a tick swallowed by pause, a format switch
// while running, a setting step of each of the six sections, a setting step
// that carries into the next section, and an increase press ignored because
// the clock was running.
module tb_digital_clock_top;

  logic clk = 1'b0;
  logic rst, tick, pause, fmt_12h, sel_btn, inc_btn;
  logic [3:0] sec_ones, min_ones, hour12;
  logic [2:0] sec_tens, min_tens, weekday, sel;
  logic [4:0] hour_bin, hour24;
  logic [6:0] seg [6];
  logic [5:0][6:0] seg_bus;
  logic [6:0] day_led;
  logic [7:0] sel_led;

  digital_clock_top dut (
    .clk, .rst, .tick, .pause, .fmt_12h, .sel_btn, .inc_btn,
    .sec_ones, .sec_tens, .min_ones, .min_tens, .hour_bin, .hour24, .hour12,
    .weekday, .seg(seg_bus), .day_led, .sel, .sel_led
  );

  always_comb for (int i = 0; i < 6; i++) seg[i] = seg_bus[i];

  always #5 clk = ~clk;

  localparam int WEEK = 7 * 24 * 60 * 60;
  localparam logic [6:0] GLYPH [10] = '{7'h7E, 7'h30, 7'h6D, 7'h79, 7'h33,
                                        7'h5B, 7'h5F, 7'h70, 7'h7F, 7'h7B};

  int checks = 0, failures = 0;

  // Model state.
  int m_s1, m_s10, m_m1, m_m10, m_h24, m_h12, m_day, m_sel;
  logic prev_sel_btn, prev_inc_btn;

  // Mechanism counters.
  typedef enum int {
    EV_SEC_CARRY, EV_MIN_CARRY, EV_H12_WRAP, EV_H24_WRAP, EV_DAY_WRAP,
    EV_PAUSED_TICK, EV_FMT_SWITCH, EV_SET0, EV_SET1, EV_SET2, EV_SET3,
    EV_SET4, EV_SET5, EV_SET_CARRY, EV_INC_IGNORED, EV_COUNT
  } event_e;
  int events [EV_COUNT];
  string ev_name [EV_COUNT] = '{"seconds carry", "minutes carry", "12-hour wrap",
    "24-hour wrap", "weekday wrap", "tick while paused", "format switch",
    "set seconds ones", "set seconds tens", "set minutes ones", "set minutes tens",
    "set hours", "set weekday", "setting carry", "increase while running"};

  initial begin
    repeat (WEEK + 400_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Advance one counter of the model; returns 1 on its wrap.
  function automatic bit bump(ref int v, input int lo, input int hi);
    if (v == hi) begin v = lo; return 1'b1; end
    v++;
    return 1'b0;
  endfunction

  // Model of one clock edge, given the inputs seen in this cycle.
  task automatic model_step();
    bit tick_g, inc_press, sel_press, c, setc;
    bit [7:0] a;
    bit hour_en;
    tick_g    = tick && !pause;
    inc_press = inc_btn && !prev_inc_btn;
    sel_press = sel_btn && !prev_sel_btn;
    a = '0;
    if (pause && inc_press) begin
      a[m_sel] = 1'b1;
      events[EV_SET0 + m_sel]++;
    end else if (inc_press) events[EV_INC_IGNORED]++;
    if (tick && pause) events[EV_PAUSED_TICK]++;
    setc = 1'b0;
    c = (tick_g ^ a[0]) ? bump(m_s1, 0, 9) : 1'b0;
    if (c && a[0]) setc = 1'b1;
    c = (c ^ a[1]) ? bump(m_s10, 0, 5) : 1'b0;
    if (c) events[EV_SEC_CARRY]++;
    if (c && (a[0] || a[1])) setc = 1'b1;
    c = (c ^ a[2]) ? bump(m_m1, 0, 9) : 1'b0;
    if (c && a[2]) setc = 1'b1;
    c = (c ^ a[3]) ? bump(m_m10, 0, 5) : 1'b0;
    if (c) events[EV_MIN_CARRY]++;
    if (c && (a[2] || a[3])) setc = 1'b1;
    hour_en = c ^ a[4];
    c = 1'b0;
    if (hour_en) begin
      if (bump(m_h12, 1, 12)) events[EV_H12_WRAP]++;
      c = bump(m_h24, 0, 23);
      if (c) events[EV_H24_WRAP]++;
      if (c && a[4]) setc = 1'b1;
    end
    if (c ^ a[5]) begin
      if (bump(m_day, 0, 6)) events[EV_DAY_WRAP]++;
    end
    if (setc) events[EV_SET_CARRY]++;
    if (sel_press) m_sel = (m_sel == 5) ? 0 : m_sel + 1;
    prev_sel_btn = sel_btn;
    prev_inc_btn = inc_btn;
  endtask

  task automatic compare(string phase, int cyc);
    int hb;
    logic [6:0] exp_led7;
    logic [7:0] exp_sel_led;
    hb = fmt_12h ? m_h12 : m_h24;
    exp_led7 = 7'(1 << m_day);
    exp_sel_led = pause ? 8'(1 << m_sel) : 8'b0;
    checks++;
    if (sec_ones !== 4'(m_s1) || sec_tens !== 3'(m_s10) || min_ones !== 4'(m_m1) ||
        min_tens !== 3'(m_m10) || hour24 !== 5'(m_h24) || hour12 !== 4'(m_h12) ||
        hour_bin !== 5'(hb) || weekday !== 3'(m_day) || sel !== 3'(m_sel) ||
        seg[0] !== GLYPH[m_s1] || seg[1] !== GLYPH[m_s10] || seg[2] !== GLYPH[m_m1] ||
        seg[3] !== GLYPH[m_m10] || seg[4] !== GLYPH[hb % 10] || seg[5] !== GLYPH[hb / 10] ||
        day_led !== exp_led7 || sel_led !== exp_sel_led) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s cycle %0d: day %0d %0d:%0d%0d:%0d%0d (12h %0d, shown %0d) sel %0d; expected day %0d %0d:%0d%0d:%0d%0d (12h %0d, shown %0d) sel %0d",
                 phase, cyc, weekday, hour24, min_tens, min_ones, sec_tens, sec_ones, hour12, hour_bin, sel,
                 m_day, m_h24, m_m10, m_m1, m_s10, m_s1, m_h12, hb, m_sel);
    end
  endtask

  initial begin
    bit old_fmt;
    rst = 1'b1; tick = 1'b0; pause = 1'b0; fmt_12h = 1'b0; sel_btn = 1'b0; inc_btn = 1'b0;
    m_s1 = 0; m_s10 = 0; m_m1 = 0; m_m10 = 0; m_h24 = 0; m_h12 = 12; m_day = 0; m_sel = 0;
    prev_sel_btn = 1'b0; prev_inc_btn = 1'b0;
    @(negedge clk);
    rst = 1'b0;
    #1 compare("reset", 0);

    // Phase 1: one full week, one tick per cycle; the format toggle flips
    // every 5000 seconds. The clock must be back at Monday 00:00:00.
    tick = 1'b1;
    for (int cyc = 0; cyc < WEEK; cyc++) begin
      old_fmt = fmt_12h;
      if (cyc % 5000 == 4999) fmt_12h = ~fmt_12h;
      if (fmt_12h != old_fmt) events[EV_FMT_SWITCH]++;
      model_step();
      @(negedge clk);
      compare("week", cyc);
    end
    checks++;
    if (weekday != 3'd0 || hour24 != 5'd0 || min_tens != 3'd0 || min_ones != 4'd0 ||
        sec_tens != 3'd0 || sec_ones != 4'd0) begin
      failures++;
      $display("FAIL after %0d ticks the clock is not back at Monday 00:00:00", WEEK);
    end

    // Phase 2: random ticks, pausing, format switching and setting.
    for (int cyc = 0; cyc < 300_000; cyc++) begin
      old_fmt = fmt_12h;
      tick = ($urandom_range(0, 3) != 0);
      if ($urandom_range(0, 299) == 0) pause = ~pause;
      if ($urandom_range(0, 999) == 0) fmt_12h = ~fmt_12h;
      if (!pause && fmt_12h != old_fmt) events[EV_FMT_SWITCH]++;
      if ($urandom_range(0, 19) == 0) sel_btn = ~sel_btn;
      if ($urandom_range(0, 2) == 0) inc_btn = ~inc_btn;
      model_step();
      @(negedge clk);
      compare("mix", cyc);
    end

    foreach (events[i]) begin
      checks++;
      $display("mechanism %-24s happened %0d times", ev_name[i], events[i]);
      if (events[i] == 0) begin
        failures++;
        $display("FAIL mechanism '%s' never happened", ev_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
