// tb_time_ctrl -- self-checking test of the time controller.
//
// With RATE_DEFAULT = 10: no step while time is frozen; after start a step
// every 10 cycles exactly; after a rate write of 25, every 25; at rate 0 (full
// speed) every MIN_GAP = 3 cycles; no step while stall is high and the wait
// is counted in stall_cycles; stop freezes time; step 7 gives exactly seven
// steps and freezes time again; step 0 is ignored. A breakpoint freezes time
// right after the step that reaches its count, in RUN and in STEP mode, is
// used once, and is cleared by writing 0. evt_start/evt_stop must
// pulse once per transition, and the profile counters must match counts
// kept by the testbench. A final phase resets the controller and drives
// random commands, rates (0..12), breakpoints a few steps ahead and stall for 20,000 cycles, comparing every
// output in every cycle with a reference kept as a timeline: a step is due
// when time is running and at least max(MIN_GAP, rate) cycles have passed
// since the last one.
module tb_time_ctrl;
  logic clk = 0, rst_n;
  logic cmd_start, cmd_stop, cmd_step, rate_wr, stall, brk_wr;
  logic [31:0] brk_val;
  logic [15:0] step_n, steps_left;
  logic [31:0] rate_val, rate, step_count, active_cycles, stall_cycles;
  logic step_en, running, stepping, evt_start, evt_stop;
  int checks = 0, failures = 0;
  int n_steps = 0, n_active = 0, n_start = 0, n_stop = 0;
  int last_step = -1, cyc = 0, last_gap = 0;
  always #5 clk = ~clk;

  time_ctrl #(.RATE_DEFAULT(10)) dut (.*);

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (step_en) begin
        n_steps++;
        if (last_step >= 0) last_gap = cyc - last_step;
        last_step = cyc;
      end
      if (running || stepping) n_active++;
      if (evt_start) n_start++;
      if (evt_stop) n_stop++;
    end
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic cmd(string what, int arg = 0);
    case (what)
      "start": cmd_start = 1;
      "stop":  cmd_stop = 1;
      "step":  begin cmd_step = 1; step_n = 16'(arg); end
      "rate":  begin rate_wr = 1; rate_val = arg; end
      "brk":   begin brk_wr = 1; brk_val = arg; end
      default: ;
    endcase
    @(posedge clk); #1;
    cmd_start = 0; cmd_stop = 0; cmd_step = 0; rate_wr = 0; brk_wr = 0;
  endtask

  // wait for k steps and check every gap between them
  task automatic gaps(int k, int exp);
    int s0;
    s0 = n_steps;
    while (n_steps < s0 + 1) @(posedge clk);
    for (int i = 1; i < k; i++) begin
      s0 = n_steps;
      while (n_steps < s0 + 1) @(posedge clk);
      check(last_gap == exp, $sformatf("gap %0d expected %0d", last_gap, exp));
    end
    #1;
  endtask

  // reference for the random phase
  bit          rnd_on = 0;
  int          r_mode = 0, r_left = 0, r_last = -1_000_000, r_cyc = 0;
  int          n_rfire = 0, n_rstall = 0;
  logic [31:0] r_rate, r_steps, r_active, r_stalls;
  logic        r_step_en, r_evs, r_evp;
  bit          r_brk_on;
  logic [31:0] r_brk_at;
  int          n_rbrk = 0;
  always @(posedge clk) begin
    if (rnd_on) begin
      if (!rst_n) begin
        r_mode = 0; r_left = 0; r_last = -1_000_000; r_rate = 10;
        r_steps = 0; r_active = 0; r_stalls = 0;
        r_step_en = 0; r_evs = 0; r_evp = 0; r_brk_on = 0; r_brk_at = 0;
      end else begin
        bit act, due, fire, hit;
        int lim;
        checks++;
        if (step_en !== r_step_en || running !== (r_mode == 1) ||
            stepping !== (r_mode == 2) || evt_start !== r_evs ||
            evt_stop !== r_evp || rate !== r_rate || steps_left !== 16'(r_left) ||
            step_count !== r_steps || active_cycles !== r_active ||
            stall_cycles !== r_stalls) begin
          failures++;
          if (failures < 10)
            $display("FAIL: random cycle %0d: step_en %0b/%0b mode %0b%0b/%0d left %0d/%0d stalls %0d/%0d",
                     r_cyc, step_en, r_step_en, running, stepping, r_mode,
                     steps_left, r_left, stall_cycles, r_stalls);
        end
        act = (r_mode != 0);
        lim = (r_rate > 3) ? int'(r_rate) : 3;
        due = act && (r_cyc - r_last >= lim);
        fire = due && !stall && !cmd_stop;
        hit = fire && r_brk_on && (r_steps + 1 == r_brk_at);
        r_step_en = fire; r_evs = 0; r_evp = 0;
        if (brk_wr) begin r_brk_on = (brk_val != 0); r_brk_at = brk_val; end
        else if (hit) r_brk_on = 0;
        if (fire) begin r_last = r_cyc; r_steps++; n_rfire++; end
        if (act) r_active++;
        if (due && stall) begin r_stalls++; n_rstall++; end
        if (rate_wr) r_rate = rate_val;
        if (cmd_stop) begin
          if (act) r_evp = 1;
          r_mode = 0; r_left = 0;
        end else if (cmd_step && step_n != 0) begin
          if (!act) r_evs = 1;
          r_mode = 2; r_left = int'(step_n);
        end else if (cmd_start) begin
          if (!act) r_evs = 1;
          r_mode = 1; r_left = 0;
        end else if (hit) begin
          r_mode = 0; r_left = 0; r_evp = 1; n_rbrk++;
        end else if (r_mode == 2 && fire) begin
          r_left--;
          if (r_left == 0) begin r_mode = 0; r_evp = 1; end
        end
      end
      r_cyc++;
    end
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s0, st0;
    rst_n = 0; cmd_start = 0; cmd_stop = 0; cmd_step = 0; rate_wr = 0;
    brk_wr = 0; brk_val = 0;
    step_n = 0; rate_val = 0; stall = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(rate == 10, "default rate");
    repeat (50) @(posedge clk);
    #1 check(n_steps == 0, "frozen after reset");
    cmd("start");
    @(posedge clk); #1;
    check(running && n_start == 1, "running, start event");
    gaps(8, 10);
    cmd("rate", 25);
    gaps(2, 25);          // the first gap may be shorter
    gaps(5, 25);
    cmd("rate", 0);
    gaps(2, 3);
    gaps(10, 3);
    // stall
    stall = 1;
    s0 = n_steps;
    st0 = stall_cycles;
    repeat (40) @(posedge clk);
    #1;
    check(n_steps <= s0 + 1, "no steps under stall");
    check(stall_cycles - st0 >= 35, $sformatf("stall counted %0d", stall_cycles - st0));
    stall = 0;
    s0 = n_steps;
    repeat (3) @(posedge clk);
    #1 check(n_steps == s0 + 1, "step right after stall");
    cmd("stop");
    check(!running && !stepping, "stopped");
    s0 = n_steps;
    repeat (30) @(posedge clk);
    #1;
    check(n_steps == s0, "frozen after stop");
    check(n_stop == 1, "stop event");
    // step 7
    cmd("rate", 4);
    cmd("step", 0);
    check(!stepping, "step 0 ignored");
    cmd("step", 7);
    @(posedge clk); #1;
    check(stepping && steps_left >= 6 && n_start == 2, "stepping 7");
    repeat (60) @(posedge clk);
    #1;
    check(n_steps == s0 + 7, $sformatf("seven steps, got %0d", n_steps - s0));
    check(!stepping && !running && n_stop == 2, "frozen after stepping");
    check(step_count == n_steps, "profile step count");
    check(active_cycles == n_active, $sformatf("profile active %0d vs %0d", active_cycles, n_active));
    // stop in the middle of stepping
    s0 = n_steps;
    cmd("step", 100);
    repeat (10) @(posedge clk);
    #1 cmd("stop");
    repeat (20) @(posedge clk);
    #1;
    check(n_steps - s0 >= 2 && n_steps - s0 <= 4, "stop interrupts step");
    check(n_stop == 3, "stop event after interrupted step");
    // breakpoint while running
    s0 = int'(step_count);
    cmd("brk", s0 + 6);
    cmd("start");
    repeat (100) @(posedge clk);
    #1;
    check(step_count == 32'(s0 + 6) && !running && n_stop == 4,
          $sformatf("break while running: %0d steps", int'(step_count) - s0));
    cmd("start");                 // used up: runs on past it
    repeat (40) @(posedge clk);
    #1 cmd("stop");
    check(step_count > 32'(s0 + 10), "breakpoint used once");
    // breakpoint inside a STEP count
    s0 = int'(step_count);
    cmd("brk", s0 + 3);
    cmd("step", 10);
    repeat (80) @(posedge clk);
    #1;
    check(step_count == 32'(s0 + 3) && !stepping && steps_left == 0,
          $sformatf("break inside step: %0d steps", int'(step_count) - s0));
    // cleared breakpoint
    s0 = int'(step_count);
    cmd("brk", s0 + 2);
    cmd("brk", 0);
    cmd("step", 5);
    repeat (80) @(posedge clk);
    #1 check(step_count == 32'(s0 + 5), "breakpoint cleared by 0");
    // random phase against the reference
    rnd_on = 1;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      int r;
      r = $urandom_range(0, 99);
      cmd_start = (r < 3);
      cmd_stop  = (r >= 3 && r < 5) || (r == 99);
      cmd_step  = (r >= 5 && r < 8) || (r == 99);
      step_n    = 16'($urandom_range(0, 6));
      rate_wr   = ($urandom_range(0, 49) == 0);
      rate_val  = $urandom_range(0, 12);
      brk_wr    = ($urandom_range(0, 59) == 0);
      brk_val   = ($urandom_range(0, 7) == 0) ? 0 : step_count + $urandom_range(0, 8);
      if ($urandom_range(0, 9) == 0) stall = ~stall;
      @(posedge clk); #1;
    end
    cmd_start = 0; cmd_stop = 0; cmd_step = 0; rate_wr = 0; stall = 0; brk_wr = 0;
    check(n_rfire > 1000 && n_rstall > 500 && n_rbrk > 20,
          $sformatf("random phase covered %0d steps, %0d stalled cycles, %0d breaks",
                    n_rfire, n_rstall, n_rbrk));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
