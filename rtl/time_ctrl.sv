// time_ctrl -- time-granular execution control of the mockup.
//
// Decides when the next simulated time step happens. Time is frozen (IDLE)
// until a start command, which lets it run (RUN) until a stop command; a
// step command with count N > 0 advances exactly N time steps (STEP) and
// freezes time again. While time runs, a step_en pulse is issued every
// `rate` clock cycles (rate is written by the debugger; 0 or any value below
// the minimum means full speed), so simulated time can go slower or faster
// than real time. A step is held back while stall is high, i.e. while the
// serial links are still delivering the previous sample, so the ventilator
// never misses one. Start, stop and step are from the source; rate-as-cycle
// count, the stall rule and the counters are this design's choices.
//
// Timing: step_en is a registered one-cycle pulse. The decision for a step is
// not taken in the two cycles after a step_en, which leaves the consumers of
// that step time to raise stall; the minimum step interval is MIN_GAP = 3
// cycles. evt_start / evt_stop pulse when time starts or stops running (for
// the sync channel). Profile counters: step_count (time steps taken),
// active_cycles (cycles with time running) and stall_cycles (cycles a due
// step waited on stall). Commands in the same cycle: stop wins over step,
// step over start.
//
// Breakpoint: brk_wr loads brk_val. A non-zero value arms a breakpoint in
// simulated time: the step that makes step_count equal to it is taken and
// time freezes right after it, as if a stop had come (evt_stop pulses), in
// RUN as in STEP mode. The breakpoint then disarms itself; 0 disarms it. A
// start, stop or step command in the same cycle as that step takes
// precedence. The source's debugger sets breaks on the time axis and steps
// from there; tying the break to the step count is this design's choice.
module time_ctrl #(
  parameter int unsigned RATE_DEFAULT = 390_625  // 100 MHz / 256: real time
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_start,
  input  logic        cmd_stop,
  input  logic        cmd_step,
  input  logic [15:0] step_n,
  input  logic        rate_wr,
  input  logic [31:0] rate_val,
  input  logic        brk_wr,
  input  logic [31:0] brk_val,
  input  logic        stall,
  output logic        step_en,
  output logic        running,
  output logic        stepping,
  output logic        evt_start,
  output logic        evt_stop,
  output logic [31:0] rate,
  output logic [15:0] steps_left,
  output logic [31:0] step_count,
  output logic [31:0] active_cycles,
  output logic [31:0] stall_cycles
);

  localparam int unsigned MIN_GAP = 3;

  typedef enum logic [1:0] {M_IDLE, M_RUN, M_STEP} mode_e;

  mode_e       mode;
  logic [31:0] since;      // cycles since the last step_en, saturating
  logic        active;
  logic        due;        // interval elapsed and the pipeline is clear
  logic        fire;
  logic        brk_on;     // a breakpoint is armed
  logic [31:0] brk_at;     // step count at which time freezes
  logic        brk_hit;    // this step reaches the breakpoint

  assign active   = (mode != M_IDLE);
  assign running  = (mode == M_RUN);
  assign stepping = (mode == M_STEP);

  always_comb begin
    due  = active && (since >= 32'(MIN_GAP - 1)) &&
           ({1'b0, since} + 33'd1 >= {1'b0, rate});
    fire = due && !stall && !cmd_stop;
    brk_hit = fire && brk_on && (step_count + 32'd1 == brk_at);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode          <= M_IDLE;
      since         <= '1;
      rate          <= RATE_DEFAULT;
      steps_left    <= '0;
      step_en       <= 1'b0;
      evt_start     <= 1'b0;
      evt_stop      <= 1'b0;
      step_count    <= '0;
      active_cycles <= '0;
      stall_cycles  <= '0;
      brk_on        <= 1'b0;
      brk_at        <= '0;
    end else begin
      step_en   <= fire;
      evt_start <= 1'b0;
      evt_stop  <= 1'b0;

      if (fire)                 since <= '0;
      else if (since != '1)     since <= since + 1'b1;
      if (fire)                 step_count    <= step_count + 1'b1;
      if (active)               active_cycles <= active_cycles + 1'b1;
      if (due && stall)         stall_cycles  <= stall_cycles + 1'b1;
      if (rate_wr)              rate <= rate_val;
      if (brk_wr) begin
        brk_on <= (brk_val != '0);
        brk_at <= brk_val;
      end else if (brk_hit) begin
        brk_on <= 1'b0;
      end

      if (cmd_stop) begin
        if (active) evt_stop <= 1'b1;
        mode       <= M_IDLE;
        steps_left <= '0;
      end else if (cmd_step && step_n != '0) begin
        if (!active) evt_start <= 1'b1;
        mode       <= M_STEP;
        steps_left <= step_n;
      end else if (cmd_start) begin
        if (!active) evt_start <= 1'b1;
        mode       <= M_RUN;
        steps_left <= '0;
      end else if (brk_hit) begin
        mode       <= M_IDLE;
        steps_left <= '0;
        evt_stop   <= 1'b1;
      end else if (mode == M_STEP && fire) begin
        steps_left <= steps_left - 1'b1;
        if (steps_left == 16'd1) begin
          mode     <= M_IDLE;
          evt_stop <= 1'b1;
        end
      end
    end
  end

  // a step is only ever issued while time is running
  a_step_when_active: assert property (@(posedge clk) disable iff (!rst_n)
    fire |-> active);

endmodule
