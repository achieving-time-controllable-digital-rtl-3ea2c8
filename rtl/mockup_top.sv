// mockup_top -- time-controllable digital lung mockup for a ventilator.
//
// A two-compartment respiratory model (resp_mockup) replaces the patient's
// lung. It is advanced one simulated time step (2^-8 s of simulated time) per
// step_en pulse from the time controller (time_ctrl), which a PC debugger
// commands over a serial link (uart_rx -> debug_cmd -> uart_tx): start, stop,
// step N time steps, set the step interval, set a breakpoint at a step
// count, read the transducer values and
// gas concentrations, and read the profile counters. After each step the airway pressure, lung
// pressure, flow and volume are sent to the ventilator on four dedicated
// one-way serial links (bypass_link) that stand in for its transducers, and
// the sync channel (sync_channel) tells the ventilator that a step has passed,
// when time starts or stops, and every new step rate. The next step waits
// until all five links are idle, so the ventilator sees every sample at the
// rate the mockup runs.
//
// The board-level interface follows the source's standard circuit interface
// (clock, reset, buttons, UART, LEDs, input data): pair_in is the airway
// pressure the ventilator applies (Q23.8, dm_pkg). buttons[0] = start,
// buttons[1] = stop, buttons[2] = step one time step (rising edges, two-flop
// synchronised), buttons[3] held = full speed regardless of the programmed
// rate. leds = {heartbeat toggling each step, stalled, stepping, running}.
// The button and LED assignments, clock frequency and baud rate are this
// design's choices. rst_n is synchronous, active low.
module mockup_top
  import dm_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 100_000_000,
  parameter int unsigned BAUD         = 115_200,
  parameter int unsigned CLKS_PER_BIT = CLK_HZ / BAUD,
  parameter int unsigned RATE_DEFAULT = CLK_HZ / 256   // real time, 2^-8 s
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] buttons,
  input  logic       uart_rx,
  output logic       uart_tx,
  input  fix_t       pair_in,
  output logic [3:0] bypass_tx,   // {volume, flow, lung p, airway p}
  output logic       sync_tx,
  output logic [3:0] leds
);

  // ---------------- buttons ----------------
  logic [3:0] btn_s1, btn_s2, btn_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      btn_s1 <= '0; btn_s2 <= '0; btn_q <= '0;
    end else begin
      btn_s1 <= buttons; btn_s2 <= btn_s1; btn_q <= btn_s2;
    end
  end
  logic [3:0] btn_rise;
  assign btn_rise = btn_s2 & ~btn_q;

  // ---------------- debug serial link ----------------
  logic       rx_valid;
  logic [7:0] rx_data;
  logic       dtx_valid, dtx_ready;
  logic [7:0] dtx_data;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_dbg_rx (
    .clk, .rst_n, .rx(uart_rx), .valid(rx_valid), .data(rx_data), .frame_err()
  );
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_dbg_tx (
    .clk, .rst_n, .valid(dtx_valid), .data(dtx_data), .ready(dtx_ready), .tx(uart_tx)
  );

  logic        d_start, d_stop, d_step, d_rate_wr;
  logic [15:0] d_step_n;
  logic [31:0] d_rate, d_brk;
  logic        d_brk_wr;
  logic [31:0] step_count, active_cycles, stall_cycles, rate;
  obs_t        obs;
  fix_t        cbr, calv;

  debug_cmd u_dbg (
    .clk, .rst_n, .rx_valid, .rx_data,
    .tx_ready(dtx_ready), .tx_valid(dtx_valid), .tx_data(dtx_data),
    .obs, .cbr, .calv, .step_count, .active_cycles, .stall_cycles,
    .cmd_start(d_start), .cmd_stop(d_stop), .cmd_step(d_step), .step_n(d_step_n),
    .rate_wr(d_rate_wr), .rate_val(d_rate), .brk_wr(d_brk_wr), .brk_val(d_brk)
  );

  // ---------------- time control ----------------
  logic        step_en, running, stepping, evt_start, evt_stop, stall;
  logic        btn_fast_wr;
  logic [31:0] rate_saved;

  // buttons[3]: full speed while held, programmed rate restored on release
  always_ff @(posedge clk) begin
    if (!rst_n)                     rate_saved <= RATE_DEFAULT;
    else if (d_rate_wr)             rate_saved <= d_rate;
    else if (btn_rise[3])           rate_saved <= rate;
  end
  assign btn_fast_wr = btn_rise[3] || (btn_q[3] && !btn_s2[3]);

  time_ctrl #(.RATE_DEFAULT(RATE_DEFAULT)) u_time (
    .clk, .rst_n,
    .cmd_start(d_start || btn_rise[0]),
    .cmd_stop (d_stop  || btn_rise[1]),
    .cmd_step (d_step  || btn_rise[2]),
    .step_n   (d_step ? d_step_n : 16'd1),
    .rate_wr  (d_rate_wr || btn_fast_wr),
    .rate_val (d_rate_wr ? d_rate : (btn_s2[3] ? 32'd0 : rate_saved)),
    .brk_wr   (d_brk_wr),
    .brk_val  (d_brk),
    .stall,
    .step_en, .running, .stepping, .evt_start, .evt_stop,
    .rate, .steps_left(), .step_count, .active_cycles, .stall_cycles
  );

  // ---------------- lung model ----------------
  logic step_done;

  resp_mockup u_lung (
    .clk, .rst_n, .step_en, .pair(pair_in), .step_done, .obs,
    .qbr(), .vbr(), .qalv(), .valv(), .cbr, .calv
  );

  // ---------------- links to the ventilator ----------------
  logic [3:0] link_busy;
  logic       sync_busy;
  fix_t       link_val [4];

  assign link_val[0] = obs.paw;
  assign link_val[1] = obs.plung;
  assign link_val[2] = obs.flow;
  assign link_val[3] = obs.vol;

  for (genvar i = 0; i < 4; i++) begin : g_link
    bypass_link #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_link (
      .clk, .rst_n, .load(step_done), .value(link_val[i]),
      .busy(link_busy[i]), .tx(bypass_tx[i])
    );
  end

  // announce every rate change once the new rate is in time_ctrl
  logic rate_wr_q;
  always_ff @(posedge clk) begin
    if (!rst_n) rate_wr_q <= 1'b0;
    else        rate_wr_q <= d_rate_wr || btn_fast_wr;
  end

  sync_channel #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_sync (
    .clk, .rst_n, .tick(step_done), .evt_start, .evt_stop,
    .rate_wr(rate_wr_q), .rate,
    .busy(sync_busy), .tx(sync_tx)
  );

  assign stall = (|link_busy) || sync_busy;

  // ---------------- LEDs ----------------
  logic heartbeat;
  always_ff @(posedge clk) begin
    if (!rst_n)         heartbeat <= 1'b0;
    else if (step_done) heartbeat <= ~heartbeat;
  end
  assign leds = {heartbeat, stall && (running || stepping), stepping, running};

endmodule
