// tb_breathing -- ventilator-in-the-loop workload for the lung mockup.
//
// The testbench plays a pressure-controlled ventilator: it counts SYNC_TICK
// bytes on the sync channel and, at each tick, sets the airway pressure for
// the next step: 1 s (256 steps) of inspiration at 10.0, then 2 s (512 steps)
// of expiration at 0.0, for three breaths (2304 time steps, 9 s of
// simulated time) run at full speed. Serial links run at 4 clocks per bit.
// Every sample the four bypass links deliver is checked against the
// reference lung stepped with the same pressure sequence. Also checked: the
// lung fills during each inspiration and empties during each expiration,
// breaths 2 and 3 have nearly the same tidal volume (periodic steady state),
// and a breakpoint set in mid-inspiration of breath 2 freezes time exactly
// at its step, from where the debugger steps 10 by hand and resumes, without
// a sample lost.
module tb_breathing;
  import dm_pkg::*;
  import lung_ref_pkg::*;

  localparam int CPB     = 4;
  localparam int INSP    = 256;
  localparam int BREATH  = 768;
  localparam int NBREATH = 3;

  logic clk = 0, rst_n;
  logic [3:0] buttons, bypass_tx, leds;
  logic uart_rx, uart_tx, sync_tx;
  fix_t pair_in;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mockup_top #(.CLKS_PER_BIT(CPB)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [4:0] got, bad;
  logic [7:0] mdata [5];
  for (genvar i = 0; i < 4; i++) begin : g_mon
    tb_uart_mon #(.CPB(CPB)) m (.clk, .rst_n, .line(bypass_tx[i]), .got(got[i]), .data(mdata[i]), .bad(bad[i]));
  end
  tb_uart_mon #(.CPB(CPB)) m_sync (.clk, .rst_n, .line(sync_tx), .got(got[4]), .data(mdata[4]), .bad(bad[4]));

  // ventilator: pressure for step k+1 chosen when tick k arrives
  int   n_tick = 0, rate_bytes = 0, n_bad = 0;
  fix_t pair_q [$];                // pressure used by each step, in order
  function automatic fix_t vent_pressure(int k);
    return ((k % BREATH) < INSP) ? 32'sh0A00 : 32'sh0;
  endfunction

  always @(posedge clk) begin
    if (got[4]) begin
      if (rate_bytes > 0) rate_bytes--;
      else if (mdata[4] == SYNC_RATE) rate_bytes = 4;
      else if (mdata[4] == SYNC_TICK) begin
        n_tick++;
        pair_in <= vent_pressure(n_tick);
        pair_q.push_back(vent_pressure(n_tick));
      end
    end
    if (|bad) n_bad++;
  end

  // reference check of every delivered sample
  logic [31:0] part [4];
  int          nb [4] = '{0, 0, 0, 0};
  logic [31:0] words [4][$];
  st_t ref_s;
  fix_t p_used;
  int  n_samples = 0;
  int  vol_hist [$];
  always @(posedge clk) begin
    for (int i = 0; i < 4; i++) if (got[i]) begin
      part[i] = {mdata[i], part[i][31:8]};
      nb[i]++;
      if (nb[i] == 4) begin words[i].push_back(part[i]); nb[i] = 0; end
    end
    if (words[0].size() > 0 && words[1].size() > 0 &&
        words[2].size() > 0 && words[3].size() > 0) begin
      der_t d;
      logic [31:0] w0, w1, w2, w3;
      w0 = words[0].pop_front(); w1 = words[1].pop_front();
      w2 = words[2].pop_front(); w3 = words[3].pop_front();
      p_used = vent_pressure(n_samples);
      ref_s = step(ref_s, p_used);
      d = rhs(ref_s, p_used);
      check(w0 == p_used && w1 == d.palv && w2 == d.fbr && w3 == ref_s.vbr + ref_s.valv,
            $sformatf("sample %0d", n_samples));
      vol_hist.push_back(int'(w3));
      n_samples++;
    end
  end

  task automatic send(logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rx = f[i];
      repeat (CPB) @(posedge clk);
    end
    uart_rx = 1;
    repeat (CPB) @(posedge clk);
  endtask

  task automatic send32(logic [31:0] w);
    for (int i = 0; i < 4; i++) send(w[8*i +: 8]);
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, frozen_at;
    longint start_cyc;
    int vmin [NBREATH], vmax [NBREATH], tidal [NBREATH];
    ref_s = init_state();
    rst_n = 0; buttons = 0; uart_rx = 1; pair_in = vent_pressure(0);
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    send(OP_RATE); send32(0);
    // break in mid-inspiration of breath 2, step 10 by hand, resume
    send(OP_BREAK); send32(BREATH + 100);
    start_cyc = longint'($time);
    send(OP_START);
    while (n_tick < BREATH + 100) @(posedge clk);
    repeat (2400) @(posedge clk);
    frozen_at = n_tick;
    check(n_tick == BREATH + 100, $sformatf("breakpoint: frozen at step %0d", n_tick));
    send(OP_STEP); send(8'd10); send(8'd0);
    while (n_tick < frozen_at + 10) @(posedge clk);
    repeat (400) @(posedge clk);
    check(n_tick == frozen_at + 10, "ten steps by hand");
    send(OP_START);
    while (n_tick < NBREATH * BREATH) @(posedge clk);
    send(OP_STOP);
    repeat (400) @(posedge clk);
    check(n_samples == n_tick && n_samples >= NBREATH * BREATH,
          $sformatf("every step sampled: %0d samples, %0d ticks", n_samples, n_tick));
    check(n_bad == 0, "no framing errors");
    for (int b = 0; b < NBREATH; b++) begin
      vmin[b] = vol_hist[b * BREATH];
      vmax[b] = vol_hist[b * BREATH];
      for (int k = b * BREATH; k < (b + 1) * BREATH; k++) begin
        if (vol_hist[k] < vmin[b]) vmin[b] = vol_hist[k];
        if (vol_hist[k] > vmax[b]) vmax[b] = vol_hist[k];
      end
      tidal[b] = vmax[b] - vmin[b];
      check(vol_hist[b * BREATH + INSP - 1] > vol_hist[b * BREATH] + 32'sh1000,
            $sformatf("breath %0d fills", b));
      check(vol_hist[(b + 1) * BREATH - 1] < vol_hist[b * BREATH + INSP - 1] - 32'sh1000,
            $sformatf("breath %0d empties", b));
      $display("breath %0d: volume %0d .. %0d, tidal %0d.%02d (Q23.8 units)",
               b, vmin[b] / 256, vmax[b] / 256, tidal[b] / 256, (tidal[b] % 256) * 100 / 256);
    end
    check(tidal[2] - tidal[1] < tidal[1] / 50 && tidal[1] - tidal[2] < tidal[1] / 50,
          "breaths 2 and 3 alike (within 2 %)");
    $display("%0d time steps (%0d s simulated) in %0d clock cycles",
             n_tick, n_tick / 256, (longint'($time) - start_cyc) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
