// tb_mockup_top -- end-to-end test of the digital lung mockup.
//
// Runs at 4 clocks per serial bit and a default rate of 400 cycles per time
// step so a whole session fits in a short simulation. The testbench acts as
// the PC debugger (serial commands on uart_rx, replies decoded from uart_tx)
// and as the ventilator (drives the airway pressure, decodes the four bypass
// links and the sync channel). A reference model of the lung is stepped for
// every sample the links deliver, and every sample must match it.
//
// Session: STEP 5 at rest; inhale at RATE 400 (tick spacing must be 400
// cycles, the rate must be announced on the sync channel); STOP; READ; full speed (RATE 0), where the serial links must
// stall the time steps; PROFILE; a BREAK seven steps ahead, after which
// START must run exactly to it and freeze time; then the board buttons: step one, start,
// full speed while button 3 is held, stop. Each mechanism is counted and
// one that never happened is a failure.
module tb_mockup_top;
  import dm_pkg::*;
  import lung_ref_pkg::*;

  localparam int CPB  = 4;
  localparam int RATE = 400;

  logic clk = 0, rst_n;
  logic [3:0] buttons, bypass_tx, leds;
  logic uart_rx, uart_tx, sync_tx;
  fix_t pair_in;
  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  mockup_top #(.CLKS_PER_BIT(CPB), .RATE_DEFAULT(RATE)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- monitors ----------------
  logic [4:0] got, bad;
  logic [7:0] mdata [5];
  logic       dgot, dbad;
  logic [7:0] ddata;
  tb_uart_mon #(.CPB(CPB)) m_dbg (.clk, .rst_n, .line(uart_tx), .got(dgot), .data(ddata), .bad(dbad));
  for (genvar i = 0; i < 4; i++) begin : g_mon
    tb_uart_mon #(.CPB(CPB)) m (.clk, .rst_n, .line(bypass_tx[i]), .got(got[i]), .data(mdata[i]), .bad(bad[i]));
  end
  tb_uart_mon #(.CPB(CPB)) m_sync (.clk, .rst_n, .line(sync_tx), .got(got[4]), .data(mdata[4]), .bad(bad[4]));

  logic [31:0] part [4];
  int          nb [4] = '{0, 0, 0, 0};
  logic [31:0] words [4][$];
  logic [7:0]  reply [$];
  int n_tick = 0, n_sstart = 0, n_sstop = 0, n_bad = 0, last_tick = 0, tick_gap = 0;
  int n_srate = 0, rate_bytes = 0;
  logic [31:0] sync_rate = 0;
  int stall_cycles_seen = 0;

  always @(posedge clk) begin
    for (int i = 0; i < 4; i++) if (got[i]) begin
      part[i] = {mdata[i], part[i][31:8]};
      nb[i]++;
      if (nb[i] == 4) begin words[i].push_back(part[i]); nb[i] = 0; end
    end
    if (got[4] && rate_bytes > 0) begin
      sync_rate = {mdata[4], sync_rate[31:8]};
      rate_bytes--;
      if (rate_bytes == 0) n_srate++;
    end else if (got[4]) begin
      case (mdata[4])
        SYNC_RATE:  rate_bytes = 4;
        SYNC_TICK:  begin n_tick++; tick_gap = cyc - last_tick; last_tick = cyc; end
        SYNC_START: n_sstart++;
        SYNC_STOP:  n_sstop++;
        default:    n_bad++;
      endcase
    end
    if (dgot) reply.push_back(ddata);
    if (|bad || dbad) n_bad++;
    if (leds[2]) stall_cycles_seen++;
  end

  // ---------------- reference checking of link samples ----------------
  st_t ref_s;
  int  n_samples = 0;
  always @(posedge clk) begin
    if (words[0].size() > 0 && words[1].size() > 0 &&
        words[2].size() > 0 && words[3].size() > 0) begin
      der_t d;
      logic [31:0] w0, w1, w2, w3;
      w0 = words[0].pop_front(); w1 = words[1].pop_front();
      w2 = words[2].pop_front(); w3 = words[3].pop_front();
      ref_s = step(ref_s, pair_in);
      d = rhs(ref_s, pair_in);
      n_samples++;
      check(w0 == pair_in, $sformatf("sample %0d airway p %0d", n_samples, w0));
      check(w1 == d.palv, $sformatf("sample %0d lung p %0d exp %0d", n_samples, w1, d.palv));
      check(w2 == d.fbr, $sformatf("sample %0d flow %0d exp %0d", n_samples, w2, d.fbr));
      check(w3 == ref_s.vbr + ref_s.valv, $sformatf("sample %0d volume", n_samples));
    end
  end

  // ---------------- PC side ----------------
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

  task automatic get32(output logic [31:0] w);
    int t;
    t = 0;
    while (reply.size() < 4 && t < 2000) begin @(posedge clk); t++; end
    check(reply.size() >= 4, "reply word arrived");
    w = {reply[3], reply[2], reply[1], reply[0]};
    repeat (4) if (reply.size() > 0) void'(reply.pop_front());
  endtask

  task automatic wait_ticks(int k);
    int t0, t;
    t0 = n_tick; t = 0;
    while (n_tick < t0 + k && t < 100000) begin @(posedge clk); t++; end
    check(n_tick >= t0 + k, $sformatf("%0d ticks arrived", k));
  endtask

  task automatic settle();    // let every link finish
    repeat (400) @(posedge clk);
  endtask

  task automatic press(int b);
    buttons[b] = 1;
    repeat (5) @(posedge clk);
    buttons[b] = 0;
    repeat (5) @(posedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanisms
  int m_step = 0, m_start = 0, m_stop = 0, m_rate = 0, m_rate_timing = 0, m_fast = 0;
  int m_stall = 0, m_read = 0, m_profile = 0, m_btn_step = 0, m_btn_start = 0;
  int m_btn_stop = 0, m_btn_fast = 0, m_break = 0;

  initial begin
    logic [31:0] w;
    der_t d;
    int t0, g_fast, s0;
    ref_s = init_state();
    rst_n = 0; buttons = 0; uart_rx = 1; pair_in = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);

    // STEP 5 at rest
    send(OP_STEP); send(8'd5); send(8'd0);
    wait_ticks(5);
    settle();
    check(n_tick == 5 && n_samples == 5, "exactly five steps");
    check(n_sstart == 1 && n_sstop == 1, "sync start and stop around the steps");
    if (n_tick == 5) m_step++;

    // inhale at the programmed rate
    pair_in = 32'sh0A00;
    send(OP_RATE); send32(RATE);
    m_rate++;
    repeat (500) @(posedge clk);
    check(n_srate == 1 && sync_rate == RATE, "rate announced on the sync channel");
    send(OP_START);
    wait_ticks(3);
    for (int i = 0; i < 8; i++) begin
      wait_ticks(1);
      check(tick_gap == RATE, $sformatf("tick spacing %0d", tick_gap));
      if (tick_gap == RATE) m_rate_timing++;
    end
    m_start++;
    send(OP_STOP);
    settle();
    t0 = n_tick;
    repeat (2000) @(posedge clk);
    check(n_tick == t0 && n_sstop == 2, "frozen after STOP");
    if (n_tick == t0) m_stop++;

    // READ
    send(OP_READ);
    d = rhs(ref_s, pair_in);
    get32(w); check(w == pair_in, "READ airway p");
    get32(w); check(w == d.palv, "READ lung p");
    get32(w); check(w == d.fbr, "READ flow");
    get32(w); check(w == ref_s.vbr + ref_s.valv, "READ volume");
    get32(w); check(w == d.cbr, "READ bronchial concentration");
    get32(w); check(w == d.calv, "READ alveolar concentration");
    m_read++;

    // full speed: links stall the steps
    send(OP_RATE); send32(0);
    send(OP_START);
    wait_ticks(3);
    for (int i = 0; i < 10; i++) begin
      wait_ticks(1);
      check(tick_gap < RATE && tick_gap >= 4 * (10 * CPB + 1),
            $sformatf("full-speed spacing %0d", tick_gap));
    end
    g_fast = tick_gap;
    m_fast++;
    send(OP_STOP);
    settle();
    check(stall_cycles_seen > 0, "stall seen at full speed");
    if (stall_cycles_seen > 0) m_stall++;

    // PROFILE
    send(OP_PROFILE);
    get32(w); check(w == n_tick, $sformatf("PROFILE steps %0d vs %0d", w, n_tick));
    get32(w); check(w > 0, "PROFILE active cycles");
    get32(w); check(w > 0, "PROFILE stall cycles");
    m_profile++;

    // breakpoint seven steps ahead, still at full speed
    t0 = n_tick;
    s0 = n_sstop;
    send(OP_BREAK); send32(32'(t0 + 7));
    send(OP_START);
    repeat (4000) @(posedge clk);
    settle();
    check(n_tick == t0 + 7 && n_sstop == s0 + 1 && leds[1:0] == 2'b00,
          $sformatf("BREAK: froze after %0d of 7 steps", n_tick - t0));
    if (n_tick == t0 + 7) m_break++;

    // buttons: exhale
    pair_in = 0;
    send(OP_RATE); send32(RATE);
    t0 = n_tick;
    press(2);
    settle();
    check(n_tick == t0 + 1, "button step: one step");
    if (n_tick == t0 + 1) m_btn_step++;
    press(0);
    wait_ticks(3);
    check(tick_gap == RATE, "button start at the programmed rate");
    m_btn_start++;
    buttons[3] = 1;
    wait_ticks(4);
    check(sync_rate == 0, "full-speed rate announced");
    check(tick_gap == g_fast, $sformatf("button 3 held: full speed %0d", tick_gap));
    if (tick_gap == g_fast) m_btn_fast++;
    buttons[3] = 0;
    wait_ticks(4);
    check(tick_gap == RATE, $sformatf("button 3 released: rate restored %0d", tick_gap));
    check(sync_rate == RATE, "restored rate announced");
    press(1);
    settle();
    t0 = n_tick;
    repeat (1000) @(posedge clk);
    check(n_tick == t0, "button stop");
    if (n_tick == t0) m_btn_stop++;

    // totals
    check(n_samples == n_tick, $sformatf("every step sampled: %0d samples %0d ticks", n_samples, n_tick));
    check(n_bad == 0, "no framing errors or unknown sync codes");
    check(ref_s.vbr + ref_s.valv != init_state().vbr + init_state().valv, "lung moved");

    $display("mechanisms: step=%0d start=%0d stop=%0d rate=%0d rate_timing=%0d fast=%0d stall=%0d",
             m_step, m_start, m_stop, m_rate, m_rate_timing, m_fast, m_stall);
    $display("            read=%0d profile=%0d btn_step=%0d btn_start=%0d btn_fast=%0d btn_stop=%0d",
             m_read, m_profile, m_btn_step, m_btn_start, m_btn_fast, m_btn_stop);
    $display("            break=%0d", m_break);
    $display("steps=%0d stall cycles=%0d", n_tick, stall_cycles_seen);
    check(m_step > 0, "mechanism: step");
    check(m_start > 0 && m_stop > 0, "mechanism: start/stop");
    check(m_rate > 0 && m_rate_timing > 0, "mechanism: rate");
    check(m_fast > 0 && m_stall > 0, "mechanism: full speed and stall");
    check(m_read > 0 && m_profile > 0, "mechanism: read/profile");
    check(m_break > 0, "mechanism: breakpoint");
    check(m_btn_step > 0 && m_btn_start > 0 && m_btn_fast > 0 && m_btn_stop > 0, "mechanism: buttons");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
