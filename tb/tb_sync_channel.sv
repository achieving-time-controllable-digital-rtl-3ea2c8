// tb_sync_channel -- self-checking test of the synchronization channel.
//
// Raises ticks, start, stop and rate events, alone and together, and decodes
// the line independently. Every event must come out exactly once, in the
// order rate, start, tick, stop when raised together, a rate message must
// carry the latest rate LSB first and never be split by other bytes, and busy must stay high until the
// last byte has been sent. A random phase then runs 30,000 cycles the way
// the mockup uses the channel: a tick only while busy is low, start, stop
// and rate events at any time. It checks that every tick arrives, that start
// and stop bytes appear at most once per event, that rate messages are whole
// and carry written values (the last one the last value written), and that
// busy is high whenever the line is sending.
module tb_sync_channel;
  import dm_pkg::*;
  localparam int CPB = 4;
  logic clk = 0, rst_n, tick, evt_start, evt_stop, rate_wr, busy, tx;
  logic [31:0] rate;
  logic got, bad;
  logic [7:0] mdata;
  logic [7:0] seen [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sync_channel #(.CLKS_PER_BIT(CPB)) dut (.*);
  tb_uart_mon #(.CPB(CPB)) mon (.clk, .rst_n, .line(tx), .got, .data(mdata), .bad);

  int n_bad = 0, busy_gaps = 0;
  always @(posedge clk) begin
    if (got) seen.push_back(mdata);
    if (rst_n && bad) n_bad++;
    if (rst_n && !tx && !busy) busy_gaps++;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic pulse(bit t, bit s, bit p);
    tick = t; evt_start = s; evt_stop = p;
    @(posedge clk); #1;
    tick = 0; evt_start = 0; evt_stop = 0;
  endtask

  task automatic drain();
    while (busy) @(posedge clk);
    repeat (CPB) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; tick = 0; evt_start = 0; evt_stop = 0; rate_wr = 0; rate = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(busy == 0, "idle");
    // start and first tick together
    pulse(1, 1, 0);
    check(busy == 1, "busy after event");
    drain();
    check(seen.size() == 2 && seen[0] == SYNC_START && seen[1] == SYNC_TICK,
          "start then tick");
    seen.delete();
    // ten ticks, each after the previous has gone
    for (int i = 0; i < 10; i++) begin pulse(1, 0, 0); drain(); end
    check(seen.size() == 10, "ten ticks");
    foreach (seen[i]) check(seen[i] == SYNC_TICK, "tick code");
    seen.delete();
    // tick, then stop raised while the tick is being sent
    pulse(1, 0, 0);
    repeat (5) @(posedge clk);
    #1 pulse(0, 0, 1);
    drain();
    check(seen.size() == 2 && seen[0] == SYNC_TICK && seen[1] == SYNC_STOP, "tick then stop");
    seen.delete();
    // all three at once
    pulse(1, 1, 1);
    drain();
    check(seen.size() == 3 && seen[0] == SYNC_START && seen[1] == SYNC_TICK &&
          seen[2] == SYNC_STOP, "priority start, tick, stop");
    seen.delete();
    // stop raised one cycle before the tick, while the line is busy
    pulse(1, 0, 0);
    repeat (3) @(posedge clk);
    #1 pulse(0, 0, 1);
    pulse(1, 0, 0);
    drain();
    check(seen.size() == 3 && seen[0] == SYNC_TICK && seen[1] == SYNC_TICK &&
          seen[2] == SYNC_STOP, "pending tick goes before pending stop");
    seen.delete();
    // rate message together with start and tick
    rate = 32'hA1B2C3D4; rate_wr = 1;
    pulse(1, 1, 0);
    rate_wr = 0; rate = 0;
    drain();
    check(seen.size() == 7 && seen[0] == SYNC_RATE && seen[1] == 8'hD4 && seen[2] == 8'hC3 &&
          seen[3] == 8'hB2 && seen[4] == 8'hA1 && seen[5] == SYNC_START && seen[6] == SYNC_TICK,
          "rate message first, then start, tick");
    seen.delete();
    // a tick raised while the rate message is under way waits for its end;
    // two rate writes before the first is announced send only the latest
    pulse(1, 0, 0);
    #1 rate = 32'd111; rate_wr = 1;
    @(posedge clk); #1 rate = 32'd222;
    @(posedge clk); #1 rate_wr = 0;
    repeat (50) @(posedge clk);
    #1 pulse(1, 0, 0);
    drain();
    check(seen.size() == 7 && seen[0] == SYNC_TICK && seen[1] == SYNC_RATE &&
          seen[2] == 8'd222 && seen[3] == 0 && seen[4] == 0 && seen[5] == 0 &&
          seen[6] == SYNC_TICK, "latest rate, message not split");
    begin : random_phase
      automatic int n_t = 0, n_s = 0, n_p = 0, b_t = 0, b_s = 0, b_p = 0, n_msg = 0;
      automatic int unknown = 0, foreign = 0;
      automatic logic [31:0] last_w = 'x, last_a = 'x, w;
      bit written [logic [31:0]];
      seen.delete();
      for (int i = 0; i < 30000; i++) begin
        tick      = !busy && ($urandom_range(0, 2) == 0);
        evt_start = ($urandom_range(0, 499) == 0);
        evt_stop  = ($urandom_range(0, 499) == 0);
        rate_wr   = ($urandom_range(0, 799) == 0);
        rate      = $urandom();
        n_t += int'(tick); n_s += int'(evt_start); n_p += int'(evt_stop);
        if (rate_wr) begin last_w = rate; written[rate] = 1; end
        @(posedge clk); #1;
      end
      tick = 0; evt_start = 0; evt_stop = 0; rate_wr = 0;
      drain();
      for (int i = 0; i < seen.size(); i++) begin
        case (seen[i])
          SYNC_TICK:  b_t++;
          SYNC_START: b_s++;
          SYNC_STOP:  b_p++;
          SYNC_RATE: begin
            if (i + 4 < seen.size()) begin
              w = {seen[i+4], seen[i+3], seen[i+2], seen[i+1]};
              if (!written.exists(w)) foreign++;
              last_a = w;
            end else foreign++;
            n_msg++;
            i += 4;
          end
          default: unknown++;
        endcase
      end
      $display("random phase: %0d ticks, %0d/%0d start, %0d/%0d stop, %0d rate messages for %0d writes",
               n_t, b_s, n_s, b_p, n_p, n_msg, written.size());
      check(n_t > 200 && b_t == n_t, $sformatf("every tick sent: %0d of %0d", b_t, n_t));
      check(b_s >= 1 && b_s <= n_s && b_p >= 1 && b_p <= n_p, "start/stop at most once per event");
      check(n_msg >= 1 && n_msg <= written.size() && foreign == 0 && unknown == 0,
            "rate messages whole and carrying written values");
      check(last_a == last_w, "last rate announced is the last written");
    end
    check(n_bad == 0, "no framing error");
    check(busy_gaps == 0, "busy high while the line sends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
