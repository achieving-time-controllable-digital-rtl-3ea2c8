// tb_debug_cmd -- self-checking test of the debug command decoder.
//
// Feeds command bytes with random spacing and checks the pulses it makes:
// START, STOP, STEP with a 16-bit count, RATE and BREAK with a 32-bit value
// (each to its own output only), unknown
// opcodes ignored. READ must return the four transducer values and the two
// concentrations, and PROFILE
// the three counters, captured when the opcode arrived, as 32-bit words
// least significant byte first, under random back-pressure on tx_ready.
module tb_debug_cmd;
  import dm_pkg::*;
  logic clk = 0, rst_n;
  logic rx_valid, tx_ready, tx_valid;
  logic [7:0] rx_data, tx_data;
  obs_t obs;
  fix_t cbr, calv;
  logic [31:0] step_count, active_cycles, stall_cycles;
  logic cmd_start, cmd_stop, cmd_step, rate_wr, brk_wr;
  logic [15:0] step_n;
  logic [31:0] rate_val, brk_val;
  int checks = 0, failures = 0;
  int n_start = 0, n_stop = 0, n_step = 0, n_rate = 0, n_brk = 0;
  logic [15:0] last_n;
  logic [31:0] last_rate, last_brk;
  logic [7:0] replies [$];
  always #5 clk = ~clk;

  debug_cmd dut (.*);

  always @(posedge clk) begin
    tx_ready <= ($urandom_range(0, 2) == 0);
    if (rst_n) begin
      if (cmd_start) n_start++;
      if (cmd_stop)  n_stop++;
      if (cmd_step) begin n_step++; last_n = step_n; end
      if (rate_wr)  begin n_rate++; last_rate = rate_val; end
      if (brk_wr)   begin n_brk++; last_brk = brk_val; end
      if (tx_valid && tx_ready) replies.push_back(tx_data);
    end
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic put(logic [7:0] b);
    repeat ($urandom_range(0, 4)) @(posedge clk);
    #1 rx_valid = 1; rx_data = b;
    @(posedge clk); #1 rx_valid = 0;
  endtask

  task automatic get_word(output logic [31:0] w);
    while (replies.size() < 4) @(posedge clk);
    w = {replies[3], replies[2], replies[1], replies[0]};
    repeat (4) void'(replies.pop_front());
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w, r;
    logic [15:0] n;
    rst_n = 0; rx_valid = 0; rx_data = 0;
    obs = '0; cbr = 0; calv = 0; step_count = 0; active_cycles = 0; stall_cycles = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    put(OP_START);
    repeat (2) @(posedge clk);
    check(n_start == 1 && n_stop == 0, "start pulse");
    put(OP_STOP);
    repeat (2) @(posedge clk);
    check(n_stop == 1, "stop pulse");
    put(8'hEE);
    repeat (2) @(posedge clk);
    check(n_start == 1 && n_stop == 1 && n_step == 0 && n_rate == 0 && n_brk == 0, "unknown ignored");
    for (int i = 0; i < 30; i++) begin
      n = 16'($urandom);
      put(OP_STEP); put(n[7:0]); put(n[15:8]);
      repeat (2) @(posedge clk);
      check(n_step == i + 1 && last_n == n, $sformatf("step %0d", n));
      r = $urandom;
      put(OP_RATE); put(r[7:0]); put(r[15:8]); put(r[23:16]); put(r[31:24]);
      repeat (2) @(posedge clk);
      check(n_rate == i + 1 && last_rate == r, $sformatf("rate %08x", r));
      r = $urandom;
      put(OP_BREAK); put(r[7:0]); put(r[15:8]); put(r[23:16]); put(r[31:24]);
      repeat (2) @(posedge clk);
      check(n_brk == i + 1 && last_brk == r && n_rate == i + 1, $sformatf("break %08x", r));
    end
    for (int i = 0; i < 20; i++) begin
      logic [31:0] v [6];
      foreach (v[k]) v[k] = $urandom;
      obs.paw = v[0]; obs.plung = v[1]; obs.flow = v[2]; obs.vol = v[3];
      cbr = v[4]; calv = v[5];
      put(OP_READ);
      obs = '1; cbr = 0; calv = 0;  // must have been captured already
      for (int k = 0; k < 6; k++) begin
        get_word(w);
        check(w == v[k], $sformatf("read word %0d %08x exp %08x", k, w, v[k]));
      end
      step_count = $urandom; active_cycles = $urandom; stall_cycles = $urandom;
      v[0] = step_count; v[1] = active_cycles; v[2] = stall_cycles;
      put(OP_PROFILE);
      step_count = 0; active_cycles = 0; stall_cycles = 0;
      for (int k = 0; k < 3; k++) begin
        get_word(w);
        check(w == v[k], $sformatf("profile word %0d", k));
      end
      repeat (8) @(posedge clk);
      check(replies.size() == 0 && !tx_valid, "reply length");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
