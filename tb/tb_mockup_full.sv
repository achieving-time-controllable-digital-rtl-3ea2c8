// tb_mockup_full -- one complete debug operation on the mockup at its
// default sizes (100 MHz clock, 115200 baud, real-time rate).
//
// The testbench, as the PC debugger, sends STEP 1 over the serial line with
// an airway pressure of 10.0 applied; as the ventilator it decodes the four
// bypass links and the sync channel. The one sample delivered must equal a
// reference model step, the sync channel must carry START, TICK, STOP, and a
// following READ must return the same four values and the reference gas
// concentrations.
module tb_mockup_full;
  import dm_pkg::*;
  import lung_ref_pkg::*;

  localparam int CPB = 100_000_000 / 115_200;

  logic clk = 0, rst_n;
  logic [3:0] buttons, bypass_tx, leds;
  logic uart_rx, uart_tx, sync_tx;
  fix_t pair_in;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mockup_top dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [5:0] got, bad;
  logic [7:0] mdata [6];
  for (genvar i = 0; i < 4; i++) begin : g_mon
    tb_uart_mon #(.CPB(CPB)) m (.clk, .rst_n, .line(bypass_tx[i]), .got(got[i]), .data(mdata[i]), .bad(bad[i]));
  end
  tb_uart_mon #(.CPB(CPB)) m_sync (.clk, .rst_n, .line(sync_tx), .got(got[4]), .data(mdata[4]), .bad(bad[4]));
  tb_uart_mon #(.CPB(CPB)) m_dbg  (.clk, .rst_n, .line(uart_tx), .got(got[5]), .data(mdata[5]), .bad(bad[5]));

  logic [31:0] word [4];
  int          nb [4] = '{0, 0, 0, 0};
  logic [7:0]  sync_seen [$];
  logic [7:0]  reply [$];
  int n_bad = 0;

  always @(posedge clk) begin
    for (int i = 0; i < 4; i++) if (got[i]) begin
      word[i] = {mdata[i], word[i][31:8]};
      nb[i]++;
    end
    if (got[4]) sync_seen.push_back(mdata[4]);
    if (got[5]) reply.push_back(mdata[5]);
    if (|bad) n_bad++;
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

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t  s;
    der_t d;
    logic [31:0] r [6];
    rst_n = 0; buttons = 0; uart_rx = 1; pair_in = 32'sh0A00;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    send(OP_STEP); send(8'd1); send(8'd0);
    while (nb[3] < 4 || sync_seen.size() < 3) @(posedge clk);
    repeat (20 * CPB) @(posedge clk);
    s = step(init_state(), pair_in);
    d = rhs(s, pair_in);
    check(nb[0] == 4 && nb[1] == 4 && nb[2] == 4 && nb[3] == 4, "one sample per link");
    check(word[0] == pair_in, "airway pressure");
    check(word[1] == d.palv, "lung pressure");
    check(word[2] == d.fbr, $sformatf("flow %0d exp %0d", word[2], d.fbr));
    check(word[3] == s.vbr + s.valv, "volume");
    check(sync_seen.size() == 3 && sync_seen[0] == SYNC_START &&
          sync_seen[1] == SYNC_TICK && sync_seen[2] == SYNC_STOP, "sync START TICK STOP");
    send(OP_READ);
    while (reply.size() < 24) @(posedge clk);
    for (int k = 0; k < 6; k++)
      r[k] = {reply[4*k+3], reply[4*k+2], reply[4*k+1], reply[4*k]};
    check(r[0] == word[0] && r[1] == word[1] && r[2] == word[2] && r[3] == word[3],
          "READ matches the delivered sample");
    check(r[4] == d.cbr && r[5] == d.calv, "READ concentrations");
    check(n_bad == 0, "no framing errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
