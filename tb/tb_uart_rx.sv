// tb_uart_rx -- self-checking test of the 8N1 receiver.
//
// Drives serial frames (CLKS_PER_BIT = 8) with random bytes, some with a
// low stop bit, plus a short glitch on the idle line. Checks that each good frame yields exactly one valid pulse
// with the right byte, and that a bad stop bit yields frame_err and no byte.
module tb_uart_rx;
  localparam int CPB = 8;
  logic clk = 0, rst_n, rx, valid, frame_err;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  logic [7:0] last;
  always #5 clk = ~clk;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (valid) begin n_valid++; last = data; end
    if (frame_err) n_err++;
  end

  task automatic send(logic [7:0] b, bit good_stop, int period);
    logic [9:0] f;
    f = {good_stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = f[i];
      repeat (period) @(posedge clk);
    end
    rx = 1;
    repeat (2 * CPB) @(posedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    int v0, e0;
    rst_n = 0; rx = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    // glitch shorter than half a bit
    rx = 0; repeat (2) @(posedge clk); rx = 1;
    repeat (3 * CPB) @(posedge clk);
    check(n_valid == 0 && n_err == 0, "glitch ignored");
    for (int n = 0; n < 200; n++) begin
      b = 8'($urandom);
      v0 = n_valid; e0 = n_err;
      if (n % 10 == 3) begin
        send(b, 0, CPB);
        check(n_err == e0 + 1 && n_valid == v0, "bad stop bit flagged");
      end else begin
        send(b, 1, CPB);
        check(n_valid == v0 + 1 && n_err == e0, $sformatf("one byte %0d", n));
        check(last == b, $sformatf("byte %02x got %02x", b, last));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
