// tb_uart_tx -- self-checking test of the 8N1 transmitter.
//
// Sends random bytes (CLKS_PER_BIT = 8) with random gaps and checks, by
// sampling the line in the middle of every bit independently of the DUT,
// the start bit, the eight data bits LSB first and the stop bit; that ready
// drops for exactly 10 bit times per byte; and that the line idles high.
module tb_uart_tx;
  localparam int CPB = 8;
  logic clk = 0, rst_n, valid, ready, tx;
  logic [7:0] data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    int busy_cycles;
    rst_n = 0; valid = 0; data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(tx == 1 && ready == 1, "idle after reset");
    for (int n = 0; n < 100; n++) begin
      repeat ($urandom_range(0, 5)) begin
        @(posedge clk); #1;
        check(tx == 1, "line idles high");
      end
      b = 8'($urandom);
      valid = 1; data = b;
      @(posedge clk); #1;
      valid = 0; data = 8'($urandom);
      // now in the first cycle of the start bit
      busy_cycles = 0;
      for (int bitn = 0; bitn < 10; bitn++) begin
        for (int c = 0; c < CPB; c++) begin
          if (c == CPB / 2) begin
            if (bitn == 0)      check(tx == 0, "start bit");
            else if (bitn == 9) check(tx == 1, "stop bit");
            else                check(tx == b[bitn-1], $sformatf("data bit %0d of %02x", bitn-1, b));
          end
          if (!ready) busy_cycles++;
          @(posedge clk); #1;
        end
      end
      check(ready == 1, "ready after stop bit");
      check(busy_cycles == 10 * CPB, $sformatf("byte time %0d", busy_cycles));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
