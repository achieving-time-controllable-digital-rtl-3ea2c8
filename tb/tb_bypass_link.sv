// tb_bypass_link -- self-checking test of one transducer bypass link.
//
// Loads random 32-bit samples and decodes the line with an independent
// monitor: four bytes, least significant first, must rebuild the sample.
// busy must rise with the load and last 4 * (10 * CPB + 1) cycles; a
// load while busy must be ignored.
module tb_bypass_link;
  localparam int CPB = 6;
  logic clk = 0, rst_n, load, busy, tx;
  logic [31:0] value;
  logic got, bad;
  logic [7:0] mdata;
  int checks = 0, failures = 0;
  logic [31:0] rx_word;
  int rx_bytes = 0;
  always #5 clk = ~clk;

  bypass_link #(.CLKS_PER_BIT(CPB)) dut (.*);
  tb_uart_mon #(.CPB(CPB)) mon (.clk, .rst_n, .line(tx), .got, .data(mdata), .bad);

  always @(posedge clk) if (got) begin
    rx_word = {mdata, rx_word[31:8]};
    rx_bytes++;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (bad) check(0, "framing error on link");

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    int busy_cycles;
    rst_n = 0; load = 0; value = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(busy == 0 && tx == 1, "idle");
    for (int n = 0; n < 40; n++) begin
      v = $urandom;
      rx_bytes = 0;
      load = 1; value = v;
      @(posedge clk); #1;
      load = 0;
      busy_cycles = 0;
      while (busy) begin
        busy_cycles++;
        if (busy_cycles == 50) begin       // load while busy: ignored
          load = 1; value = ~v;
          @(posedge clk); #1;
          load = 0;
        end else begin
          @(posedge clk); #1;
        end
      end
      check(busy_cycles == 4 * (10 * CPB + 1), $sformatf("busy for %0d cycles", busy_cycles));
      repeat (CPB) @(posedge clk);
      #1;
      check(rx_bytes == 4, $sformatf("4 bytes, got %0d", rx_bytes));
      check(rx_word == v, $sformatf("word %08x got %08x", v, rx_word));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
