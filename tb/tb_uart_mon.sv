// tb_uart_mon -- testbench decoder for one 8N1 serial line.
//
// Watches `line`, finds a start bit, samples each bit in its middle and
// pulses `got` with the byte once the stop bit is seen; `bad` pulses instead
// if the stop bit is low or the start bit vanished. Idle while rst_n is low.
// Independent of the RTL receiver.
module tb_uart_mon #(
  parameter int CPB = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       line,
  output logic       got,
  output logic [7:0] data,
  output logic       bad
);
  int   cnt;
  int   bitn;
  logic busy;
  logic [7:0] sh;

  initial begin
    got = 0; bad = 0; busy = 0; cnt = 0; bitn = 0; sh = 0; data = 0;
  end

  always @(posedge clk) begin
    got <= 0;
    bad <= 0;
    if (!rst_n) begin
      busy <= 0;
    end else if (!busy) begin
      if (line == 0) begin
        busy <= 1; cnt <= CPB / 2 - 1; bitn <= 0;
      end
    end else if (cnt > 0) begin
      cnt <= cnt - 1;
    end else begin
      cnt <= CPB - 1;
      if (bitn == 0) begin
        if (line != 0) begin bad <= 1; busy <= 0; end
      end else if (bitn <= 8) begin
        sh <= {line, sh[7:1]};
      end else begin
        busy <= 0;
        if (line == 1) begin got <= 1; data <= sh; end
        else bad <= 1;
      end
      bitn <= bitn + 1;
    end
  end
endmodule
