// uart_tx -- 8N1 asynchronous serial transmitter.
//
// Sends one byte per accepted request: a start bit (0), eight data bits LSB
// first and a stop bit (1), each CLKS_PER_BIT clock cycles long. Handshake:
// a byte is taken in a cycle with valid && ready; ready is then low for
// 10 * CLKS_PER_BIT cycles while the byte is shifted out, so back-to-back
// bytes take 10 * CLKS_PER_BIT + 1 cycles each. The line idles high. The source names its serial ports but gives no format;
// 8N1 at a fixed divisor is this design's choice (100 MHz / 868 = 115200 baud).
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       tx
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    shreg;     // stop, data[7:0], start
  logic [3:0]    bits_left;
  logic [CW-1:0] clk_cnt;

  assign ready = (bits_left == 4'd0);
  assign tx    = ready ? 1'b1 : shreg[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg     <= '1;
      bits_left <= '0;
      clk_cnt   <= '0;
    end else if (ready) begin
      if (valid) begin
        shreg     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        clk_cnt   <= CW'(CLKS_PER_BIT - 1);
      end
    end else if (clk_cnt == '0) begin
      shreg     <= {1'b1, shreg[9:1]};
      bits_left <= bits_left - 4'd1;
      clk_cnt   <= CW'(CLKS_PER_BIT - 1);
    end else begin
      clk_cnt <= clk_cnt - 1'b1;
    end
  end

endmodule
