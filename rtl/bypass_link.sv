// bypass_link -- one dedicated serial connection replacing a transducer.
//
// The mockup has four of these, one for each ventilator transducer it
// bypasses (airway pressure, lung pressure, flow, volume). On a load pulse
// the 32-bit value is captured and sent as four bytes, least significant
// first, through a uart_tx; busy stays high from load until the last stop
// bit, 4 * (10 * CLKS_PER_BIT + 1) cycles, so the time controller can hold
// the next time step until every link has delivered the current sample. A
// load while busy is ignored. The byte framing of a sample is this design's
// choice; the source only says the connections are one-way serial links.
module bypass_link #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [31:0] value,
  output logic        busy,
  output logic        tx
);

  logic [31:0] word;
  logic [2:0]  bytes_left;
  logic        tx_ready;
  logic        tx_valid;

  assign tx_valid = (bytes_left != 3'd0);
  assign busy     = tx_valid || !tx_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      word       <= '0;
      bytes_left <= '0;
    end else if (!busy && load) begin
      word       <= value;
      bytes_left <= 3'd4;
    end else if (tx_valid && tx_ready) begin
      word       <= {8'h00, word[31:8]};
      bytes_left <= bytes_left - 3'd1;
    end
  end

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .valid(tx_valid), .data(word[7:0]), .ready(tx_ready), .tx
  );

endmodule
