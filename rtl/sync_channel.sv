// sync_channel -- synchronization channel from the mockup to the ventilator.
//
// Keeps mockup and ventilator sampling at the same rate and passes the time
// debug commands on. Events and the bytes they send (codes in dm_pkg):
//   tick      SYNC_TICK, after every simulated time step
//   evt_start SYNC_START, time starts running
//   evt_stop  SYNC_STOP, time is frozen
//   rate_wr   SYNC_RATE then the 32-bit `rate` (clock cycles per step), LSB
//             first, so the ventilator learns the rate both sides run at
// Each event sets a pending flag that stays set until its byte has been
// handed to the uart_tx; a rate written again before it is announced only
// sends the latest value. A five-byte rate message is never interleaved.
// Priority: rate, start, tick, stop. This keeps the usual order of a session
// (the stop event of a STEP command is raised one cycle before the tick of its
// last step); only a stop and a restart both pending behind a busy line would
// be sent out of order. busy is high while anything is pending or being sent;
// the time controller waits on it so no tick is lost. That the channel keeps
// the sampling rates equal, agrees the rate and carries the debug commands is
// from the source; codes, framing and priority are this design's.
module sync_channel
  import dm_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,
  input  logic        evt_start,
  input  logic        evt_stop,
  input  logic        rate_wr,
  input  logic [31:0] rate,
  output logic        busy,
  output logic        tx
);

  logic        pend_tick, pend_start, pend_stop, pend_rate;
  logic [31:0] rate_hold;    // latest rate waiting to be announced
  logic [31:0] rate_sh;      // rate message being sent
  logic [2:0]  rate_left;    // rate bytes still to send after the code
  logic        tx_valid, tx_ready;
  logic [7:0]  tx_data;
  logic        take_start, take_stop, take_tick, take_rate, take_rbyte;

  always_comb begin
    take_start = 1'b0;
    take_stop  = 1'b0;
    take_tick  = 1'b0;
    take_rate  = 1'b0;
    take_rbyte = 1'b0;
    tx_data    = SYNC_TICK;
    if (rate_left != 3'd0) begin
      tx_data    = rate_sh[7:0];
      take_rbyte = tx_ready;
    end else if (pend_rate) begin
      tx_data   = SYNC_RATE;
      take_rate = tx_ready;
    end else if (pend_start) begin
      tx_data    = SYNC_START;
      take_start = tx_ready;
    end else if (pend_tick) begin
      take_tick = tx_ready;
    end else if (pend_stop) begin
      tx_data   = SYNC_STOP;
      take_stop = tx_ready;
    end
  end

  assign tx_valid = pend_start || pend_stop || pend_tick || pend_rate || (rate_left != 3'd0);
  assign busy     = tx_valid || !tx_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend_tick  <= 1'b0;
      pend_start <= 1'b0;
      pend_stop  <= 1'b0;
      pend_rate  <= 1'b0;
      rate_hold  <= '0;
      rate_sh    <= '0;
      rate_left  <= '0;
    end else begin
      pend_tick  <= tick      || (pend_tick  && !take_tick);
      pend_start <= evt_start || (pend_start && !take_start);
      pend_stop  <= evt_stop  || (pend_stop  && !take_stop);
      pend_rate  <= rate_wr   || (pend_rate  && !take_rate);
      if (rate_wr) rate_hold <= rate;
      if (take_rate) begin
        rate_sh   <= rate_hold;
        rate_left <= 3'd4;
      end else if (take_rbyte) begin
        rate_sh   <= {8'h00, rate_sh[31:8]};
        rate_left <= rate_left - 3'd1;
      end
    end
  end

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .valid(tx_valid), .data(tx_data), .ready(tx_ready), .tx
  );

endmodule
