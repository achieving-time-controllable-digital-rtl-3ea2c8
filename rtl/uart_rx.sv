// uart_rx -- 8N1 asynchronous serial receiver.
//
// The rx line is brought into the clock domain by two flip-flops. A falling
// edge starts a frame; the start bit is re-checked half a bit later and each
// following bit is sampled in its middle, CLKS_PER_BIT cycles apart. After
// the stop bit is sampled high, data is presented with a one-cycle valid
// pulse; a low stop bit drops the byte and pulses frame_err instead. Format
// and divisor are this design's choice (the source only names the UART).
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_err
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;

  state_e        state;
  logic [1:0]    sync;
  logic [CW-1:0] clk_cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= S_IDLE;
      clk_cnt   <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rx};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        S_IDLE: if (!sync[1]) begin
          state   <= S_START;
          clk_cnt <= CW'(CLKS_PER_BIT / 2 - 1);
        end
        S_START: if (clk_cnt == '0) begin
          if (!sync[1]) begin
            state   <= S_DATA;
            bit_idx <= '0;
            clk_cnt <= CW'(CLKS_PER_BIT - 1);
          end else begin
            state <= S_IDLE;         // glitch, not a start bit
          end
        end else clk_cnt <= clk_cnt - 1'b1;
        S_DATA: if (clk_cnt == '0) begin
          shreg   <= {sync[1], shreg[7:1]};
          clk_cnt <= CW'(CLKS_PER_BIT - 1);
          if (bit_idx == 3'd7) state <= S_STOP;
          else                 bit_idx <= bit_idx + 1'b1;
        end else clk_cnt <= clk_cnt - 1'b1;
        S_STOP: if (clk_cnt == '0) begin
          state <= S_IDLE;
          if (sync[1]) begin
            data  <= shreg;
            valid <= 1'b1;
          end else begin
            frame_err <= 1'b1;
          end
        end else clk_cnt <= clk_cnt - 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
