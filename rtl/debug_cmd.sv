// debug_cmd -- command decoder for the PC debugger on the serial link.
//
// Takes received bytes (rx_valid/rx_data, one byte per pulse) and decodes the
// time debug commands of dm_pkg::opcode_e: START, STOP and STEP (two count
// bytes, LSB first) become one-cycle pulses to the time controller, RATE (four
// bytes, LSB first) writes the step interval, BREAK (four bytes, LSB first)
// sets the breakpoint step count (0 clears it), READ replies with the four
// transducer values and the two compartment gas concentrations, and PROFILE
// with the three profile counters. Replies are
// 32-bit words sent least significant byte first over a valid/ready byte
// stream (tx_valid/tx_ready/tx_data) into the serial transmitter. The values
// are captured when the opcode arrives. Bytes that arrive while a reply is
// still being sent, and unknown opcodes, are ignored. The command set is the
// one of the source's debugger window (Start, Stop, Step with a count, Read,
// Profile, rate, breakpoints); the byte encoding is this design's.
module debug_cmd
  import dm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_valid,
  input  logic [7:0]  rx_data,
  input  logic        tx_ready,
  output logic        tx_valid,
  output logic [7:0]  tx_data,
  input  obs_t        obs,
  input  fix_t        cbr,
  input  fix_t        calv,
  input  logic [31:0] step_count,
  input  logic [31:0] active_cycles,
  input  logic [31:0] stall_cycles,
  output logic        cmd_start,
  output logic        cmd_stop,
  output logic        cmd_step,
  output logic [15:0] step_n,
  output logic        rate_wr,
  output logic [31:0] rate_val,
  output logic        brk_wr,
  output logic [31:0] brk_val
);

  typedef enum logic [1:0] {S_OP, S_ARG, S_REPLY} state_e;

  state_e       state;
  opcode_e      op;
  logic [31:0]  arg;
  logic [2:0]   arg_left;
  logic [191:0] reply;
  logic [4:0]   reply_left;

  assign tx_valid = (state == S_REPLY);
  assign tx_data  = reply[7:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_OP;
      op         <= OP_START;
      arg        <= '0;
      arg_left   <= '0;
      reply      <= '0;
      reply_left <= '0;
      cmd_start  <= 1'b0;
      cmd_stop   <= 1'b0;
      cmd_step   <= 1'b0;
      step_n     <= '0;
      rate_wr    <= 1'b0;
      rate_val   <= '0;
      brk_wr     <= 1'b0;
      brk_val    <= '0;
    end else begin
      cmd_start <= 1'b0;
      cmd_stop  <= 1'b0;
      cmd_step  <= 1'b0;
      rate_wr   <= 1'b0;
      brk_wr    <= 1'b0;
      unique case (state)
        S_OP: if (rx_valid) begin
          case (rx_data)
            OP_START: cmd_start <= 1'b1;
            OP_STOP:  cmd_stop  <= 1'b1;
            OP_STEP: begin
              op <= OP_STEP; arg_left <= 3'd2; state <= S_ARG;
            end
            OP_RATE: begin
              op <= OP_RATE; arg_left <= 3'd4; state <= S_ARG;
            end
            OP_BREAK: begin
              op <= OP_BREAK; arg_left <= 3'd4; state <= S_ARG;
            end
            OP_READ: begin
              reply      <= {calv, cbr, obs.vol, obs.flow, obs.plung, obs.paw};
              reply_left <= 5'd24;
              state      <= S_REPLY;
            end
            OP_PROFILE: begin
              reply      <= {96'h0, stall_cycles, active_cycles, step_count};
              reply_left <= 5'd12;
              state      <= S_REPLY;
            end
            default: ;
          endcase
        end
        S_ARG: if (rx_valid) begin
          arg      <= {rx_data, arg[31:8]};
          arg_left <= arg_left - 1'b1;
          if (arg_left == 3'd1) begin
            state <= S_OP;
            if (op == OP_STEP) begin
              cmd_step <= 1'b1;
              step_n   <= {rx_data, arg[31:24]};
            end else if (op == OP_BREAK) begin
              brk_wr  <= 1'b1;
              brk_val <= {rx_data, arg[31:8]};
            end else begin
              rate_wr  <= 1'b1;
              rate_val <= {rx_data, arg[31:8]};
            end
          end
        end
        S_REPLY: if (tx_ready) begin
          reply      <= {8'h00, reply[191:8]};
          reply_left <= reply_left - 1'b1;
          if (reply_left == 5'd1) state <= S_OP;
        end
        default: state <= S_OP;
      endcase
    end
  end

endmodule
