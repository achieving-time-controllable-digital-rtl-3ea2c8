// dm_pkg -- shared types and constants of the digital lung mockup.
//
// All model quantities are signed 32-bit fixed-point numbers with FRAC = 8
// fractional bits (Q23.8). The 8-bit fraction is this design's choice: it
// makes the published compliance constant 0x100 equal to 1.0 and the
// published rest volume 0x9600 equal to 150.0, and matches the 2^-8 s time
// step. fmul/fdiv are the fixed-point product and quotient used by the model;
// a division by zero returns 0 instead of trapping.
//
// The debug opcodes (PC -> mockup) and sync codes (mockup -> ventilator)
// are this design's own byte encoding; the source only names the commands
// Start, Stop, Step, Read and Profile, a user-set rate and breakpoints set in
// simulated time.
package dm_pkg;

  localparam int unsigned FRAC = 8;
  localparam int unsigned FW   = 32;

  typedef logic signed [FW-1:0] fix_t;

  // Q23.8 product, truncated back to 32 bits
  function automatic fix_t fmul(fix_t a, fix_t b);
    logic signed [2*FW-1:0] p;
    p = a * b;
    return fix_t'(p >>> FRAC);
  endfunction

  // Q23.8 quotient a / b; b == 0 gives 0
  function automatic fix_t fdiv(fix_t a, fix_t b);
    logic signed [FW+FRAC-1:0] n;
    logic signed [FW+FRAC-1:0] d;
    n = {a, {FRAC{1'b0}}};
    d = (FW+FRAC)'(b);
    if (b == '0) return '0;
    return fix_t'(n / d);
  endfunction

  // the four transducer values the mockup feeds to the ventilator
  typedef struct packed {
    fix_t paw;    // airway pressure
    fix_t plung;  // lung (alveolar) pressure
    fix_t flow;   // airway flow into the lung
    fix_t vol;    // total lung volume
  } obs_t;

  // debug command opcodes received on the PC serial link
  typedef enum logic [7:0] {
    OP_START   = 8'h01,  // run continuously at the programmed rate
    OP_STOP    = 8'h02,  // freeze simulated time
    OP_STEP    = 8'h03,  // + 2 bytes (LSB first): advance N time steps
    OP_READ    = 8'h04,  // reply 24 bytes: airway p, lung p, flow, volume,
                         //   bronchial and alveolar gas concentration
    OP_PROFILE = 8'h05,  // reply 12 bytes: step count, active clock cycles,
                         //   cycles a due step waited on the links
    OP_RATE    = 8'h06,  // + 4 bytes: clock cycles per time step, 0 = full speed
    OP_BREAK   = 8'h07   // + 4 bytes: freeze time once the step count reaches
                         //   this value; 0 clears the breakpoint
  } opcode_e;

  // codes sent on the synchronization channel to the ventilator
  typedef enum logic [7:0] {
    SYNC_TICK  = 8'h54,  // one simulated time step has elapsed
    SYNC_START = 8'h53,  // time is running
    SYNC_STOP  = 8'h50,  // time is frozen
    SYNC_RATE  = 8'h52   // + 4 bytes (LSB first): new clock cycles per step
  } sync_e;

endpackage
