// integrator -- forward-Euler state variable of the lung model.
//
// Holds one state of the model and, on every clock edge where step_en is
// high (one simulated time step), replaces it with state + funct * dt, as the
// integrator process of the source's SystemC model does. funct is the
// derivative from the model and dt the time step in the same integer units
// (the source writes dt = 1: the derivative is expressed per time step).
// The product is kept to W bits, two's complement, like the source's 32-bit
// arithmetic; the use of signed numbers is this design's choice so that
// flows can reverse on exhalation.
//
// Ports: step_en advances the state; out is the registered state, valid one
// cycle after the step. rst_n (active low, synchronous) loads INIT.
module integrator #(
  parameter int unsigned       W    = 32,
  parameter logic signed [W-1:0] INIT = '0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                step_en,
  input  logic signed [W-1:0] dt,
  input  logic signed [W-1:0] funct,
  output logic signed [W-1:0] out
);

  logic signed [W-1:0] state;
  logic signed [W-1:0] incr;

  always_comb incr = W'(funct * dt);

  always_ff @(posedge clk) begin
    if (!rst_n)       state <= INIT;
    else if (step_en) state <= state + incr;
  end

  assign out = state;

endmodule
