// resp_mockup -- the two-compartment lung as a lock-stepped digital mockup.
//
// Wires resp_model to four integrators (Qbr, Vbr, Qalv, Valv), as the source's
// SystemC top does, with dt = 1. All four states advance together on a
// step_en pulse, so one pulse is exactly one simulated time step (2^-8 s in
// the source). The model is combinational, so a step takes one clock cycle;
// step_done goes high in the cycle after step_en, when the new states and the
// observables derived from them are valid.
//
// obs carries the four transducer values sent to the ventilator: airway
// pressure (the input pair), lung pressure (alveolar pressure), flow (into
// the bronchi) and volume (sum of both compartments). Which model signal
// stands for which transducer, and the initial state (both compartments at
// rest volume, concentration 1.0), are this design's choices.
module resp_mockup
  import dm_pkg::*;
#(
  parameter fix_t DT      = 32'sd1,          // time step in integrator units
  parameter fix_t VBR_0   = 32'sh0000_9600,
  parameter fix_t COM_BR  = 32'sh0000_0100,
  parameter fix_t VALV_0  = 32'sh0009_C400,
  parameter fix_t COM_ALV = 32'sh0000_1000,
  parameter fix_t RBR     = 32'sh0000_0800,
  parameter fix_t RALV    = 32'sh0000_0400,
  parameter fix_t CAIR    = 32'sh0000_0100
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step_en,
  input  fix_t pair,
  output logic step_done,
  output obs_t obs,
  output fix_t qbr,
  output fix_t vbr,
  output fix_t qalv,
  output fix_t valv,
  output fix_t cbr,
  output fix_t calv
);

  fix_t qbr_t, vbr_t, qalv_t, valv_t;
  fix_t pbr, palv, fbr, falv;

  resp_model #(
    .VBR_0(VBR_0), .COM_BR(COM_BR), .VALV_0(VALV_0), .COM_ALV(COM_ALV),
    .RBR(RBR), .RALV(RALV), .CAIR(CAIR)
  ) u_model (
    .qbr, .vbr, .qalv, .valv, .pair,
    .qbr_t, .vbr_t, .qalv_t, .valv_t,
    .pbr, .palv, .fbr, .falv, .cbr, .calv
  );

  integrator #(.W(FW), .INIT(VBR_0))
    u_int_qbr  (.clk, .rst_n, .step_en, .dt(DT), .funct(qbr_t),  .out(qbr));
  integrator #(.W(FW), .INIT(VBR_0))
    u_int_vbr  (.clk, .rst_n, .step_en, .dt(DT), .funct(vbr_t),  .out(vbr));
  integrator #(.W(FW), .INIT(VALV_0))
    u_int_qalv (.clk, .rst_n, .step_en, .dt(DT), .funct(qalv_t), .out(qalv));
  integrator #(.W(FW), .INIT(VALV_0))
    u_int_valv (.clk, .rst_n, .step_en, .dt(DT), .funct(valv_t), .out(valv));

  always_ff @(posedge clk) begin
    if (!rst_n) step_done <= 1'b0;
    else        step_done <= step_en;
  end

  always_comb begin
    obs.paw   = pair;
    obs.plung = palv;
    obs.flow  = fbr;
    obs.vol   = vbr + valv;
  end

endmodule
