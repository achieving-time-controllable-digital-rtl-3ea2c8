// resp_model -- right-hand side of the two-compartment respiratory model.
//
// One bronchial and one alveolar compartment. From the four integrated
// states (gas quantity Q and volume V of each compartment) and the airway
// pressure Pair applied by the ventilator it computes, in one combinational
// pass, the four derivatives and the observable pressures, flows and
// concentrations:
//
//   Cbr   = Qbr / Vbr                      (source)
//   Calv  = Qalv / Valv                    (by analogy with Cbr)
//   Pbr   = (Vbr  - VBR_0)  / COM_BR       (source constants; see below)
//   Palv  = (Valv - VALV_0) / COM_ALV      (by analogy with Pbr)
//   Fbr   = (Pair - Pbr)  / RBR            (source)
//   Falv  = (Pbr  - Palv) / RALV           (by analogy with Fbr)
//   dQbr  = Fbr*(Cair + Cbr) + Falv*(Calv - Cbr)   (source)
//   dQalv = Falv*(Cbr + Calv)                      (source)
//   dVbr  = Fbr - Falv,  dValv = Falv      (volume balance, this design)
//
// The source's pressure line, read with C operator precedence, subtracts
// VBR_0/COM_BR from the volume; this design uses the compliance relation
// (V - V0)/C instead. All values are Q23.8 (see dm_pkg). Only VBR_0 and
// COM_BR are published; the other constants are this design's choice and
// give stable forward-Euler steps (time constants of 8 and 64 steps).
module resp_model
  import dm_pkg::*;
#(
  parameter fix_t VBR_0   = 32'sh0000_9600,  // 150.0
  parameter fix_t COM_BR  = 32'sh0000_0100,  // 1.0
  parameter fix_t VALV_0  = 32'sh0009_C400,  // 2500.0
  parameter fix_t COM_ALV = 32'sh0000_1000,  // 16.0
  parameter fix_t RBR     = 32'sh0000_0800,  // 8.0
  parameter fix_t RALV    = 32'sh0000_0400,  // 4.0
  parameter fix_t CAIR    = 32'sh0000_0100   // 1.0
) (
  input  fix_t qbr,
  input  fix_t vbr,
  input  fix_t qalv,
  input  fix_t valv,
  input  fix_t pair,
  output fix_t qbr_t,
  output fix_t vbr_t,
  output fix_t qalv_t,
  output fix_t valv_t,
  output fix_t pbr,
  output fix_t palv,
  output fix_t fbr,
  output fix_t falv,
  output fix_t cbr,
  output fix_t calv
);

  always_comb begin
    cbr    = fdiv(qbr, vbr);
    calv   = fdiv(qalv, valv);
    pbr    = fdiv(vbr - VBR_0, COM_BR);
    palv   = fdiv(valv - VALV_0, COM_ALV);
    fbr    = fdiv(pair - pbr, RBR);
    falv   = fdiv(pbr - palv, RALV);
    qbr_t  = fmul(fbr, CAIR + cbr) + fmul(falv, calv - cbr);
    qalv_t = fmul(falv, cbr + calv);
    vbr_t  = fbr - falv;
    valv_t = falv;
  end

endmodule
