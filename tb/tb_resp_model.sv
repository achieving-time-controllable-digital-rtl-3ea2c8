// tb_resp_model -- self-checking test of the lung model's right-hand side.
//
// Hand-worked points first: at rest (both compartments at rest volume,
// concentration 1.0, no airway pressure) every derivative is zero; with an
// airway pressure of 8.0 the bronchial inflow is 8.0/RBR = 1.0 and the gas
// inflow 1.0 * (1.0 + 1.0) = 2.0. Then random states near the operating
// point are compared with the 64-bit reference in lung_ref_pkg.
module tb_resp_model;
  import dm_pkg::*;
  import lung_ref_pkg::*;

  fix_t qbr, vbr, qalv, valv, pair;
  fix_t qbr_t, vbr_t, qalv_t, valv_t, pbr, palv, fbr, falv, cbr, calv;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  resp_model dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t  s;
    der_t d;
    // rest point
    qbr = 32'h9600; vbr = 32'h9600; qalv = 32'h9C400; valv = 32'h9C400; pair = 0;
    #1;
    check(cbr == 32'h100 && calv == 32'h100, "rest concentrations 1.0");
    check(pbr == 0 && palv == 0 && fbr == 0 && falv == 0, "rest pressures and flows 0");
    check(qbr_t == 0 && vbr_t == 0 && qalv_t == 0 && valv_t == 0, "rest derivatives 0");
    // airway pressure 8.0
    pair = 32'h800;
    #1;
    check(fbr == 32'h100, "fbr = 8.0/8.0");
    check(vbr_t == 32'h100, "vbr_t = 1.0");
    check(qbr_t == 32'h200, "qbr_t = 1.0*(1.0+1.0)");
    check(valv_t == 0 && qalv_t == 0, "alveolus untouched in first instant");
    // bronchus over-inflated by 4.0: pbr = 4.0, falv = 4.0/4.0 = 1.0, fbr = -0.5
    pair = 0; vbr = 32'h9600 + 32'h400;
    #1;
    check(pbr == 32'h400, "pbr = (vbr-VBR_0)/1.0");
    check(falv == 32'h100, "falv = 4.0/4.0");
    check(fbr == -32'sh80, "fbr = -4.0/8.0");
    check(valv_t == 32'h100 && vbr_t == -32'sh180, "volume balance");
    // random points against the reference
    for (int i = 0; i < 2000; i++) begin
      vbr  = 32'h9600  + $signed($urandom_range(0, 32'h4000)) - 32'h2000;
      qbr  = vbr       + $signed($urandom_range(0, 32'h2000)) - 32'h1000;
      valv = 32'h9C400 + $signed($urandom_range(0, 32'h40000)) - 32'h20000;
      qalv = valv      + $signed($urandom_range(0, 32'h20000)) - 32'h10000;
      pair = $signed($urandom_range(0, 32'h2000)) - 32'h800;
      if (i == 7) vbr = 0;   // division by zero gives 0
      #1;
      s.qbr = qbr; s.vbr = vbr; s.qalv = qalv; s.valv = valv;
      d = rhs(s, pair);
      check(cbr == d.cbr && calv == d.calv, $sformatf("conc %0d", i));
      check(pbr == d.pbr && palv == d.palv, $sformatf("press %0d", i));
      check(fbr == d.fbr && falv == d.falv, $sformatf("flow %0d", i));
      check(qbr_t == d.qbr_t && qalv_t == d.qalv_t, $sformatf("dq %0d: %0d/%0d %0d/%0d",
            i, qbr_t, d.qbr_t, qalv_t, d.qalv_t));
      check(vbr_t == d.vbr_t && valv_t == d.valv_t, $sformatf("dv %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
