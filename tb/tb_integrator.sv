// tb_integrator -- self-checking test of the forward-Euler integrator.
//
// Checks the reset value, that the state holds without step_en, and that each
// step adds funct*dt (32-bit wraparound), for random derivatives, positive
// and negative, and dt of 1 (the source's value) and other values. The new
// state must be visible in the cycle after step_en.
module tb_integrator;
  logic clk = 0;
  logic rst_n;
  logic step_en;
  logic signed [31:0] dt, funct, out;
  int checks = 0, failures = 0;
  longint model;

  always #5 clk = ~clk;

  integrator #(.W(32), .INIT(32'sd1234)) dut (.clk, .rst_n, .step_en, .dt, .funct, .out);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; step_en = 0; dt = 1; funct = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(out == 1234, "reset value");
    model = 1234;
    for (int i = 0; i < 400; i++) begin
      step_en = ($urandom_range(0, 2) != 0);
      funct   = $signed($urandom_range(0, 2000)) - 1000;
      if (i % 50 == 49) funct = 32'sh7fff_0000;        // wraps
      dt      = (i < 200) ? 1 : $signed($urandom_range(0, 6)) - 3;
      if (step_en) model = longint'(int'(model + longint'(int'(longint'(funct) * dt))));
      @(posedge clk); #1;
      check(out == int'(model), $sformatf("step %0d: out %0d exp %0d", i, out, int'(model)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
