// tb_resp_mockup -- self-checking test of the lock-stepped lung mockup.
//
// Runs the mockup through an inhale (airway pressure 10.0) and an exhale
// (0.0), with idle cycles between steps, and compares all four states after
// every step with the reference model. Also checks: states do not move
// without step_en, step_done follows step_en by one cycle, the observables
// are derived as documented, the lung fills during inhale and empties during
// exhale.
module tb_resp_mockup;
  import dm_pkg::*;
  import lung_ref_pkg::*;

  logic clk = 0, rst_n, step_en, step_done;
  fix_t pair, qbr, vbr, qalv, valv, cbr, calv;
  obs_t obs;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  resp_mockup dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t s;
    der_t d;
    int vol_start, vol_peak;
    rst_n = 0; step_en = 0; pair = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    s = init_state();
    check(qbr == s.qbr && vbr == s.vbr && qalv == s.qalv && valv == s.valv, "reset state");
    vol_start = obs.vol;
    for (int i = 0; i < 600; i++) begin
      pair = (i < 300) ? 32'sh0A00 : 32'sh0;
      if (i == 300) vol_peak = obs.vol;
      // idle cycles: nothing may change
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk); #1;
        check(step_done == 0, "no step_done when idle");
        check(qbr == s.qbr && vbr == s.vbr && qalv == s.qalv && valv == s.valv, "hold");
      end
      step_en = 1;
      @(posedge clk); #1;
      step_en = 0;
      check(step_done == 1, "step_done one cycle after step_en");
      s = step(s, pair);
      check(qbr == s.qbr && vbr == s.vbr && qalv == s.qalv && valv == s.valv,
            $sformatf("step %0d state", i));
      d = rhs(s, pair);
      check(obs.paw == pair && obs.plung == d.palv && obs.flow == d.fbr &&
            obs.vol == s.vbr + s.valv, $sformatf("step %0d observables", i));
    end
    check(vol_peak > vol_start + 32'sh1000, "lung fills on inhale");
    check(obs.vol < vol_peak - 32'sh1000, "lung empties on exhale");
    $display("volume rest %0d peak %0d end %0d (Q.8)", vol_start, vol_peak, obs.vol);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
