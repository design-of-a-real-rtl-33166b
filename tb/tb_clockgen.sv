// tb_clockgen: checks the two-phase clock generator.
//
// Drives DOTCLOCK_L at 10 MHz with a 55/45 duty cycle and samples every time unit:
// PHASE1 and PHASE2 must never be high together, PHASE1 must be high in the middle
// of each low half of DOTCLOCK_L and PHASE2 in the middle of each high half, and
// each phase must give one pulse per clock period.
module tb_clockgen;
  logic dot = 1'b1;
  logic phase1, phase2;
  int checks = 0, failures = 0;
  int p1_rises = 0, p2_rises = 0;

  clockgen dut (.dotclock_l(dot), .phase1, .phase2);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge phase1) p1_rises++;
  always @(posedge phase2) p2_rises++;

  initial begin
    #200;
    for (int k = 0; k < 200; k++) begin
      dot = 1'b1;
      for (int t = 0; t < 55; t++) begin
        #1;
        check(!(phase1 && phase2), "phases overlap");
        if (t == 30) check(phase2 && !phase1, "PHASE2 during DOTCLOCK_L high");
      end
      dot = 1'b0;
      for (int t = 0; t < 45; t++) begin
        #1;
        check(!(phase1 && phase2), "phases overlap");
        if (t == 25) check(phase1 && !phase2, "PHASE1 during DOTCLOCK_L low");
      end
    end
    check(p1_rises >= 199 && p1_rises <= 201, "PHASE1 one pulse per period");
    check(p2_rises >= 199 && p2_rises <= 201, "PHASE2 one pulse per period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
