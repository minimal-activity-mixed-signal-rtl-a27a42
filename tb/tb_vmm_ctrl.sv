// tb_vmm_ctrl: runs the sequencer through several products with random gaps
// in the input beats and records its strobes cycle by cycle. Checks that
// exactly BEATS beats are accepted per product, then one start, J steps,
// J coarse ADC cycles beginning the cycle after the first step, one sample
// after the coarse pass, FINE fine cycles, and out_valid exactly
// J + FINE + 4 cycles after the last accepted beat; and that no beat is
// accepted outside the load phase.
module tb_vmm_ctrl;
  import vmm_pkg::*;
  localparam int unsigned BEATS = 32, J = 16, FINE = 16;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic in_ready, load, start, step, adc_clr, adc_en, adc_fine, adc_sample, out_valid;
  phase_e phase;
  int checks = 0, failures = 0;

  vmm_ctrl #(.BEATS(BEATS), .J(J), .FINE(FINE)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int cyc, beats, last_beat, start_cyc, first_step, steps, coarse, first_coarse;
    int sample_cyc, fines;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    cyc = 0;
    for (int v = 0; v < 6; v++) begin
      beats = 0; steps = 0; coarse = 0; fines = 0;
      start_cyc = -1; first_step = -1; first_coarse = -1; sample_cyc = -1;
      forever begin
        @(negedge clk);
        in_valid = (v % 2 == 0) ? 1'b1 : 1'($urandom);
        #1;
        cyc++;
        if (load) begin
          beats++; last_beat = cyc;
          check(phase == PH_LOAD, "beats only in the load phase");
        end
        if (start) begin
          start_cyc = cyc;
          check(adc_clr, "ADCs cleared at start");
          check(beats == BEATS, $sformatf("%0d beats before start", beats));
          check(cyc == last_beat + 1, "start follows the last beat");
        end
        if (step) begin
          if (first_step < 0) first_step = cyc;
          steps++;
        end
        if (adc_en && !adc_fine) begin
          if (first_coarse < 0) first_coarse = cyc;
          coarse++;
        end
        if (adc_sample) sample_cyc = cyc;
        if (adc_en && adc_fine) begin
          fines++;
          check(sample_cyc > 0 && cyc > sample_cyc, "fine pass after the sample");
        end
        if (out_valid) break;
      end
      check(steps == J, $sformatf("%0d steps", steps));
      check(first_step == start_cyc + 1, "steps follow start");
      check(coarse == J, $sformatf("%0d coarse ADC cycles", coarse));
      check(first_coarse == first_step + 1, "coarse pass lags the steps by one cycle");
      check(sample_cyc == first_coarse + J, "sample right after the coarse pass");
      check(fines == FINE, $sformatf("%0d fine cycles", fines));
      check(cyc == last_beat + J + FINE + 4, $sformatf("latency %0d", cyc - last_beat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
