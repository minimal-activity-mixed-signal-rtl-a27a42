// tb_dsm_adc: runs full conversions (clear, 16 coarse cycles of random row
// charge, sample, 16 fine cycles) and checks the 8-bit code against
// floor(16 * S / FULL_SCALE), S being the charge applied, worked out in the
// testbench. Checks that a conversion takes 32 enabled cycles, the rate the
// ADC is specified for, and that the code holds after the conversion.
module tb_dsm_adc;
  localparam int unsigned FS = 256, SUB = 4, P = 2 ** SUB;
  localparam int unsigned UW = $clog2(FS + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic clr = 1'b0, sample = 1'b0, en = 1'b0, fine = 1'b0;
  logic [UW-1:0] u = '0;
  logic [2*SUB-1:0] code;
  logic overflow;
  int checks = 0, failures = 0;

  dsm_adc #(.FULL_SCALE(FS), .SUB(SUB)) dut (.*);

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
    int sum, cycles, exp;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      sum = 0; cycles = 0;
      for (int s = 0; s < P; s++) begin
        en = 1'b1;
        u = (s == P - 1) ? '0 : UW'($urandom_range(t % 3 == 0 ? FS : FS / 4));
        sum += int'(u);
        cycles++;
        @(negedge clk);
      end
      en = 1'b0;
      sample = 1'b1; @(negedge clk); sample = 1'b0;
      for (int s = 0; s < P; s++) begin
        en = 1'b1; fine = 1'b1;
        cycles++;
        @(negedge clk);
      end
      en = 1'b0; fine = 1'b0;
      exp = (P * sum) / FS;
      check(int'(code) == exp, $sformatf("code %0d expected %0d for charge %0d", code, exp, sum));
      check(!overflow, "no overflow");
      check(cycles == 32, "32 ADC cycles per 8-bit conversion");
      repeat (2) @(negedge clk);
      check(int'(code) == exp, "code holds after conversion");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
