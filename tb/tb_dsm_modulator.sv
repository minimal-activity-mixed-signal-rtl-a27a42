// tb_dsm_modulator: drives the modulator with random row charges for a
// 16-cycle coarse pass and checks that the number of comparator ones is the
// integrated charge divided by full scale (rounded down), that the sampled
// residue is the remainder, and that a 16-cycle fine pass on the residue
// yields floor(16 * residue / full scale) ones. Values are worked out in the
// testbench from the charges it applied.
module tb_dsm_modulator;
  localparam int unsigned FS = 256, P = 16;
  localparam int unsigned UW = $clog2(FS + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic clr = 1'b0, sample = 1'b0, en = 1'b0, fine = 1'b0;
  logic [UW-1:0] u = '0, residue;
  logic bit_out;
  int checks = 0, failures = 0;

  dsm_modulator #(.FULL_SCALE(FS)) dut (.*);

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
    int sum, ones, fones, exp_res;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 200; t++) begin
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      sum = 0; ones = 0;
      for (int s = 0; s < P; s++) begin
        en = 1'b1;
        case (t % 4)
          0: u = UW'($urandom_range(FS));
          1: u = UW'(FS);                     // full scale every cycle
          2: u = '0;
          default: u = UW'($urandom_range(FS / 8));
        endcase
        if (s == P - 1 && t % 4 == 1) u = '0; // unary frames leave one slot empty
        sum += int'(u);
        #1 ones += int'(bit_out);
        @(negedge clk);
      end
      en = 1'b0;
      sample = 1'b1; @(negedge clk); sample = 1'b0;
      exp_res = sum % FS;
      check(ones == sum / FS, $sformatf("coarse ones %0d for charge %0d", ones, sum));
      check(int'(residue) == exp_res, $sformatf("residue %0d expected %0d", residue, exp_res));
      fones = 0;
      for (int s = 0; s < P; s++) begin
        en = 1'b1; fine = 1'b1; u = UW'($urandom_range(FS));  // ignored in the fine pass
        #1 fones += int'(bit_out);
        @(negedge clk);
      end
      en = 1'b0; fine = 1'b0;
      check(fones == (P * exp_res) / FS, $sformatf("fine ones %0d for residue %0d", fones, exp_res));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
