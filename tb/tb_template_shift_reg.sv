// tb_template_shift_reg: loads random rows through the even and odd template
// shift registers and checks every bit line against the column mapping
// worked out in the testbench (k-th bit sent of a burst of COLS/2 lands in
// column 2k for the even register, 2k+1 for the odd register). Also checks
// that the lines hold while shift is low.
module tb_template_shift_reg;
  localparam int unsigned COLS = 256;
  localparam int unsigned HALF = COLS / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic shift = 1'b0, din_even = 1'b0, din_odd = 1'b0;
  logic [COLS-1:0] bit_lines;
  int checks = 0, failures = 0;

  template_shift_reg #(.COLS(COLS)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
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
    logic [COLS-1:0] row;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(bit_lines == '0, "lines are zero after reset");
    for (int t = 0; t < 20; t++) begin
      for (int c = 0; c < COLS; c++) row[c] = 1'($urandom);
      for (int k = 0; k < HALF; k++) begin
        shift = 1'b1;
        din_even = row[2*k];
        din_odd  = row[2*k+1];
        @(negedge clk);
      end
      shift = 1'b0;
      check(bit_lines == row, $sformatf("row %0d on the bit lines", t));
      din_even = 1'b1; din_odd = 1'b1;
      repeat (3) @(negedge clk);
      check(bit_lines == row, $sformatf("row %0d held without shift", t));
    end
    // one extra shift moves every bit one even/odd column pair down
    shift = 1'b1; din_even = 1'b1; din_odd = 1'b0;
    @(negedge clk);
    shift = 1'b0;
    check(bit_lines == {1'b0, 1'b1, row[COLS-1:2]}, "single shift moves one column pair");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
