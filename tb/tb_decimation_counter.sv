// tb_decimation_counter: feeds random bit streams in a coarse and a fine
// pass and checks the code is coarse_ones * 16 + fine_ones, that bits with
// en low are not counted, that clr restarts the count, and that a count past
// the top saturates at 255 with overflow set.
module tb_decimation_counter;
  localparam int unsigned SUB = 4, W = 2 * SUB;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clr = 1'b0, en = 1'b0, fine = 1'b0, bit_in = 1'b0;
  logic [W-1:0] code;
  logic overflow;
  int checks = 0, failures = 0;

  decimation_counter #(.SUB(SUB)) dut (.*);

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
    int c1, c2;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      check(code == '0 && !overflow, "clr zeroes the count");
      c1 = 0; c2 = 0;
      for (int s = 0; s < 16; s++) begin
        en = (s != 15);                 // last coarse bit offered with en low
        bit_in = 1'($urandom);
        if (en && bit_in) c1++;
        @(negedge clk);
      end
      for (int s = 0; s < 15; s++) begin
        en = 1'b1; fine = 1'b1;
        bit_in = 1'($urandom);
        if (bit_in) c2++;
        @(negedge clk);
      end
      en = 1'b0; fine = 1'b0;
      check(int'(code) == c1 * 16 + c2, $sformatf("code %0d expected %0d", code, c1 * 16 + c2));
      check(!overflow, "no overflow in range");
    end
    // saturation
    clr = 1'b1; @(negedge clk); clr = 1'b0;
    en = 1'b1; bit_in = 1'b1;
    repeat (17) @(negedge clk);
    en = 1'b0;
    check(code == 8'd255 && overflow, "17 coarse ones saturate with overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
