// tb_refresh_ctrl: watches the refresh strobes of a reduced controller and
// checks the spacing of PERIOD cycles, the alternation even/odd/even/...,
// that exactly one select is high per refresh, that the row advances after
// each odd refresh and wraps after the last row, and that enable low pauses
// the sequence.
module tb_refresh_ctrl;
  localparam int unsigned ROWS = 6, PERIOD = 5;
  localparam int unsigned RW = $clog2(ROWS);

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic ref_en, sel_even, sel_odd;
  logic [RW-1:0] ref_row;
  int checks = 0, failures = 0;

  refresh_ctrl #(.ROWS(ROWS), .PERIOD(PERIOD)) dut (.*);

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
    int cyc, last, nref, exp_row;
    bit exp_odd;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    enable = 1'b1;
    cyc = 0; last = -1; nref = 0; exp_row = 0; exp_odd = 0;
    for (int k = 0; k < 4 * ROWS * PERIOD; k++) begin
      @(negedge clk);
      cyc++;
      if (ref_en) begin
        check(cyc - last == PERIOD || (last < 0 && cyc == PERIOD),
              $sformatf("refresh spacing %0d", cyc - last));
        check(sel_odd == exp_odd && sel_even == !exp_odd, "even/odd alternation");
        check(int'(ref_row) == exp_row, $sformatf("row %0d expected %0d", ref_row, exp_row));
        if (exp_odd) exp_row = (exp_row + 1) % ROWS;
        exp_odd = !exp_odd;
        last = cyc; nref++;
      end else begin
        check(!sel_even && !sel_odd, "selects idle between refreshes");
      end
    end
    check(nref == 4 * ROWS, $sformatf("%0d refreshes", nref));
    enable = 1'b0;
    repeat (3 * PERIOD) begin
      @(negedge clk);
      check(!ref_en, "paused while enable is low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
