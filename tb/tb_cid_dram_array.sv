// tb_cid_dram_array: writes random template rows into a reduced array and
// checks every row output against a reference copy of the stored bits, for
// random input line patterns, in the AND and the XOR configuration. It then
// checks retention: with no refresh a half row loses its ones after
// RETENTION cycles, while one refreshed in time keeps them, and a refresh of
// the even columns does not save the odd columns.
module tb_cid_dram_array;
  localparam int unsigned COLS = 32;
  localparam int unsigned ROWS = 8;
  localparam int unsigned RETENTION = 100;
  localparam int unsigned RW = $clog2(ROWS);
  localparam int unsigned YW = $clog2(COLS + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, ref_sel_even = 1'b0, ref_sel_odd = 1'b0, xor_mode = 1'b0;
  logic [RW-1:0] wr_row = '0, ref_row = '0;
  logic [COLS-1:0] bit_lines = '0, x_lines = '0;
  logic [ROWS-1:0][YW-1:0] y;
  logic [COLS-1:0] ref_mem [ROWS];
  int checks = 0, failures = 0;

  cid_dram_array #(.COLS(COLS), .ROWS(ROWS), .RETENTION(RETENTION)) dut (.*);

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

  function automatic int count_and(input logic [COLS-1:0] w, input logic [COLS-1:0] x, input bit xm);
    int n = 0;
    for (int c = 0; c < COLS; c++) n += xm ? int'(w[c] != x[c]) : int'(w[c] && x[c]);
    return n;
  endfunction

  task automatic write_row(input int r, input logic [COLS-1:0] d);
    wr_en = 1'b1; wr_row = RW'(r); bit_lines = d;
    @(negedge clk);
    wr_en = 1'b0;
    ref_mem[r] = d;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    x_lines = '1;
    #1 for (int r = 0; r < ROWS; r++) check(y[r] == '0, "cells clear after reset");
    for (int r = 0; r < ROWS; r++) write_row(r, COLS'($urandom));
    for (int t = 0; t < 40; t++) begin
      x_lines = COLS'($urandom);
      xor_mode = t[0];
      #1;
      for (int r = 0; r < ROWS; r++)
        check(int'(y[r]) == count_and(ref_mem[r], x_lines, xor_mode),
              $sformatf("row %0d charge %0d (xor=%0d)", r, y[r], xor_mode));
      @(negedge clk);
    end
    // all-ones row gives full scale
    write_row(3, '1);
    xor_mode = 1'b0; x_lines = '1;
    #1 check(int'(y[3]) == COLS, "full row gives full-scale charge");
    // retention: rewrite rows 0 and 1, refresh row 0 both halves and row 1
    // only its even half, once, halfway through the retention time
    write_row(0, '1);
    write_row(1, '1);
    repeat (RETENTION / 2) @(negedge clk);
    ref_row = 0; ref_sel_even = 1'b1; @(negedge clk); ref_sel_even = 1'b0;
    ref_row = 0; ref_sel_odd  = 1'b1; @(negedge clk); ref_sel_odd  = 1'b0;
    ref_row = 1; ref_sel_even = 1'b1; @(negedge clk); ref_sel_even = 1'b0;
    repeat (RETENTION / 2 + 5) @(negedge clk);
    check(int'(y[0]) == COLS, "refreshed row keeps its charge");
    check(int'(y[1]) == COLS / 2, "row with only even columns refreshed keeps half");
    check(y[2] == '0 || ref_mem[2] == '0, "unrefreshed row has leaked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
