// tb_unary_converter_bank: shifts random input vectors into a reduced bank in
// beats of LANES words, runs a frame of 2^K steps and records the input lines
// after each step. For every component it checks that the line carries
// exactly X_n ones (X_n being the n-th word sent), that they are contiguous at
// the start (down frames) or the end (up frames) of the frame, that the
// direction alternates, and that the lines hold still while the next vector
// is loaded.
module tb_unary_converter_bank;
  localparam int unsigned N = 16, K = 4, LANES = 4, J = 2 ** K;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, start = 1'b0, step = 1'b0;
  logic [LANES-1:0][K-1:0] in_words = '0;
  logic dir_up;
  logic [N-1:0] x_lines;
  int checks = 0, failures = 0;

  unary_converter_bank #(.N(N), .K(K), .LANES(LANES), .ALTERNATE(1'b1)) dut (.*);

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
    int x [N];
    logic [J-1:0] series [N];
    logic [N-1:0] held;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int v = 0; v < 30; v++) begin
      for (int n = 0; n < N; n++) x[n] = (v == 0) ? n : int'($urandom_range(J - 1));
      held = x_lines;
      for (int b = 0; b < N / LANES; b++) begin
        load = 1'b1;
        for (int l = 0; l < LANES; l++) in_words[l] = K'(x[b * LANES + l]);
        @(negedge clk);
        check(x_lines == held, "lines hold during load");
      end
      load = 1'b0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      check(dir_up == v[0], $sformatf("vector %0d direction %0d", v, dir_up));
      for (int s = 0; s < J; s++) begin
        step = 1'b1;
        @(negedge clk);
        for (int n = 0; n < N; n++) series[n][s] = x_lines[n];
      end
      step = 1'b0;
      for (int n = 0; n < N; n++) begin
        logic [J-1:0] exp;
        for (int s = 0; s < J; s++) exp[s] = dir_up ? (s >= J - x[n]) : (s < x[n]);
        check(series[n] == exp, $sformatf("vector %0d component %0d: %b expected %b",
                                          v, n, series[n], exp));
      end
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
