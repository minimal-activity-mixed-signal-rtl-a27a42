// tb_sorted_unary_converter: for every input value, in both sort directions,
// loads the converter, runs one frame of 2^K steps and checks the emitted
// series against the expected sorted code: down = X ones then zeros, up =
// 2^K-X zeros then X ones. Also checks that dout shows the loaded word and
// that frames alternating down/up switch the line at most once per vector.
module tb_sorted_unary_converter;
  localparam int unsigned K = 4;
  localparam int unsigned J = 2 ** K;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, start = 1'b0, dir_up = 1'b0, step = 1'b0;
  logic [K-1:0] din = '0, dout;
  logic unary;
  int checks = 0, failures = 0;

  sorted_unary_converter #(.K(K)) dut (.*);

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

  // runs one frame and returns the emitted series, slot 0 in bit 0
  task automatic frame(input logic [K-1:0] x, input bit up, output logic [J-1:0] series);
    load = 1'b1; din = x;
    @(negedge clk);
    load = 1'b0;
    check(dout == x, $sformatf("dout shows loaded %0d", x));
    start = 1'b1; dir_up = up;
    @(negedge clk);
    start = 1'b0;
    for (int s = 0; s < J; s++) begin
      step = 1'b1;
      series[s] = unary;
      @(negedge clk);
    end
    step = 1'b0;
  endtask

  initial begin
    logic [J-1:0] got, exp;
    int prev, trans, vecs;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int up = 0; up < 2; up++) begin
      for (int x = 0; x < J; x++) begin
        frame(K'(x), up[0], got);
        for (int s = 0; s < J; s++) exp[s] = up ? (s >= J - x) : (s < x);
        check(got == exp, $sformatf("x=%0d up=%0d series %b expected %b", x, up, got, exp));
        check($countones(got) == x, $sformatf("x=%0d up=%0d: ones", x, up));
      end
    end
    // alternating directions on random data: at most one transition per vector
    prev = 0; trans = 0; vecs = 0;
    for (int v = 0; v < 200; v++) begin
      frame(K'($urandom), v[0], got);
      for (int s = 0; s < J; s++) begin
        if (int'(got[s]) != prev) trans++;
        prev = int'(got[s]);
      end
      vecs++;
    end
    check(trans <= vecs, $sformatf("%0d transitions over %0d alternating vectors", trans, vecs));
    check(trans > vecs / 2, "random data does switch the line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
