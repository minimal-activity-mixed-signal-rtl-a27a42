// tb_sort_energy: input switching activity of the sorted unary converter
// against the plain binary-to-unary converter, for input depths K = 2..8 on
// random data with independent, equiprobable bits (Bernoulli data).
// The plain converter, modelled here, presents bit k of each word 2^k times
// (k = 0 first), so its line switches whenever adjacent bits differ, about
// K/2 times per word. The converter under test sorts the ones of each word
// together and alternates the sort direction between words. Array dynamic
// power is proportional to line transitions, so the ratio of the two counts
// is the gain in array energy efficiency. Each K is checked for a gain of at
// least 0.9 * K/2 (K/2 being the expected figure, with room for the
// statistics of a finite sample) and for at most one transition per word
// (plus one for the starting level). A second converter per K always sorts
// in the same direction and is checked for at most two transitions per word.
// The gains are printed per K.
module tb_sort_energy;
  localparam int unsigned KMIN = 2, KMAX = 8, NWORDS = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  int done_cnt = 0;

  always #5 clk = !clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
  end

  for (genvar K = KMIN; K <= KMAX; K++) begin : g_k
    localparam int unsigned J = 2 ** K;
    logic load = 1'b0, start = 1'b0, dir_up = 1'b0, step = 1'b0;
    logic [K-1:0] din = '0, dout;
    logic unary, unary_1dir;
    logic [K-1:0] dout_1dir;

    sorted_unary_converter #(.K(K)) dut (
      .clk(clk), .rst_n(rst_n), .load(load), .din(din), .dout(dout),
      .start(start), .dir_up(dir_up), .step(step), .unary(unary)
    );

    // same words, always sorted down
    sorted_unary_converter #(.K(K)) dut_1dir (
      .clk(clk), .rst_n(rst_n), .load(load), .din(din), .dout(dout_1dir),
      .start(start), .dir_up(1'b0), .step(step), .unary(unary_1dir)
    );

    initial begin
      int sorted_t, plain_t, sorted_prev, plain_prev, ones, one_t, one_prev;
      logic [K-1:0] x;
      real gain;
      sorted_t = 0; plain_t = 0; sorted_prev = 0; plain_prev = 0; one_t = 0; one_prev = 0;
      @(posedge rst_n);
      @(negedge clk);
      for (int w = 0; w < int'(NWORDS); w++) begin
        for (int b = 0; b < int'(K); b++) x[b] = 1'($urandom);
        // reference: plain binary-to-unary stream
        for (int b = 0; b < int'(K); b++) begin
          if (int'(x[b]) != plain_prev) plain_t++;
          plain_prev = int'(x[b]);
        end
        // converter under test
        load = 1'b1; din = x;
        @(negedge clk);
        load = 1'b0; start = 1'b1; dir_up = w[0];
        @(negedge clk);
        start = 1'b0;
        ones = 0;
        for (int s = 0; s < int'(J); s++) begin
          step = 1'b1;
          if (int'(unary) != sorted_prev) sorted_t++;
          sorted_prev = int'(unary);
          ones += int'(unary);
          if (int'(unary_1dir) != one_prev) one_t++;
          one_prev = int'(unary_1dir);
          @(negedge clk);
        end
        step = 1'b0;
        checks++;
        if (ones != int'(x)) begin
          failures++;
          $display("FAIL: K=%0d word %0d gave %0d ones", K, x, ones);
        end
      end
      gain = real'(plain_t) / real'(sorted_t > 0 ? sorted_t : 1);
      $display("K=%0d plain transitions/word=%.3f sorted/word=%.3f gain=%.2f (K/2=%.1f) one-direction sorted/word=%.3f",
               K, real'(plain_t) / NWORDS, real'(sorted_t) / NWORDS, gain, K / 2.0, real'(one_t) / NWORDS);
      checks++;
      if (one_t > 2 * int'(NWORDS)) begin
        failures++;
        $display("FAIL: K=%0d %0d one-direction transitions for %0d words", K, one_t, NWORDS);
      end
      checks++;
      if (gain < 0.9 * K / 2.0) begin
        failures++;
        $display("FAIL: K=%0d gain %.2f below K/2", K, gain);
      end
      checks++;
      if (sorted_t > int'(NWORDS) + 1) begin
        failures++;
        $display("FAIL: K=%0d %0d sorted transitions for %0d words", K, sorted_t, NWORDS);
      end
      done_cnt++;
    end
  end

  initial begin
    wait (done_cnt == int'(KMAX - KMIN + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
