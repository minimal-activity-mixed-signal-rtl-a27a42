// tb_bitplane_combiner: checks the bit-plane recombination on random codes:
// y must equal the sum over planes of q[i] * 2^(WBITS-1-i), computed here
// from fractional weights 2^(-i-1) scaled by 2^WBITS.
module tb_bitplane_combiner;
  localparam int unsigned WBITS = 4, QW = 8, YW = QW + WBITS;

  logic [WBITS-1:0][QW-1:0] q;
  logic [YW-1:0] y;
  int checks = 0, failures = 0;

  bitplane_combiner #(.WBITS(WBITS), .QW(QW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real acc;
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < WBITS; i++) q[i] = (t < 4) ? ((i == t) ? 8'd1 : 8'd0) : QW'($urandom);
      #1;
      acc = 0.0;
      for (int i = 0; i < WBITS; i++) acc += real'(q[i]) * (2.0 ** (-i - 1));
      checks++;
      if (real'(y) != acc * (2.0 ** WBITS)) begin
        failures++;
        $display("FAIL: y=%0d expected %f", y, acc * (2.0 ** WBITS));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
