// tb_vmm_processor_full: the end-to-end test of tb_vmm_processor at the
// processor's default size (256 inputs, 128 rows = 32 templates of 4 bits,
// 8 words per input beat, refresh every 16 cycles, retention 8192 cycles).
// It writes all 128 template rows (about 16,500 cycles, longer than the
// retention time, so the refresh must work), multiplies a series of input
// vectors in the AND and XOR configurations and checks every row code,
// every template output, the overflow flag and the latency against values
// computed here, counting refreshes, stalled writes, both sort directions,
// overflows, XOR products and input line transitions as the reduced test
// does.
module tb_vmm_processor_full;
  // the processor's defaults
  localparam int unsigned COLS = 256, ROWS = 128, WBITS = 4, XBITS = 4, LANES = 8;
  localparam int unsigned M = ROWS / WBITS, J = 2 ** XBITS, QW = 2 * XBITS, YW = QW + WBITS;
  localparam int unsigned RW = $clog2(ROWS);
  localparam int unsigned NVEC = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tpl_shift = 1'b0, tpl_din_even = 1'b0, tpl_din_odd = 1'b0, tpl_wr_valid = 1'b0;
  logic [RW-1:0] tpl_wr_row = '0;
  logic tpl_wr_ready;
  logic xor_mode = 1'b0, refresh_enable = 1'b1;
  logic in_valid = 1'b0, in_ready;
  logic [LANES-1:0][XBITS-1:0] in_words = '0;
  logic out_valid, out_overflow, frame_dir_up;
  logic [ROWS-1:0][QW-1:0] out_code;
  logic [M-1:0][YW-1:0] out_y;
  vmm_pkg::phase_e phase;

  int checks = 0, failures = 0;
  int n_refresh = 0, n_stall = 0, n_up = 0, n_down = 0, n_ovf = 0, n_xor = 0;
  int n_trans = 0, n_products = 0;
  logic [COLS-1:0] wmem [ROWS];
  logic [COLS-1:0] x_prev;

  vmm_processor dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // refresh activity and input line switching
  always @(posedge clk) begin
    if (rst_n) begin
      if (!tpl_wr_ready) n_refresh++;
      n_trans += $countones(dut.x_lines ^ x_prev);
    end
    x_prev <= dut.x_lines;
  end

  task automatic write_row(input int r, input logic [COLS-1:0] d);
    for (int k = 0; k < COLS / 2; k++) begin
      tpl_shift = 1'b1;
      tpl_din_even = d[2*k];
      tpl_din_odd  = d[2*k+1];
      @(negedge clk);
    end
    tpl_shift = 1'b0;
    tpl_wr_valid = 1'b1;
    tpl_wr_row = RW'(r);
    forever begin
      #1;
      if (tpl_wr_ready) break;
      n_stall++;
      @(negedge clk);
    end
    @(negedge clk);
    tpl_wr_valid = 1'b0;
    wmem[r] = d;
  endtask

  task automatic run_vector(input int x [COLS], input bit xm);
    int last_beat, cyc, s, code_exp, y_exp, wint, ideal, plane_w;
    bit ovf_exp;
    xor_mode = xm;
    cyc = 0;
    for (int b = 0; b < COLS / LANES; b++) begin
      in_valid = 1'b1;
      for (int l = 0; l < LANES; l++) in_words[l] = XBITS'(x[b * LANES + l]);
      forever begin
        #1;
        if (in_ready) break;
        @(negedge clk);
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    cyc = 0;
    forever begin
      #1;
      if (out_valid) break;
      cyc++;
      @(negedge clk);
    end
    check(cyc == 2 * J + 3, $sformatf("latency %0d cycles after the last beat", cyc + 1));
    if (frame_dir_up) n_up++; else n_down++;
    if (xm) n_xor++;
    n_products++;
    ovf_exp = 1'b0;
    for (int r = 0; r < ROWS; r++) begin
      s = 0;
      for (int n = 0; n < COLS; n++)
        s += xm ? (wmem[r][n] ? int'(J) - x[n] : x[n]) : (wmem[r][n] ? x[n] : 0);
      code_exp = (int'(J) * s) / int'(COLS);
      if (code_exp > 2 ** QW - 1) begin
        code_exp = 2 ** QW - 1;
        ovf_exp = 1'b1;
      end
      check(int'(out_code[r]) == code_exp,
            $sformatf("row %0d code %0d expected %0d", r, out_code[r], code_exp));
    end
    check(out_overflow == ovf_exp, "overflow flag");
    if (out_overflow) n_ovf++;
    for (int m = 0; m < M; m++) begin
      y_exp = 0;
      for (int i = 0; i < int'(WBITS); i++) begin
        s = 0;
        for (int n = 0; n < COLS; n++) s += wmem[m*WBITS+i][n] ? x[n] : 0;
        plane_w = 2 ** (WBITS - 1 - i);
        y_exp += plane_w * int'(out_code[m*WBITS+i]);
      end
      check(int'(out_y[m]) == y_exp, $sformatf("template %0d output %0d expected %0d", m, out_y[m], y_exp));
      if (!xm && !ovf_exp) begin
        ideal = 0;
        for (int n = 0; n < COLS; n++) begin
          wint = 0;
          for (int i = 0; i < int'(WBITS); i++) wint += int'(wmem[m*WBITS+i][n]) << (WBITS - 1 - i);
          ideal += wint * x[n];
        end
        // out_y is within 2^WBITS-1 below 16/COLS * sum W X (scaled by 2^WBITS)
        check(int'(out_y[m]) * int'(COLS) <= int'(J) * ideal &&
              int'(J) * ideal < (int'(out_y[m]) + 2 ** WBITS) * int'(COLS),
              $sformatf("template %0d output %0d against ideal %0d/%0d", m, out_y[m], int'(J) * ideal, COLS));
      end
    end
    @(negedge clk);
  endtask

  initial begin
    int x [COLS];
    int trans_before;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) begin
      logic [COLS-1:0] d;
      for (int k = 0; k < COLS / 32; k++) d[32*k +: 32] = $urandom;
      if (r == 0) d = '1;
      if (r == 1) d = '0;
      write_row(r, d);
    end
    trans_before = n_trans;
    for (int v = 0; v < int'(NVEC); v++) begin
      for (int n = 0; n < COLS; n++) begin
        case (v % 5)
          0: x[n] = int'(J) - 1;
          1: x[n] = 0;
          default: x[n] = int'($urandom_range(J - 1));
        endcase
      end
      run_vector(x, v % 3 == 2 || v == 6);
      repeat ($urandom_range(3)) @(negedge clk);
    end
    check(n_trans - trans_before <= int'((NVEC + 1) * COLS),
          $sformatf("%0d line transitions for %0d vectors x %0d lines", n_trans - trans_before, NVEC, COLS));
    $display("products=%0d refresh_cycles=%0d write_stalls=%0d down=%0d up=%0d overflow=%0d xor=%0d transitions=%0d",
             n_products, n_refresh, n_stall, n_down, n_up, n_ovf, n_xor, n_trans - trans_before);
    check(n_refresh > 0, "refresh happened");
    check(n_stall > 0, "a template write was stalled by refresh");
    check(n_down > 0 && n_up > 0, "frames sorted both ways");
    check(n_ovf > 0, "ADC overflow happened");
    check(n_xor > 0, "XOR configuration used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
