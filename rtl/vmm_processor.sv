// vmm_processor: mixed-signal vector-matrix multiplier, Y = W X, with
// minimal-activity (sorted unary) inputs.
// Structure:
//   - cid_dram_array: COLS x ROWS one-bit cells. Template m occupies rows
//     m*WBITS .. m*WBITS+WBITS-1, row m*WBITS+i holding bit plane i
//     (i = 0 most significant) of W_m,n in column n.
//   - template_shift_reg: even- and odd-column shift registers that drive the
//     bit lines; a write request stores them into one row.
//   - refresh_ctrl: periodic refresh of half rows, alternating even/odd.
//   - unary_converter_bank: input shift register of COLS sorting converters
//     that turn each XBITS-bit X_n into a sorted unary frame of 2^XBITS slots,
//     alternating sort direction between vectors.
//   - ROWS dsm_adc: one ADC per row integrates the row charges of the frame
//     (coarse pass) and then its resampled residue (fine pass).
//   - vmm_ctrl sequences one product; bitplane_combiner forms Y_m per
//     template from its WBITS row codes.
// Result: for row r = m*WBITS+i, with S_r = sum_n w_r,n * X_n,
//   out_code[r] = floor(2^XBITS * S_r / COLS)           (2*XBITS bits)
//   out_y[m]    = sum_i 2^(WBITS-1-i) * out_code[m*WBITS+i]
// In the signed (XOR) configuration a cell counts w XOR x instead of w AND x.
// Interfaces:
//   template load: tpl_shift shifts tpl_din_even/odd in (COLS/2 shifts per
//   row); tpl_wr_valid/tpl_wr_row request the write of the bit lines into a
//   row, accepted when tpl_wr_ready is high. A refresh owns the bit lines for
//   its cycle, so ready drops then and the write waits (a stall). Hold valid,
//   row and the shift registers until accepted.
//   inputs: in_valid/in_ready beats of LANES words, X_n is the n-th word;
//   COLS/LANES beats per vector.
//   results: out_valid pulses for one cycle; out_code/out_y/out_overflow
//   hold until the next vector's conversion starts.
// Timing: COLS/LANES + 2^(XBITS+1) + 4 cycles per product (68 at the
// defaults), of which 32 are ADC cycles.
// Follows the document: array size, bit-parallel templates, unary inputs with
// sorting, a delta-sigma ADC per row with one residue resampling, even/odd
// template shift registers and refresh, XOR configuration, bit-plane weighting. This
// design's own: the handshakes, LANES, the load phase, refresh period and
// write/refresh arbitration.
module vmm_processor #(
  parameter int unsigned COLS       = vmm_pkg::ARRAY_COLS,
  parameter int unsigned ROWS       = vmm_pkg::ARRAY_ROWS,
  parameter int unsigned WBITS      = vmm_pkg::TEMPLATE_BITS,
  parameter int unsigned XBITS      = vmm_pkg::INPUT_BITS,
  parameter int unsigned LANES      = 8,
  parameter int unsigned REF_PERIOD = 16,
  parameter int unsigned RETENTION  = 8192,
  parameter bit          ALTERNATE  = 1'b1,
  localparam int unsigned M         = ROWS / WBITS,
  localparam int unsigned RW        = $clog2(ROWS),
  localparam int unsigned QW        = 2 * XBITS,
  localparam int unsigned YW        = QW + WBITS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // template loading
  input  logic                     tpl_shift,
  input  logic                     tpl_din_even,
  input  logic                     tpl_din_odd,
  input  logic                     tpl_wr_valid,
  input  logic [RW-1:0]            tpl_wr_row,
  output logic                     tpl_wr_ready,
  // configuration
  input  logic                     xor_mode,
  input  logic                     refresh_enable,
  // input vector
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [LANES-1:0][XBITS-1:0] in_words,
  // results
  output logic                     out_valid,
  output logic [ROWS-1:0][QW-1:0]  out_code,
  output logic [M-1:0][YW-1:0]     out_y,
  output logic                     out_overflow,
  output logic                     frame_dir_up,  // sort direction of the last frame
  output vmm_pkg::phase_e          phase          // sequencer phase (status)
);
  localparam int unsigned UW = $clog2(COLS + 1);

  // ---------------- template path and refresh ----------------
  logic [COLS-1:0] bit_lines;
  logic            ref_en, sel_even, sel_odd;
  logic [RW-1:0]   ref_row;
  logic            wr_fire;

  template_shift_reg #(.COLS(COLS)) u_tpl (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift    (tpl_shift),
    .din_even (tpl_din_even),
    .din_odd  (tpl_din_odd),
    .bit_lines(bit_lines)
  );

  refresh_ctrl #(.ROWS(ROWS), .PERIOD(REF_PERIOD)) u_ref (
    .clk     (clk),
    .rst_n   (rst_n),
    .enable  (refresh_enable),
    .ref_en  (ref_en),
    .ref_row (ref_row),
    .sel_even(sel_even),
    .sel_odd (sel_odd)
  );

  assign tpl_wr_ready = !ref_en;
  assign wr_fire      = tpl_wr_valid && tpl_wr_ready;

  // ---------------- sequencing and inputs ----------------
  logic   load, start, step, adc_clr, adc_en, adc_fine, adc_sample;
  logic [COLS-1:0] x_lines;

  vmm_ctrl #(.BEATS(COLS / LANES), .J(2 ** XBITS), .FINE(2 ** XBITS)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .load      (load),
    .start     (start),
    .step      (step),
    .adc_clr   (adc_clr),
    .adc_en    (adc_en),
    .adc_fine  (adc_fine),
    .adc_sample(adc_sample),
    .out_valid (out_valid),
    .phase     (phase)
  );

  unary_converter_bank #(.N(COLS), .K(XBITS), .LANES(LANES), .ALTERNATE(ALTERNATE)) u_bank (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (load),
    .in_words(in_words),
    .start   (start),
    .step    (step),
    .dir_up  (frame_dir_up),
    .x_lines (x_lines)
  );

  // ---------------- array ----------------
  logic [ROWS-1:0][UW-1:0] row_charge;

  cid_dram_array #(.COLS(COLS), .ROWS(ROWS), .RETENTION(RETENTION)) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (wr_fire),
    .wr_row   (tpl_wr_row),
    .bit_lines(bit_lines),
    .ref_sel_even(sel_even),
    .ref_sel_odd (sel_odd),
    .ref_row  (ref_row),
    .xor_mode (xor_mode),
    .x_lines  (x_lines),
    .y        (row_charge)
  );

  // ---------------- row-parallel ADCs ----------------
  logic [ROWS-1:0] row_ovf;

  for (genvar r = 0; r < ROWS; r++) begin : g_adc
    dsm_adc #(.FULL_SCALE(COLS), .SUB(XBITS)) u_adc (
      .clk     (clk),
      .rst_n   (rst_n),
      .clr     (adc_clr),
      .sample  (adc_sample),
      .en      (adc_en),
      .fine    (adc_fine),
      .u       (row_charge[r]),
      .code    (out_code[r]),
      .overflow(row_ovf[r])
    );
  end

  assign out_overflow = |row_ovf;

  // ---------------- bit-plane recombination ----------------
  for (genvar m = 0; m < M; m++) begin : g_comb
    bitplane_combiner #(.WBITS(WBITS), .QW(QW)) u_comb (
      .q(out_code[m*WBITS +: WBITS]),
      .y(out_y[m])
    );
  end

  // ---------------- interface rules ----------------
  a_no_shift_during_write: assert property (@(posedge clk) disable iff (!rst_n)
    !(tpl_shift && tpl_wr_valid))
    else $error("vmm_processor: template shifted while a row write is pending");
  a_write_held: assert property (@(posedge clk) disable iff (!rst_n)
    (tpl_wr_valid && !tpl_wr_ready) |=> (tpl_wr_valid && $stable(tpl_wr_row)))
    else $error("vmm_processor: write request dropped or changed before it was accepted");

  initial begin
    assert (ROWS % WBITS == 0) else $error("ROWS must be a multiple of WBITS");
    assert (COLS % LANES == 0) else $error("COLS must be a multiple of LANES");
  end
endmodule
