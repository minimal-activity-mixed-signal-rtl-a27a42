// bitplane_combiner: forms the output of one template from the quantized
// outputs of its WBITS bit-plane rows.
// Template bits are fractional, W = sum_i 2^(-i-1) w^(i), so bit plane i = 0
// is the most significant. The combiner returns the result scaled by
// 2^WBITS to keep it an integer:
//   y = sum_i 2^(WBITS-1-i) * q[i].
// The block diagram draws this as a chain of halvings and additions, one per
// plane; the shifted sum below is the same weighting without fractions.
// Timing: combinational.
// Follows the document: the weighting 2^(-i-1) of plane i and its place after
// the ADCs.
// This design's own: the integer scaling by 2^WBITS. The document's chip
// performs this step off-chip.
module bitplane_combiner #(
  parameter int unsigned WBITS = 4,
  parameter int unsigned QW    = 8,
  localparam int unsigned YW   = QW + WBITS
) (
  input  logic [WBITS-1:0][QW-1:0] q,   // q[i]: ADC code of bit plane i
  output logic [YW-1:0]            y
);
  always_comb begin
    y = '0;
    for (int i = WBITS - 1; i >= 0; i--) begin
      y = y + (YW'(q[i]) << (WBITS - 1 - i));
    end
  end
endmodule
