// decimation_counter: the binary counter that decimates the modulator bit
// stream of one row into an ADC_BITS-wide code.
// A first-order modulator is decimated by counting its ones. The counter
// counts the coarse pass into its upper sub-range and the fine (residue) pass
// into its lower sub-range, so the code is
//   code = coarse_ones * 2^SUB + fine_ones.
// With at most 2^SUB - 1 ones per pass this is exact; a count that would
// pass the top of the range saturates there and raises `overflow`.
// Interface: `clr` zeroes the counter for a new conversion, `en` and `bit_in`
// count one modulator decision, `fine` selects the sub-range.
// Timing: the count updates on the clock edge of a cycle with en high; code
// is the registered count.
// Follows the document: counter decimation, two 4-bit sub-ranges giving
// 8 bits. This design's own: the saturation and the overflow flag.
module decimation_counter #(
  parameter int unsigned SUB = 4,
  localparam int unsigned W  = 2 * SUB
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         fine,
  input  logic         bit_in,
  output logic [W-1:0] code,
  output logic         overflow
);
  logic [W:0] next;

  always_comb begin
    next = {1'b0, code} + (fine ? (W+1)'(1) : (W+1)'(1) << SUB);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code     <= '0;
      overflow <= 1'b0;
    end else if (clr) begin
      code     <= '0;
      overflow <= 1'b0;
    end else if (en && bit_in) begin
      if (next[W]) begin
        code     <= '1;
        overflow <= 1'b1;
      end else begin
        code     <= next[W-1:0];
      end
    end
  end
endmodule
