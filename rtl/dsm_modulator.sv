// dsm_modulator: behavioural model of the first-order delta-sigma modulator
// with residue resampling that digitises one array row.
// This is a behavioural model: the real block is a switched-capacitor
// integrator, a single-bit comparator, a one-bit feedback DAC and a
// sample-and-hold. Charges are integers in units of one cell's charge packet;
// the feedback packet is FULL_SCALE units (the charge of a row with every
// cell contributing).
// Each enabled cycle the integrator adds its input; when the sum reaches
// FULL_SCALE the comparator fires (bit = 1) and one feedback packet is
// removed. Over a pass, the number of ones is therefore the integrated input
// divided by FULL_SCALE, rounded down, and the integrator keeps the remainder
// (the residue, 0 <= residue < FULL_SCALE).
//   coarse pass (fine=0): the input is the row charge u of the array cycle;
//   sample:               the residue is held and the integrator cleared;
//   fine pass (fine=1):   the input is the held residue in every cycle, so a
//                         pass of P cycles yields floor(P*residue/FULL_SCALE)
//                         ones: the residue converted at a 1/P finer scale.
// Timing: `bit_out` is combinational from the integrator and the input in a
// cycle with en high; the integrator updates at that cycle's clock edge.
// Follows the document: first-order modulation of the array partial sums,
// single resampling of the integrator residue. This design's own: the ideal
// integer charge model, the comparator threshold at FULL_SCALE and the
// clear/sample controls.
module dsm_modulator #(
  parameter int unsigned FULL_SCALE = 256,
  localparam int unsigned UW = $clog2(FULL_SCALE + 1),
  localparam int unsigned VW = $clog2(2 * FULL_SCALE + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,      // start of conversion: integrator to zero
  input  logic          sample,   // hold the residue and clear the integrator
  input  logic          en,       // integrate this cycle
  input  logic          fine,     // 0: array input, 1: held residue
  input  logic [UW-1:0] u,        // row charge from the array
  output logic          bit_out,  // comparator decision of this cycle
  output logic [UW-1:0] residue   // held residue (for observation)
);
  logic [VW-1:0] integ;
  logic [VW-1:0] sum;

  always_comb begin
    sum     = integ + VW'(fine ? residue : u);
    bit_out = en && (sum >= VW'(FULL_SCALE));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ   <= '0;
      residue <= '0;
    end else if (clr) begin
      integ   <= '0;
    end else if (sample) begin
      residue <= UW'(integ);
      integ   <= '0;
    end else if (en) begin
      integ   <= bit_out ? sum - VW'(FULL_SCALE) : sum;
    end
  end

  a_in_range: assert property (@(posedge clk) disable iff (!rst_n) en |-> u <= UW'(FULL_SCALE))
    else $error("dsm_modulator: input above full scale");
endmodule
