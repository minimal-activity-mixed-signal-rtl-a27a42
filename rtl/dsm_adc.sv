// dsm_adc: one row-parallel delta-sigma algorithmic ADC (modulator plus
// decimation counter). The processor has one per array row, so one per
// template m and bit plane i.
// A conversion is: `clr`; 2^SUB coarse cycles (en=1, fine=0) integrating the
// row charges of the unary array cycles; `sample`; 2^SUB fine cycles (en=1,
// fine=1) on the held residue. The result is
//   code = floor(2^SUB * S / FULL_SCALE)
// where S is the row charge summed over the coarse pass (S < 2^SUB *
// FULL_SCALE), so 2*SUB bits come out of 2^(SUB+1) cycles: 8 bits in 32
// cycles at the default SUB=4.
// Timing: code is valid in the cycle after the last fine cycle and holds
// until the next clr.
// Follows the document: 8 bits over two 4-bit sub-ranges in 32 cycles, one
// residue resampling, counter decimation. This design's own: the control
// sequence and the ideal charge scale of the modulator model.
module dsm_adc #(
  parameter int unsigned FULL_SCALE = 256,
  parameter int unsigned SUB        = 4,
  localparam int unsigned UW        = $clog2(FULL_SCALE + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            sample,
  input  logic            en,
  input  logic            fine,
  input  logic [UW-1:0]   u,
  output logic [2*SUB-1:0] code,
  output logic            overflow
);
  logic mod_bit;
  logic [UW-1:0] residue_unused;

  dsm_modulator #(.FULL_SCALE(FULL_SCALE)) u_mod (
    .clk    (clk),
    .rst_n  (rst_n),
    .clr    (clr),
    .sample (sample),
    .en     (en),
    .fine   (fine),
    .u      (u),
    .bit_out(mod_bit),
    .residue(residue_unused)
  );

  decimation_counter #(.SUB(SUB)) u_cnt (
    .clk     (clk),
    .rst_n   (rst_n),
    .clr     (clr),
    .en      (en),
    .fine    (fine),
    .bit_in  (mod_bit),
    .code    (code),
    .overflow(overflow)
  );
endmodule
