// vmm_pkg: sizes shared by the blocks of the mixed-signal vector-matrix
// multiplier. The array is ARRAY_COLS input columns (one per input component
// X_n) by ARRAY_ROWS cell rows; each template W_m occupies TEMPLATE_BITS
// adjacent rows, one per bit plane w^(i). Inputs are INPUT_BITS wide and are
// presented as a unary series of 2^INPUT_BITS array cycles. The
// delta-sigma ADC of each row resolves INPUT_BITS bits in the coarse pass and
// as many again on the resampled residue (4 + 4 = 8 bits at the defaults).
// COLS=256, ROWS=128, WBITS=4, XBITS=4 (J=16 unary cycles) and the 8-bit,
// 2x4-bit, 32-cycle conversion follow the document; the derived widths are
// this design's own.
package vmm_pkg;
  localparam int unsigned ARRAY_COLS    = 256;  // inputs N
  localparam int unsigned ARRAY_ROWS    = 128;  // cell rows = ADCs
  localparam int unsigned TEMPLATE_BITS = 4;    // bit planes per template (I)
  localparam int unsigned INPUT_BITS    = 4;    // input word width K

  // Controller phases of one vector-matrix product.
  typedef enum logic [2:0] {
    PH_LOAD    = 3'd0,  // input words shifted into the converter bank
    PH_START   = 3'd1,  // sorters set up for the frame, ADCs cleared
    PH_UNARY   = 3'd2,  // unary slots driven onto the array lines
    PH_SETTLE  = 3'd3,  // ADCs integrate the last slot
    PH_SAMPLE  = 3'd4,  // ADCs hold their residue
    PH_RESIDUE = 3'd5,  // ADC fine pass on the held residue
    PH_DONE    = 3'd6   // results presented
  } phase_e;
endpackage
