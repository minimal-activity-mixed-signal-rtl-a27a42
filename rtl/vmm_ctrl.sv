// vmm_ctrl: sequencer of one vector-matrix product.
// Phases (vmm_pkg::phase_e):
//   LOAD     accept BEATS input beats (in_valid/in_ready handshake); each
//            accepted beat pulses `load` to shift words into the sorters.
//   START    one cycle: sorters set up their frame (`start`), ADCs cleared.
//   UNARY    J cycles of `step`: the sorters put slot s of the unary frame on
//            the array lines, where it appears one cycle later.
//   SETTLE   one cycle; together with the last J-1 UNARY cycles this gives the
//            ADCs J coarse cycles (adc_en, adc_fine=0), each integrating one slot.
//   SAMPLE   one cycle: the ADCs hold their residue (adc_sample).
//   RESIDUE  FINE cycles of fine conversion (adc_en, adc_fine=1).
//   DONE     one cycle with out_valid; the ADC codes then hold until the next
//            START.
// A product therefore takes BEATS + J + FINE + 4 cycles from the first input
// beat (68 at the defaults: 32 load beats, 16 + 16 ADC cycles).
// Follows the document: J unary array cycles integrated by the ADCs, then a
// fine pass on the resampled residue (32 ADC cycles in all). This design's
// own: the load phase, the single-cycle start/settle/sample/done steps and
// the handshake.
module vmm_ctrl
  import vmm_pkg::*;
#(
  parameter int unsigned BEATS = 32,   // input beats per vector
  parameter int unsigned J     = 16,   // unary slots per frame
  parameter int unsigned FINE  = 16    // fine-pass cycles
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  output logic   load,
  output logic   start,
  output logic   step,
  output logic   adc_clr,
  output logic   adc_en,
  output logic   adc_fine,
  output logic   adc_sample,
  output logic   out_valid,
  output phase_e phase
);
  localparam int unsigned CW = $clog2(BEATS + J + FINE + 1);

  phase_e        ph_q;
  logic [CW-1:0] cnt;

  assign phase      = ph_q;
  assign in_ready   = ph_q == PH_LOAD;
  assign load       = in_ready && in_valid;
  assign start      = ph_q == PH_START;
  assign adc_clr    = start;
  assign step       = ph_q == PH_UNARY;
  assign adc_fine   = ph_q == PH_RESIDUE;
  assign adc_en     = (ph_q == PH_UNARY && cnt != '0) || ph_q == PH_SETTLE || adc_fine;
  assign adc_sample = ph_q == PH_SAMPLE;
  assign out_valid  = ph_q == PH_DONE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q <= PH_LOAD;
      cnt  <= '0;
    end else begin
      unique case (ph_q)
        PH_LOAD: if (load) begin
          if (cnt == CW'(BEATS - 1)) begin
            cnt  <= '0;
            ph_q <= PH_START;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        PH_START: ph_q <= PH_UNARY;
        PH_UNARY: begin
          if (cnt == CW'(J - 1)) begin
            cnt  <= '0;
            ph_q <= PH_SETTLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        PH_SETTLE: ph_q <= PH_SAMPLE;
        PH_SAMPLE: ph_q <= PH_RESIDUE;
        PH_RESIDUE: begin
          if (cnt == CW'(FINE - 1)) begin
            cnt  <= '0;
            ph_q <= PH_DONE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        PH_DONE: ph_q <= PH_LOAD;
        default: ph_q <= PH_LOAD;
      endcase
    end
  end
endmodule
