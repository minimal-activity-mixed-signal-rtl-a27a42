// template_shift_reg: the two template-loading shift registers of the array.
// One register runs along the even columns and one along the odd columns;
// each has COLS/2 stages and its own serial input, so a full row of COLS
// template bits is loaded in COLS/2 shift clocks. The stages drive the
// vertical bit lines: column 2c is even stage c, column 2c+1 is odd stage c.
// A bit shifted in enters the last stage and moves one stage toward stage 0
// per shift, so the first bit of a burst of COLS/2 ends up in column 0 (even
// register) or column 1 (odd register).
// Timing: bit lines change on the clock edge where shift is high.
// The two separate even/odd registers follow the document; the shift order,
// the stage count per register and the reset to zero are this design's own.
module template_shift_reg #(
  parameter int unsigned COLS = 256
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            shift,      // advance both registers by one stage
  input  logic            din_even,   // serial template bit for the even columns
  input  logic            din_odd,    // serial template bit for the odd columns
  output logic [COLS-1:0] bit_lines   // one bit per array column
);
  localparam int unsigned HALF = COLS / 2;

  logic [HALF-1:0] sr_even, sr_odd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_even <= '0;
      sr_odd  <= '0;
    end else if (shift) begin
      sr_even <= {din_even, sr_even[HALF-1:1]};
      sr_odd  <= {din_odd,  sr_odd[HALF-1:1]};
    end
  end

  always_comb begin
    for (int c = 0; c < HALF; c++) begin
      bit_lines[2*c]   = sr_even[c];
      bit_lines[2*c+1] = sr_odd[c];
    end
  end
endmodule
