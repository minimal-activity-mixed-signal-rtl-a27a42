// refresh_ctrl: DRAM refresh sequencer of the CID/DRAM array.
// Every PERIOD cycles it refreshes one half row: the sense amplifiers read the
// even (or odd) columns of a row and write them back. Successive refreshes
// alternate between the even and the odd columns, each with its own select
// line (sel_even / sel_odd); after both halves of a row the row address
// advances, wrapping after ROWS rows. A full sweep of the array therefore
// takes 2*ROWS*PERIOD cycles, which must stay below the cells' retention
// time.
// Interface: `ref_en` is high for one cycle per refresh with `ref_row` and
// the select lines naming the half row. `enable` low pauses the sequence.
// Timing: the first refresh comes PERIOD cycles after reset.
// Follows the document: integrated periodic refresh, alternation between even
// and odd columns with separate select lines. This design's own: the fixed
// interval, the row order and the pause input.
module refresh_ctrl #(
  parameter int unsigned ROWS   = 128,
  parameter int unsigned PERIOD = 16,
  localparam int unsigned RW    = $clog2(ROWS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  output logic          ref_en,
  output logic [RW-1:0] ref_row,
  output logic          sel_even,
  output logic          sel_odd
);
  localparam int unsigned TW = $clog2(PERIOD);

  logic [TW-1:0] timer;
  logic          odd_q;
  logic          due;

  assign due      = enable && timer == TW'(PERIOD - 1);
  assign ref_en   = due;
  assign sel_even = due && !odd_q;
  assign sel_odd  = due && odd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer   <= '0;
      odd_q   <= 1'b0;
      ref_row <= '0;
    end else if (enable) begin
      if (due) begin
        timer <= '0;
        odd_q <= !odd_q;
        if (odd_q) ref_row <= (ref_row == RW'(ROWS - 1)) ? '0 : ref_row + 1'b1;
      end else begin
        timer <= timer + 1'b1;
      end
    end
  end
endmodule
