// cid_dram_array: behavioural model of the CID/DRAM computational array.
// This is a behavioural model: the real block is an analog charge-domain
// array of three-transistor cells. Each cell stores one template bit w as
// charge on a DRAM node and, when its input column line x is active, transfers
// a unit charge onto the row's output sense line; the charges of all cells of
// a row add with zero latency. The model counts those unit charges, so the
// row output y[r] is the integer number of cells in row r whose stored bit
// and column input are both 1 (the binary-unary products of the row's
// cells, summed). In the signed (XOR) configuration a cell contributes when w and x
// differ instead.
// Storage: a write stores the COLS bit-line values into one row. Stored
// charge leaks: a half row (its even or its odd columns) that has been
// neither written nor refreshed for RETENTION cycles loses its ones. A
// refresh of a half row senses and restores it, restarting its retention
// time. Refresh and write both use the bit lines; the caller must not issue
// both in one cycle (asserted).
// Timing: writes and refreshes take effect at the clock edge; y follows
// x_lines and the stored bits combinationally (zero-latency accumulation).
// Follows the document: cell function, row accumulation, even/odd column
// refresh, XOR configuration. This design's own: unit-charge integer scale,
// leakage as an all-or-nothing loss after RETENTION cycles, reset clearing
// all cells.
module cid_dram_array #(
  parameter int unsigned COLS      = 256,
  parameter int unsigned ROWS      = 128,
  parameter int unsigned RETENTION = 8192,   // cycles a half row holds its charge
  localparam int unsigned RW       = $clog2(ROWS),
  localparam int unsigned YW       = $clog2(COLS + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // template write through the bit lines
  input  logic                     wr_en,
  input  logic [RW-1:0]            wr_row,
  input  logic [COLS-1:0]          bit_lines,
  // refresh of one half row, with separate even and odd column selects
  input  logic                     ref_sel_even,
  input  logic                     ref_sel_odd,
  input  logic [RW-1:0]            ref_row,
  // computation
  input  logic                     xor_mode,  // 1: signed (XOR) cell configuration
  input  logic [COLS-1:0]          x_lines,   // one unary input bit per column
  output logic [ROWS-1:0][YW-1:0]  y          // unit charges on each row sense line
);
  localparam int unsigned AW = $clog2(RETENTION + 1);

  logic [ROWS-1:0][COLS-1:0] cells;
  logic [ROWS-1:0][1:0][AW-1:0] age;   // [row][0 even / 1 odd]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) begin
        cells[r] <= '0;
        age[r]   <= '0;
      end
    end else begin
      for (int r = 0; r < ROWS; r++) begin
        for (int p = 0; p < 2; p++) begin
          if ((wr_en && wr_row == RW'(r)) ||
              (ref_row == RW'(r) && (p == 0 ? ref_sel_even : ref_sel_odd))) begin
            age[r][p] <= '0;
          end else if (age[r][p] < AW'(RETENTION)) begin
            age[r][p] <= age[r][p] + 1'b1;
          end else begin
            // charge has leaked away: the half row's ones are lost
            for (int c = p; c < COLS; c += 2) cells[r][c] <= 1'b0;
          end
        end
        if (wr_en && wr_row == RW'(r)) cells[r] <= bit_lines;
      end
    end
  end

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      y[r] = YW'($countones(xor_mode ? (cells[r] ^ x_lines) : (cells[r] & x_lines)));
    end
  end

  // bit lines carry either write data or refresh data, never both
  a_one_bitline_user: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr_en && (ref_sel_even || ref_sel_odd)))
    else $error("cid_dram_array: write and refresh in the same cycle");
endmodule
