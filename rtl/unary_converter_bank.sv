// unary_converter_bank: the input shift register and serial
// binary-to-unary converter that drives the array's N input column lines.
// It is a row of N sorted_unary_converter stages chained as a shift
// register. Each `load` beat shifts LANES K-bit words in at the top: word l
// of a beat enters stage N-LANES+l and every stage takes the word LANES
// stages above it, so after N/LANES beats the words of the first beat sit in
// stages 0..LANES-1 (component X_n is the n-th word sent).
// `start` prepares all stages for a frame; with ALTERNATE set the sort
// direction flips at every start (down, up, down, ...), otherwise every frame
// sorts down. Each `step` registers the N unary bits onto x_lines, which then
// hold their value until the next step, so the lines do not move while words
// are loaded or while the ADCs work on their residue.
// Timing: x_lines shows slot s of the frame in the cycle after the s-th
// step. dir_up is the direction of the frame being emitted.
// Follows the document: the pipeline register reused as bit sorter, one
// sorter per input component, alternating directions. This design's own:
// the LANES-word load beat, the held line register and reset values.
module unary_converter_bank #(
  parameter int unsigned N         = 256,
  parameter int unsigned K         = 4,
  parameter int unsigned LANES     = 8,
  parameter bit          ALTERNATE = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic [LANES-1:0][K-1:0] in_words,
  input  logic                   start,
  input  logic                   step,
  output logic                   dir_up,
  output logic [N-1:0]           x_lines
);
  logic [N-1:0][K-1:0] stage_q;
  logic [N-1:0][K-1:0] stage_d;
  logic [N-1:0]        unary;
  logic                dir_q;     // direction of the current frame
  logic                next_up;   // direction the next start will use

  always_comb begin
    for (int n = 0; n < N; n++) begin
      if (n >= int'(N - LANES)) stage_d[n] = in_words[n - int'(N - LANES)];
      else                      stage_d[n] = stage_q[n + LANES];
    end
  end

  for (genvar n = 0; n < N; n++) begin : g_sorter
    sorted_unary_converter #(.K(K)) u_sorter (
      .clk   (clk),
      .rst_n (rst_n),
      .load  (load),
      .din   (stage_d[n]),
      .dout  (stage_q[n]),
      .start (start),
      .dir_up(next_up),
      .step  (step),
      .unary (unary[n])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dir_q   <= 1'b0;
      next_up <= 1'b0;
      x_lines <= '0;
    end else begin
      if (start) begin
        dir_q   <= next_up;
        next_up <= ALTERNATE ? !next_up : 1'b0;
      end
      if (step) x_lines <= unary;
    end
  end

  assign dir_up = dir_q;

  initial assert (N % LANES == 0) else $error("N must be a multiple of LANES");
endmodule
