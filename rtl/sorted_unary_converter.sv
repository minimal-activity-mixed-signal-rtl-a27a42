// sorted_unary_converter: binary-to-sorted-unary converter for one input
// component (the counting bit sorter).
// The K-bit register is a stage of the input data pipeline: while `load` is
// high it takes `din` and shows its value on `dout` for the next stage.
// After loading, a one-cycle `start` fixes the sort direction of the frame,
// and each following `step` emits one bit of a unary frame of 2^K slots that
// holds exactly X ones, all of them together:
//   sort down (dir_up=0): X ones, then 2^K-X zeros;
//   sort up   (dir_up=1): 2^K-X zeros, then X ones.
// Because every slot of a unary code has weight one, the order does not
// change the sum the array computes, but the input line now switches at most
// twice per vector, and at most once when successive vectors alternate
// direction (down, up, down, ...): the line ends one frame at the level the
// next frame starts with.
// How it works: the register itself counts. Sorting down, it counts X down to
// zero and the output is "count is not zero". Sorting up, `start` complements
// it to 2^K-1-X, the first slot is always zero, and the output is "count has
// reached zero" while it counts down. The last slot of a down frame and the
// first slot of an up frame are always zero, so the frame has 2^K slots for
// values 0..2^K-1.
// Timing: `unary` is a function of the register, valid in every cycle where
// `step` is high; the register advances at that cycle's clock edge.
// Follows the document: the pipeline register reused as a counter, a
// counter-driven sorted output, alternating sort direction. This design's
// own: down-counting, the complement for the up direction and the frame of
// 2^K slots.
module sorted_unary_converter #(
  parameter int unsigned K = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,    // pipeline shift: take din
  input  logic [K-1:0] din,
  output logic [K-1:0] dout,    // register value, to the next pipeline stage
  input  logic         start,   // prepare a frame in direction dir_up
  input  logic         dir_up,
  input  logic         step,    // advance one unary slot
  output logic         unary    // current unary bit
);
  logic [K-1:0] cnt;
  logic         up_q;    // frame sorts up
  logic         armed;   // up frames: first slot has passed

  assign dout = cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      up_q  <= 1'b0;
      armed <= 1'b0;
    end else if (load) begin
      cnt <= din;
    end else if (start) begin
      cnt   <= dir_up ? ~cnt : cnt;
      up_q  <= dir_up;
      armed <= 1'b0;
    end else if (step) begin
      armed <= 1'b1;
      if (cnt != '0 && (!up_q || armed)) cnt <= cnt - 1'b1;
    end
  end

  assign unary = up_q ? (armed && cnt == '0) : (cnt != '0);
endmodule
