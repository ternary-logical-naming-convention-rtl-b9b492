// msd_adder_pipe: one TW-MSD adder mapped onto a slice of the optical processor.
//
// Modified signed-digit (MSD) numbers are radix 2 with digits -1, 0, 1 (the
// value-feature name D(0,-1,1): 0 is D, -1 is H, 1 is V). Two WIDTH-digit
// operands are added without carry propagation in three transform steps:
//   step 1: t = T(a,b), w = W(a,b)        with a + b = 2t + w, digit by digit
//   step 2: t' = T'(t<<1, w), w' = W'(t<<1, w)   so that t' and w' never collide
//   step 3: s = T(t'<<1, w')               digit sum with no carry left
// Every digit of every step is one processor bit configured with the step's
// standard name. The slice of 5*WIDTH+4 bits is laid out as
//   T : [0, WIDTH-1]          W : [WIDTH, 2*WIDTH-1]
//   T': [2*WIDTH, 3*WIDTH]    W': [3*WIDTH+1, 4*WIDTH+1]
//   T : [4*WIDTH+2, 5*WIDTH+3]
// with the least significant digit first in each range.
//
// Pipelining: each optical frame runs all three steps at once on different
// data. The decoded result of a step in one frame becomes, shifted as above,
// the data frame of the next step in the following frame. A new addition can
// enter every frame; its sum (WIDTH+2 digits) appears after three frames, with
// sum_valid high for the cycle after the third frame.
//
// Following the published design: the T, W, T', W' transforms, the slice
// sizes n, n, n+1, n+1, n+2 and their order, operand b on the main path and a
// on the control path. This design's choices: the digit order inside a range
// and the frame-by-frame pipeline between the steps.
//
// Interface: op_a/op_b are sampled in a cycle with frame_en and in_valid;
// in_valid without frame_en is a protocol error (asserted).
// main_out/ctrl_out are this slice of the data frames; dec_in is this slice of
// the decoded result frame.
module msd_adder_pipe
  import toc_pkg::*;
#(
  parameter  int WIDTH = 14,
  localparam int SLICE = 5 * WIDTH + 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   frame_en,            // an optical frame runs this cycle
  input  logic   in_valid,            // op_a/op_b enter step 1 in this frame
  input  light_t op_a [WIDTH],        // addend a, index = digit weight
  input  light_t op_b [WIDTH],        // addend b
  output light_t main_out [SLICE],    // main-path data frame of the slice
  output light_t ctrl_out [SLICE],    // control-path data frame of the slice
  input  light_t dec_in [SLICE],      // decoded result frame of the slice
  output light_t sum [WIDTH+2],       // a + b in MSD form
  output logic   sum_valid,           // sum holds a new result this cycle
  output logic [2:0] stage_busy       // steps 3..1 carry valid data this frame
);

  localparam int OFF_T1 = 0;
  localparam int OFF_W1 = WIDTH;
  localparam int OFF_TP = 2 * WIDTH;
  localparam int OFF_WP = 3 * WIDTH + 1;
  localparam int OFF_T3 = 4 * WIDTH + 2;

  logic v1, v2, v3;   // step 1/2/3 result in the decoded frame is valid
  logic fresh;        // the decoded frame was written in the previous cycle

  always_comb begin
    // Step 1: operands, b on the main path, a on the control path.
    for (int i = 0; i < WIDTH; i++) begin
      main_out[OFF_T1 + i] = in_valid ? op_b[i] : LIGHT_D;
      ctrl_out[OFF_T1 + i] = in_valid ? op_a[i] : LIGHT_D;
      main_out[OFF_W1 + i] = in_valid ? op_b[i] : LIGHT_D;
      ctrl_out[OFF_W1 + i] = in_valid ? op_a[i] : LIGHT_D;
    end
    // Step 2: w on the main path, t shifted up one digit on the control path.
    for (int i = 0; i <= WIDTH; i++) begin
      main_out[OFF_TP + i] = (i < WIDTH) ? dec_in[OFF_W1 + i] : LIGHT_D;
      ctrl_out[OFF_TP + i] = (i > 0) ? dec_in[OFF_T1 + i - 1] : LIGHT_D;
      main_out[OFF_WP + i] = main_out[OFF_TP + i];
      ctrl_out[OFF_WP + i] = ctrl_out[OFF_TP + i];
    end
    // Step 3: w' on the main path, t' shifted up one digit on the control path.
    for (int i = 0; i <= WIDTH + 1; i++) begin
      main_out[OFF_T3 + i] = (i <= WIDTH) ? dec_in[OFF_WP + i] : LIGHT_D;
      ctrl_out[OFF_T3 + i] = (i > 0) ? dec_in[OFF_TP + i - 1] : LIGHT_D;
    end
    for (int i = 0; i < WIDTH + 2; i++) sum[i] = dec_in[OFF_T3 + i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1    <= 1'b0;
      v2    <= 1'b0;
      v3    <= 1'b0;
      fresh <= 1'b0;
    end else begin
      fresh <= frame_en;
      if (frame_en) begin
        v1 <= in_valid;
        v2 <= v1;
        v3 <= v2;
      end
    end
  end

  assign sum_valid  = v3 && fresh;
  assign stage_busy = {v2, v1, in_valid};

  // Operands are taken only by a frame: in_valid outside a frame would be lost.
  a_operands_in_frame: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> frame_en);

endmodule
