// optical_processor: the ternary optical processor with its decoder.
//
// N_BITS processor bits work in parallel. Each bit takes one light state from
// the main-path data frame and one from the control-path data frame, and
// computes the ternary operation its directive configures. The optical part is
// combinational; the decoder samples the output light of every bit into an
// electrical result frame on a clock edge where frame_en is high, and raises
// result_valid for the following cycle. A bit whose output carries H and V
// together (an illegal configuration) is reported through conflict_any with
// the same timing.
//
// Following the published design: 192 processor bits processing in parallel,
// encoder / optical processor / decoder chain. This design's choices: one
// clock edge per optical frame, and reset clearing the result frame to D.
//
// Interface: dir[] comes from the reconfiguration unit; main_in[] and ctrl_in[]
// are the data frames; result[] is valid (and held) from the cycle after a
// frame until the next frame.
module optical_processor
  import toc_pkg::*;
#(
  parameter int N_BITS = 192
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bit_dir_t dir     [N_BITS],  // directive of every processor bit
  input  light_t   main_in [N_BITS],  // main-path data frame
  input  light_t   ctrl_in [N_BITS],  // control-path data frame
  input  logic     frame_en,          // run one optical frame, decoder samples
  output light_t   result  [N_BITS],  // decoded result frame
  output logic     result_valid,      // result[] holds a new frame this cycle
  output logic     conflict_any       // some bit of that frame had H and V together
);

  light_t optical_out [N_BITS];
  logic [N_BITS-1:0] bit_conflict;

  for (genvar i = 0; i < N_BITS; i++) begin : g_bit
    processor_bit u_bit (
      .a(main_in[i]), .b(ctrl_in[i]), .dir(dir[i]),
      .c(optical_out[i]), .conflict(bit_conflict[i])
    );
  end

  // Decoder: photodetector array converting output light to electrical data.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_BITS; i++) result[i] <= LIGHT_D;
      result_valid <= 1'b0;
      conflict_any <= 1'b0;
    end else begin
      result_valid <= frame_en;
      if (frame_en) begin
        for (int i = 0; i < N_BITS; i++) result[i] <= optical_out[i];
        conflict_any <= |bit_conflict;
      end
    end
  end

endmodule
