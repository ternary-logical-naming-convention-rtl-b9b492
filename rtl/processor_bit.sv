// processor_bit: one reconfigurable ternary logic bit of the optical processor.
//
// It computes any two-input ternary operation c = f(a, b) chosen by six
// reconfigure directives. The main-path encoder spreads input a over three
// pixels, one per value D, H, V of the standard order; the pixel of the value
// a currently has is lit with H-polarized light, the other two stay dark. Each
// pixel feeds two basic operation units that share control input b:
//   - the H unit (P1 = H, P2 = H, LC rotating in its static state) emits H
//     when its Y is high,
//   - the V unit (P1 = H, P2 = V, LC not rotating in its static state) emits V
//     when its Y is high.
// So for the lit row, the H unit shines exactly when b is in the row's H mark
// and the V unit when b is in its V mark. The six outputs are superimposed on
// the output pixel: D adds nothing, so the result is H, V or D. This realizes
// any of the 3^9 operations with at most six basic units, as decrease-radix
// design promises. If an H and a V unit shine together (only possible with an
// illegal name) the output is not a light state; the bit reports it on
// `conflict` and outputs D.
//
// Following the published design: six basic units per bit, D-state
// superposition, input a on the main path and b on the control path. This
// design's choices: the one-pixel-per-input-value encoding of a with
// H-polarized light, and which polarizers and LC type each unit position uses.
//
// Timing: combinational (optical).
module processor_bit
  import toc_pkg::*;
(
  input  light_t   a,         // main path input
  input  light_t   b,         // control path input
  input  bit_dir_t dir,       // directives of the six units, [row][out]
  output light_t   c,         // superimposed output
  output logic     conflict   // H and V light reached the output together
);

  light_t pixel [3];          // encoded main-path light per row D, H, V
  light_t unit_out [3][2];    // [row][0 = H unit, 1 = V unit]
  logic   any_h, any_v;

  for (genvar r = 0; r < 3; r++) begin : g_row
    assign pixel[r] = (light_index(a) == r) ? LIGHT_H : LIGHT_D;

    basic_op_unit #(.P1(LIGHT_H), .P2(LIGHT_H), .LC_STATIC_ROT(1'b1)) u_h (
      .a_light(pixel[r]), .b(b), .dir(dir[r][0]), .c(unit_out[r][0])
    );
    basic_op_unit #(.P1(LIGHT_H), .P2(LIGHT_V), .LC_STATIC_ROT(1'b0)) u_v (
      .a_light(pixel[r]), .b(b), .dir(dir[r][1]), .c(unit_out[r][1])
    );
  end

  // Optical superposition on the output pixel.
  always_comb begin
    any_h = 1'b0;
    any_v = 1'b0;
    for (int r = 0; r < 3; r++) begin
      for (int o = 0; o < 2; o++) begin
        if (unit_out[r][o] == LIGHT_H) any_h = 1'b1;
        if (unit_out[r][o] == LIGHT_V) any_v = 1'b1;
      end
    end
    conflict = any_h && any_v;
    if (any_h && !any_v)      c = LIGHT_H;
    else if (any_v && !any_h) c = LIGHT_V;
    else                      c = LIGHT_D;
  end

endmodule
