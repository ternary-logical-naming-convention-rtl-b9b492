// basic_op_unit: one basic operation unit of the ternary optical processor.
//
// The unit has two light paths. The control path splits input b into three
// beams: g1 sits behind a vertical polarizer (high only when b is V), g2 behind
// a horizontal polarizer (high only when b is H), g3 has no polarizer (high when
// b is bright, H or V). The selector S picks one phototube by {k2,k3}, and the
// XOR gate Y inverts S when k1 is 1. Y drives the liquid crystal (LC) of the
// main path: input a passes polarizer P1, is rotated by 90 degrees or not by
// the LC, and leaves through polarizer P2. Light that does not match a
// polarizer is blocked (D). The LC rotates in its static state when
// LC_STATIC_ROT is 1, and a high Y reverses its static behaviour.
//
// Hence the output c is either P2's polarization or D: the unit emits light
// only for the input values the directive selects. P1, P2 and the static LC
// behaviour are fixed when the unit is built (parameters); k1..k3 are the
// reconfigure directive.
//
// The structure (phototubes, S, Y, P1/LC/P2) follows the published unit. The
// {k2,k3} code assignment, including a fourth code that selects no phototube
// (S low), is this design's choice; it lets a unit be switched fully off or
// fully on without a phototube. Polarizers and LC are modelled by their
// discrete effect on the three light states.
//
// Timing: purely combinational (an optical path).
module basic_op_unit
  import toc_pkg::*;
#(
  parameter light_t P1            = LIGHT_H,  // first polarizer of the main path
  parameter light_t P2            = LIGHT_H,  // second polarizer of the main path
  parameter bit     LC_STATIC_ROT = 1'b1      // LC rotates when Y is low
) (
  input  light_t    a_light,  // main path input
  input  light_t    b,        // control path input
  input  unit_dir_t dir,      // reconfigure directive {k1, k2, k3}
  output light_t    c         // main path output
);

  logic   g1, g2, g3;   // phototubes
  logic   s;            // selector S
  logic   y;            // XOR gate Y, drives the LC
  logic   rotate;       // LC rotates the polarization by 90 degrees
  light_t after_p1, after_lc;

  always_comb begin
    g1 = (b == LIGHT_V);
    g2 = (b == LIGHT_H);
    g3 = (b == LIGHT_H) || (b == LIGHT_V);

    unique case (dir.k23)
      SEL_G1:  s = g1;
      SEL_G2:  s = g2;
      SEL_G3:  s = g3;
      default: s = 1'b0;
    endcase
    y = s ^ dir.k1;

    // P1 passes only light of its own polarization.
    after_p1 = (a_light == P1) ? P1 : LIGHT_D;

    rotate = LC_STATIC_ROT ^ y;
    unique case (after_p1)
      LIGHT_H: after_lc = rotate ? LIGHT_V : LIGHT_H;
      LIGHT_V: after_lc = rotate ? LIGHT_H : LIGHT_V;
      default: after_lc = LIGHT_D;
    endcase

    c = (after_lc == P2) ? P2 : LIGHT_D;
  end

endmodule
