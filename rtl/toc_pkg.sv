// toc_pkg: shared types and constants of the ternary optical processor.
//
// Light states. Every signal on an optical path carries one of three physical
// states: no light (D), horizontally polarized light (H) or vertically
// polarized light (V). D is the "decrease-radix" state: superimposing D with
// any state lambda gives lambda, so the outputs of several basic operation
// units can simply be combined. The 2-bit code 2'b11 is not a light state; it
// is read as D wherever it could reach (a design choice).
//
// Standard names. A ternary logic operation is named by its value-feature name
// (CNV) and its transform-rule name (NTR). The standard truth table lists rows
// and columns in the order c, a, b, which for the optical processor is D, H, V.
// The NTR is six column marks [N1 N2 N3 N4 N5 N6]: for the row of input D, H, V
// in turn, N(odd) marks the columns whose output is H ("a") and N(even) the
// columns whose output is V ("b"). A mark is a 3-bit set of columns: weight 1
// for column D, 2 for column H, 4 for column V; columns in neither set output D.
// Each mark is one octal digit, so the name [24 30 05] is simply 18'o243005.
//
// MSD digits follow the value-feature name D(0,-1,1) used by the adders:
// digit 0 is D, digit -1 (written u) is H, digit 1 is V.
package toc_pkg;

  typedef enum logic [1:0] {
    LIGHT_D = 2'b00,   // no light; MSD digit 0
    LIGHT_H = 2'b01,   // horizontal polarization; MSD digit -1 (u)
    LIGHT_V = 2'b10    // vertical polarization; MSD digit 1
  } light_t;

  // Column set of a truth-table row: bit 0 = column D, bit 1 = H, bit 2 = V.
  typedef logic [2:0] mark_t;

  // One row of an NTR: the H mark ("a" column mark) then the V mark.
  typedef struct packed {
    mark_t h_mark;
    mark_t v_mark;
  } ntr_row_t;

  // A whole NTR, rows in standard order D, H, V (first row in the MSBs).
  typedef struct packed {
    ntr_row_t row_d;
    ntr_row_t row_h;
    ntr_row_t row_v;
  } ntr_t;

  // Reconfigure directive of one basic operation unit: k1 inverts the
  // selected control signal, {k2,k3} selects the phototube.
  typedef struct packed {
    logic       k1;
    logic [1:0] k23;
  } unit_dir_t;

  // {k2,k3} codes of the three-choose-one selector S.
  localparam logic [1:0] SEL_NONE = 2'b00;  // no phototube: S outputs low
  localparam logic [1:0] SEL_G1   = 2'b01;  // g1: b is V
  localparam logic [1:0] SEL_G2   = 2'b10;  // g2: b is H
  localparam logic [1:0] SEL_G3   = 2'b11;  // g3: b is bright (H or V)

  // Directives of the six units of a processor bit: index [row][out], row in
  // D,H,V order (0,1,2), out 0 = the unit that emits H, 1 = the unit that emits V;
  // [0][0] sits in the MSBs, the same place as N1 in an ntr_t.
  typedef unit_dir_t [0:2][0:1] bit_dir_t;

  // Standard names of the TW-MSD transforms, value-feature name D(0,-1,1).
  localparam ntr_t NTR_T  = 18'o243005;
  localparam ntr_t NTR_W  = 18'o420110;
  localparam ntr_t NTR_TP = 18'o002004;   // T'
  localparam ntr_t NTR_WP = 18'o241001;   // W'

  // Standard names of the SJ-MSD transforms (same value-feature name).
  localparam ntr_t NTR_S1 = 18'o203004;
  localparam ntr_t NTR_S2 = 18'o060101;
  localparam ntr_t NTR_J1 = 18'o601021;   // J1/J2
  localparam ntr_t NTR_J3 = 18'o400410;

  // Index of a light state in the standard order D, H, V.
  function automatic int unsigned light_index(light_t s);
    case (s)
      LIGHT_H: return 1;
      LIGHT_V: return 2;
      default: return 0;
    endcase
  endfunction

  // Column-set bit of a light state.
  function automatic mark_t light_mark(light_t s);
    return mark_t'(3'b001 << light_index(s));
  endfunction

endpackage
