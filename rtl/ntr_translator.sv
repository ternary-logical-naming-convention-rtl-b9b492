// ntr_translator: turns a standard name (NTR) into reconfigure directives.
//
// A processor bit holds six basic operation units, one per (input-row, output)
// pair: for each row D, H, V of the standard truth table, one unit emits H and
// one emits V. The H unit of a row must pass light exactly for the columns of
// the row's H mark, the V unit for the columns of its V mark. Every unit is
// built so that a high Y lets light through, so the directive of a unit is
// the (k1, S) pair that makes Y equal "b is in the mark":
//
//   mark  columns   S      k1        mark  columns   S      k1
//   0     none      none   0         4     V         g1     0
//   1     D         g3     1         5     D,V       g2     1
//   2     H         g2     0         6     H,V       g3     0
//   3     D,H       g1     1         7     D,H,V     none   1
//
// k1 is simply "column D is in the mark". A name is legal when no column of a
// row is in both its H mark and its V mark (each cell has one output); that is
// the row constraint of the naming convention, which leaves 27 legal rows and
// 3^9 = 19683 legal names. The mark semantics, the row constraint and the six
// units per bit follow the published convention; the directive table above
// is this design's own mapping onto its unit structure.
//
// Timing: combinational.
module ntr_translator
  import toc_pkg::*;
(
  input  ntr_t     ntr,    // standard name, 18'oN1N2N3N4N5N6
  output bit_dir_t dir,    // directives of the six units, [row][out]
  output logic     legal   // the name obeys the row constraints
);

  function automatic unit_dir_t mark_to_dir(mark_t m);
    unit_dir_t d;
    d.k1 = m[0];
    unique case (m)
      3'd1, 3'd6: d.k23 = SEL_G3;
      3'd2, 3'd5: d.k23 = SEL_G2;
      3'd3, 3'd4: d.k23 = SEL_G1;
      default:    d.k23 = SEL_NONE;   // 0 and 7: Y is the constant k1
    endcase
    return d;
  endfunction

  ntr_row_t rows [3];

  always_comb begin
    rows[0] = ntr.row_d;
    rows[1] = ntr.row_h;
    rows[2] = ntr.row_v;
    legal   = 1'b1;
    for (int r = 0; r < 3; r++) begin
      dir[r][0] = mark_to_dir(rows[r].h_mark);
      dir[r][1] = mark_to_dir(rows[r].v_mark);
      if ((rows[r].h_mark & rows[r].v_mark) != 3'b000) legal = 1'b0;
    end
  end

endmodule
