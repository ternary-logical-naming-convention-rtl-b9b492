// tb_basic_op_unit: exhaustive check of the basic operation unit.
//
// Builds all eight units (P1, P2 in {H, V}, LC rotating or not in its static
// state) and drives every main input, control input and directive. The
// expected output is worked out from the optics: light leaves only if a has
// P1's polarization and, after the LC, has P2's; the LC rotates when its
// static behaviour is not reversed by Y, and Y is the chosen phototube XOR k1.
module tb_basic_op_unit;
  import toc_pkg::*;

  int checks = 0;
  int failures = 0;

  light_t    a, b;
  unit_dir_t dir;
  light_t    c [8];

  for (genvar v = 0; v < 8; v++) begin : g_unit
    localparam light_t P1 = v[0] ? LIGHT_V : LIGHT_H;
    localparam light_t P2 = v[1] ? LIGHT_V : LIGHT_H;
    basic_op_unit #(.P1(P1), .P2(P2), .LC_STATIC_ROT(v[2])) dut (
      .a_light(a), .b(b), .dir(dir), .c(c[v])
    );
  end

  function automatic light_t expect_out(int v, light_t av, light_t bv, unit_dir_t d);
    bit p1v = v[0], p2v = v[1], lc = v[2];
    bit phot, yy, turns, a_is_v;
    // phototube chosen by S
    case (d.k23)
      2'b01:   phot = (bv == LIGHT_V);
      2'b10:   phot = (bv == LIGHT_H);
      2'b11:   phot = (bv != LIGHT_D);
      default: phot = 0;
    endcase
    yy    = phot ^ d.k1;
    turns = lc ^ yy;
    if (av == LIGHT_D) return LIGHT_D;
    a_is_v = (av == LIGHT_V);
    if (a_is_v != p1v) return LIGHT_D;          // blocked by P1
    if ((p1v ^ turns) != p2v) return LIGHT_D;   // blocked by P2
    return p2v ? LIGHT_V : LIGHT_H;
  endfunction

  int lit_h = 0, lit_v = 0;
  light_t states [3] = '{LIGHT_D, LIGHT_H, LIGHT_V};

  initial begin
    #1;
    for (int ia = 0; ia < 3; ia++)
      for (int ib = 0; ib < 3; ib++)
        for (int d = 0; d < 8; d++) begin
          a   = states[ia];
          b   = states[ib];
          dir = unit_dir_t'(d);
          #1;
          for (int v = 0; v < 8; v++) begin
            light_t e;
            e = expect_out(v, a, b, dir);
            checks++;
            if (c[v] != e) begin
              failures++;
              $display("FAIL unit %0d a=%s b=%s dir=%b: got %s want %s",
                       v, a.name(), b.name(), dir, c[v].name(), e.name());
            end
            if (c[v] == LIGHT_H) lit_h++;
            if (c[v] == LIGHT_V) lit_v++;
          end
        end
    // both output polarizations must have been produced
    checks++;
    if (lit_h == 0 || lit_v == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
