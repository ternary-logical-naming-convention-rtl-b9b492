// tb_ref_pkg: reference models shared by the testbenches.
//
// - ntr_eval: what a standard name means, read straight from its six digits.
// - table_eval: the TW-MSD and SJ-MSD transforms as printed truth tables
//   (digits 0, 1, u = -1), independent of their names.
// - digit helpers for MSD numbers held as arrays of light states.
package tb_ref_pkg;
  import toc_pkg::*;

  function automatic int idx(light_t s);
    case (s)
      LIGHT_H: return 1;
      LIGHT_V: return 2;
      default: return 0;
    endcase
  endfunction

  // Output of the operation named `n` for row input a and column input b.
  function automatic light_t ntr_eval(logic [17:0] n, light_t a, light_t b);
    logic [2:0] hm, vm;
    int r = idx(a), c = idx(b);
    hm = n[17 - 6 * r -: 3];
    vm = n[14 - 6 * r -: 3];
    if (hm[c]) return LIGHT_H;
    if (vm[c]) return LIGHT_V;
    return LIGHT_D;
  endfunction

  function automatic int light_to_digit(light_t s);
    case (s)
      LIGHT_H: return -1;
      LIGHT_V: return 1;
      default: return 0;
    endcase
  endfunction

  function automatic light_t digit_to_light(int d);
    if (d < 0) return LIGHT_H;
    if (d > 0) return LIGHT_V;
    return LIGHT_D;
  endfunction

  function automatic int char_to_digit(byte ch);
    if (ch == "u") return -1;
    if (ch == "1") return 1;
    return 0;
  endfunction

  // Printed truth tables. TW-MSD tables list rows and columns in the order
  // u, 0, 1; SJ-MSD tables in the order 0, 1, u.
  typedef enum int {TF_T, TF_W, TF_TP, TF_WP, TF_S1, TF_S2, TF_J12, TF_J3} tf_t;

  function automatic int table_eval(tf_t f, int x, int y);
    string rows [3];
    int ix, iy;
    case (f)
      TF_T:   rows = '{"uu0", "u01", "011"};
      TF_W:   rows = '{"010", "10u", "0u0"};
      TF_TP:  rows = '{"u00", "000", "001"};
      TF_WP:  rows = '{"0u0", "u01", "010"};
      TF_S1:  rows = '{"00u", "010", "u0u"};
      TF_S2:  rows = '{"011", "100", "100"};
      TF_J12: rows = '{"0uu", "10u", "u00"};
      default: rows = '{"0u0", "u00", "010"};  // J3; its third column is unused
    endcase
    if (f <= TF_WP) begin
      ix = x + 1;  iy = y + 1;
    end else begin
      ix = (x < 0) ? 2 : x;  iy = (y < 0) ? 2 : y;
    end
    return char_to_digit(rows[ix][iy]);
  endfunction

endpackage
