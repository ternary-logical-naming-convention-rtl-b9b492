// tb_processor_bit: a processor bit configured by standard names.
//
// 1. The eight names of the TW-MSD and SJ-MSD transforms must reproduce their
//    printed truth tables for every input pair (J3 only for inputs 0 and 1).
// 2. Random legal names must give, for all nine input pairs, the output that
//    the name's digits define, with no conflict.
// 3. A name whose H and V marks overlap must raise `conflict` exactly on the
//    overlapping cells.
module tb_processor_bit;
  import toc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  ntr_t     ntr;
  bit_dir_t dir;
  logic     legal;
  light_t   a, b, c;
  logic     conflict;

  ntr_translator u_tr (.ntr(ntr), .dir(dir), .legal(legal));
  processor_bit  dut  (.a(a), .b(b), .dir(dir), .c(c), .conflict(conflict));

  light_t states [3] = '{LIGHT_D, LIGHT_H, LIGHT_V};

  task automatic check_named(ntr_t n, tf_t f, string label);
    ntr = n;
    for (int x = -1; x <= 1; x++)
      for (int y = -1; y <= 1; y++) begin
        if (f == TF_J3 && (x < 0 || y < 0)) continue;
        a = digit_to_light(x);
        b = digit_to_light(y);
        #1;
        checks++;
        if (light_to_digit(c) != table_eval(f, x, y) || conflict) begin
          failures++;
          $display("FAIL %s(%0d,%0d) = %0d, table says %0d", label, x, y,
                   light_to_digit(c), table_eval(f, x, y));
        end
      end
  endtask

  function automatic ntr_t random_legal();
    logic [17:0] n;
    for (int r = 0; r < 3; r++) begin
      logic [2:0] hm, vm;
      hm = 3'($urandom);
      vm = 3'($urandom) & ~hm;
      n[17 - 6 * r -: 6] = {hm, vm};
    end
    return ntr_t'(n);
  endfunction

  int conflicts_seen = 0;

  initial begin
    #1;
    check_named(NTR_T,  TF_T,   "T");
    check_named(NTR_W,  TF_W,   "W");
    check_named(NTR_TP, TF_TP,  "T'");
    check_named(NTR_WP, TF_WP,  "W'");
    check_named(NTR_S1, TF_S1,  "S1");
    check_named(NTR_S2, TF_S2,  "S2");
    check_named(NTR_J1, TF_J12, "J1/J2");
    check_named(NTR_J3, TF_J3,  "J3");

    for (int k = 0; k < 3000; k++) begin
      ntr = random_legal();
      for (int ia = 0; ia < 3; ia++)
        for (int ib = 0; ib < 3; ib++) begin
          a = states[ia];
          b = states[ib];
          #1;
          checks++;
          if (!legal || c != ntr_eval(ntr, a, b) || conflict) begin
            failures++;
            $display("FAIL name %o a=%s b=%s: got %s", ntr, a.name(), b.name(), c.name());
          end
        end
    end

    // overlapping marks in row H, column V: [00 44 00]
    ntr = 18'o004400;
    for (int ia = 0; ia < 3; ia++)
      for (int ib = 0; ib < 3; ib++) begin
        a = states[ia];
        b = states[ib];
        #1;
        checks++;
        if (conflict != (a == LIGHT_H && b == LIGHT_V) || legal) begin
          failures++;
          $display("FAIL conflict a=%s b=%s", a.name(), b.name());
        end
        if (conflict) conflicts_seen++;
      end
    checks++;
    if (conflicts_seen != 1) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
