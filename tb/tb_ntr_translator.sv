// tb_ntr_translator: checks the name-to-directive translation for all 2^18
// codes of a six-digit standard name.
//
// Legal names are those whose H and V marks share no column in any row; the
// test counts them (3^9 = 19683 expected) and the legal rows per H mark
// (8, 4, 4, 2, 4, 2, 2, 1 for H marks 0..7). For every directive it models the
// control path (phototubes, selector, XOR) and checks that Y is high exactly
// for the control inputs listed in the corresponding mark.
module tb_ntr_translator;
  import toc_pkg::*;

  int checks = 0;
  int failures = 0;

  ntr_t     ntr;
  bit_dir_t dir;
  logic     legal;

  ntr_translator dut (.ntr(ntr), .dir(dir), .legal(legal));

  function automatic bit control_y(unit_dir_t d, int col);
    // col 0 = D, 1 = H, 2 = V
    bit phot;
    case (d.k23)
      2'b01:   phot = (col == 2);
      2'b10:   phot = (col == 1);
      2'b11:   phot = (col != 0);
      default: phot = 0;
    endcase
    return phot ^ d.k1;
  endfunction

  int legal_names = 0;
  int row_count [8];

  initial begin
    for (int m = 0; m < 8; m++) row_count[m] = 0;
    for (int n = 0; n < (1 << 18); n++) begin
      bit     exp_legal;
      mark_t  marks [6];
      exp_legal = 1;
      ntr = ntr_t'(n);
      #1;
      for (int k = 0; k < 6; k++) marks[k] = mark_t'(n >> (3 * (5 - k)));
      for (int r = 0; r < 3; r++)
        if ((marks[2*r] & marks[2*r+1]) != 0) exp_legal = 0;
      checks++;
      if (legal !== exp_legal) begin
        failures++;
        $display("FAIL legal %o: got %b", n, legal);
      end
      if (legal) legal_names++;
      // directive semantics, checked on a sample to keep the run short
      if (n % 7 == 0 || n < 512) begin
        for (int r = 0; r < 3; r++)
          for (int o = 0; o < 2; o++)
            for (int col = 0; col < 3; col++) begin
              checks++;
              if (control_y(dir[r][o], col) != marks[2*r+o][col]) begin
                failures++;
                $display("FAIL name %o row %0d out %0d col %0d", n, r, o, col);
              end
            end
      end
    end
    // legal rows per H mark, from the first row of names [hv 00 00]
    for (int h = 0; h < 8; h++)
      for (int v = 0; v < 8; v++) begin
        ntr = ntr_t'({h[2:0], v[2:0], 12'o0000});
        #1;
        if (legal) row_count[h]++;
      end
    checks++;
    if (legal_names != 19683) begin
      failures++;
      $display("FAIL legal names %0d", legal_names);
    end
    begin
      int want [8] = '{8, 4, 4, 2, 4, 2, 2, 1};
      for (int h = 0; h < 8; h++) begin
        checks++;
        if (row_count[h] != want[h]) begin
          failures++;
          $display("FAIL H mark %0d allows %0d V marks", h, row_count[h]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
