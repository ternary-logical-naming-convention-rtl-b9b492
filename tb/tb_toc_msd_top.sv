// tb_toc_msd_top: the whole processor, at its default size, running the
// three-adder experiment end to end.
//
// 1. Reconstructed frame: the fifteen calculators of the allocation table
//    (T, W, T', W', T for the 14-, 9- and 12-digit adders), plus one entry with
//    an illegal name and one with a range past the last bit, which must be
//    refused.
// 2. The six operand pairs of each adder from the experiment, one pair per
//    adder per frame, so that all three steps of every adder are busy at once.
//    Each sum must have the value a + b; the first sum of each adder must also
//    match the published digit string (leading zeros aside).
// 3. A long random stream with bubbles (frames without new operands) and idle
//    cycles between frames, checking every sum and its three-frame latency.
// Mechanisms counted, each required at least once: accepted entry, refused
// entry, frame with all three steps of an adder busy, bubble, idle cycle
// between frames. No decoded frame may show an H+V conflict.
module tb_toc_msd_top;
  import toc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NA = 3;
  localparam int MW = 14;
  localparam int WID [NA] = '{14, 9, 12};

  int checks = 0;
  int failures = 0;

  logic       clk = 0;
  logic       rst_n = 0;
  logic       cfg_valid = 0;
  ntr_t       cfg_ntr = '0;
  logic [7:0] cfg_first = '0, cfg_last = '0;
  logic       cfg_accept, cfg_reject;
  logic       frame_en = 0;
  logic       op_valid [NA];
  light_t     op_a [NA][MW];
  light_t     op_b [NA][MW];
  light_t     sum  [NA][MW+2];
  logic       sum_valid [NA];
  logic [2:0] stage_busy [NA];
  logic       frame_done, conflict;

  toc_msd_top dut (
    .clk, .rst_n, .cfg_valid, .cfg_ntr, .cfg_first, .cfg_last,
    .cfg_accept, .cfg_reject, .frame_en, .op_valid, .op_a, .op_b,
    .sum, .sum_valid, .stage_busy, .frame_done, .conflict
  );

  always #5 clk = ~clk;

  // ---- experiment data: operand digit strings, most significant digit first
  string data_a [NA][6] = '{
    '{"0u01111u110111", "01010110001011", "0u01101u110111",
      "11111111111111", "uuuuuuuuuuuuuu", "00000000000000"},
    '{"11u11u1u1", "000000000", "uuuuuuuuu", "10uu1u0u1", "1uu101u01", "0uu1100u0"},
    '{"1011u110u110", "0uu1100u0110", "10uu1u0u1010", "10uu1u0u1010",
      "011010011110", "011000001111"}};
  string data_b [NA][6] = '{
    '{"01u01u11101uu1", "11011101010101", "01u01u11101u01",
      "11111111111111", "11111111111111", "00000000000000"},
    '{"u11101u1u", "000000000", "uuuuuuuuu", "u10u11u00", "01uu1u010", "0u10u10u1"},
    '{"10u1u1u00110", "0u10u10u1110", "110uu100u111", "u10u11u00u1u",
      "110110010101", "111001011010"}};
  // published first sums (as read from the processor output)
  string first_sum [NA] = '{"00000010110u010", "01011u0000", "01001u10000100"};

  int exp_val   [NA][$];
  int exp_frame [NA][$];
  string exp_str [NA][$];
  int frame_no = 0;
  int accepted = 0, refused = 0, full_overlaps = 0, bubbles = 0, idles = 0;
  int sums_seen = 0, digit_matches = 0;

  function automatic int str_value(string s);
    int v = 0;
    for (int i = 0; i < s.len(); i++) v = 2 * v + char_to_digit(s[i]);
    return v;
  endfunction

  task automatic send_entry(ntr_t n, int first, int last);
    cfg_valid = 1;
    cfg_ntr   = n;
    cfg_first = 8'(first);
    cfg_last  = 8'(last);
    @(posedge clk);
    #1 cfg_valid = 0;
    if (cfg_accept) accepted++;
    if (cfg_reject) refused++;
  endtask

  // one frame; ops[k] = "" means no new operands for adder k
  task automatic run_frame(string sa [NA], string sb [NA], string expect_digits [NA]);
    for (int k = 0; k < NA; k++) begin
      op_valid[k] = (sa[k].len() != 0);
      for (int i = 0; i < MW; i++) begin
        op_a[k][i] = LIGHT_D;
        op_b[k][i] = LIGHT_D;
      end
      if (op_valid[k]) begin
        for (int i = 0; i < WID[k]; i++) begin
          op_a[k][i] = digit_to_light(char_to_digit(sa[k][WID[k] - 1 - i]));
          op_b[k][i] = digit_to_light(char_to_digit(sb[k][WID[k] - 1 - i]));
        end
        exp_val[k].push_back(str_value(sa[k]) + str_value(sb[k]));
        exp_frame[k].push_back(frame_no);
        exp_str[k].push_back(expect_digits[k]);
      end else bubbles++;
    end
    frame_en = 1;
    #1;
    for (int k = 0; k < NA; k++) if (stage_busy[k] == 3'b111) full_overlaps++;
    @(posedge clk);
    frame_no++;
    #1 frame_en = 0;
    for (int k = 0; k < NA; k++) op_valid[k] = 0;
  endtask

  // output checker, half a cycle after the decoder edge
  always @(negedge clk) begin
    if (rst_n && frame_done) begin
      checks++;
      if (conflict) begin
        failures++;
        $display("FAIL conflict in decoded frame");
      end
    end
    for (int k = 0; k < NA; k++) begin
      if (rst_n && sum_valid[k]) begin
        int v, f;
        string es;
        sums_seen++;
        checks += 2;
        if (exp_val[k].size() == 0) begin
          failures += 2;
          $display("FAIL adder %0d: unexpected sum", k);
        end else begin
          v  = exp_val[k].pop_front();
          f  = exp_frame[k].pop_front();
          es = exp_str[k].pop_front();
          begin
            int got;
            got = 0;
            for (int i = WID[k] + 1; i >= 0; i--) got = 2 * got + light_to_digit(sum[k][i]);
            if (got != v) begin
              failures++;
              $display("FAIL adder %0d: sum %0d, want %0d", k, got, v);
            end
          end
          if (frame_no - f != 3) begin
            failures++;
            $display("FAIL adder %0d: latency %0d frames", k, frame_no - f);
          end
          if (es.len() != 0) begin
            // compare digit by digit from the least significant end
            checks++;
            for (int i = 0; i < WID[k] + 2; i++) begin
              int want;
              want = (i < es.len()) ? char_to_digit(es[es.len() - 1 - i]) : 0;
              if (light_to_digit(sum[k][i]) != want) begin
                failures++;
                $display("FAIL adder %0d: digit %0d differs from published sum", k, i);
                break;
              end
              if (i == WID[k] + 1) digit_matches++;
            end
          end
        end
      end
    end
  end

  initial begin
    string sa [NA], sb [NA], ed [NA];
    for (int k = 0; k < NA; k++) begin
      op_valid[k] = 0;
      for (int i = 0; i < MW; i++) begin
        op_a[k][i] = LIGHT_D;
        op_b[k][i] = LIGHT_D;
      end
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // 1. reconstructed frame (0-based ranges of the allocation table)
    send_entry(NTR_T, 0, 13);    send_entry(NTR_W, 14, 27);   send_entry(NTR_TP, 28, 42);
    send_entry(NTR_WP, 43, 57);  send_entry(NTR_T, 58, 73);
    send_entry(NTR_T, 74, 82);   send_entry(NTR_W, 83, 91);   send_entry(NTR_TP, 92, 101);
    send_entry(NTR_WP, 102, 111); send_entry(NTR_T, 112, 122);
    send_entry(NTR_T, 123, 134); send_entry(NTR_W, 135, 146); send_entry(NTR_TP, 147, 159);
    send_entry(NTR_WP, 160, 172); send_entry(NTR_T, 173, 186);
    send_entry(18'o241105, 187, 191);   // illegal: row H has H and V at column D
    send_entry(NTR_T, 187, 195);        // past bit 191
    checks += 2;
    if (accepted != 15) failures++;
    if (refused != 2) failures++;

    // 2. the experiment, back to back
    for (int item = 0; item < 6; item++) begin
      for (int k = 0; k < NA; k++) begin
        sa[k] = data_a[k][item];
        sb[k] = data_b[k][item];
        ed[k] = (item == 0) ? first_sum[k] : "";
      end
      run_frame(sa, sb, ed);
    end
    for (int k = 0; k < NA; k++) begin
      sa[k] = "";
      sb[k] = "";
      ed[k] = "";
    end
    repeat (3) run_frame(sa, sb, ed);
    @(posedge clk);
    #1;
    checks++;
    if (digit_matches != NA) begin
      failures++;
      $display("FAIL %0d published sums matched digit for digit", digit_matches);
    end

    // 3. random stream
    for (int n = 0; n < 300; n++) begin
      for (int k = 0; k < NA; k++) begin
        ed[k] = "";
        if ($urandom_range(4) == 0) begin
          sa[k] = "";
          sb[k] = "";
        end else begin
          sa[k] = "";
          sb[k] = "";
          for (int i = 0; i < WID[k]; i++) begin
            int r1, r2;
            r1 = $urandom_range(2);
            r2 = $urandom_range(2);
            sa[k] = {sa[k], (r1 == 0) ? "u" : (r1 == 1) ? "0" : "1"};
            sb[k] = {sb[k], (r2 == 0) ? "u" : (r2 == 1) ? "0" : "1"};
          end
        end
      end
      run_frame(sa, sb, ed);
      if ($urandom_range(3) == 0) begin
        @(posedge clk);
        #1 idles++;
      end
    end
    for (int k = 0; k < NA; k++) begin
      sa[k] = "";
      sb[k] = "";
    end
    repeat (3) run_frame(sa, sb, ed);
    @(posedge clk);
    #1;

    for (int k = 0; k < NA; k++) begin
      checks++;
      if (exp_val[k].size() != 0) begin
        failures++;
        $display("FAIL adder %0d: %0d sums missing", k, exp_val[k].size());
      end
    end
    checks += 5;
    if (accepted == 0) failures++;
    if (refused == 0) failures++;
    if (full_overlaps == 0) failures++;
    if (bubbles == 0) failures++;
    if (idles == 0) failures++;
    $display("entries accepted=%0d refused=%0d sums=%0d full_overlaps=%0d bubbles=%0d idle_cycles=%0d",
             accepted, refused, sums_seen, full_overlaps, bubbles, idles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
