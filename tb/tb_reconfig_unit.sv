// tb_reconfig_unit: loading a reconstructed frame into a 192-bit processor.
//
// Sends the experiment's fifteen calculator entries (T, W, T', W', T for three
// adders), then random legal entries over random ranges, then entries that
// must be refused: names with overlapping marks, an empty range and a range
// past the last bit. After every entry the directives of all bits are compared
// with a model that stores the name per bit and translates it with the
// mark-to-directive table; accept/reject must pulse one cycle after the entry.
module tb_reconfig_unit;
  import toc_pkg::*;

  localparam int N = 192;
  localparam int IW = $clog2(N);

  int checks = 0;
  int failures = 0;

  logic          clk = 0;
  logic          rst_n = 0;
  logic          cfg_valid = 0;
  ntr_t          cfg_ntr = '0;
  logic [IW-1:0] cfg_first = '0, cfg_last = '0;
  logic          cfg_accept, cfg_reject;
  bit_dir_t      dir [N];

  reconfig_unit #(.N_BITS(N)) dut (
    .clk, .rst_n, .cfg_valid, .cfg_ntr, .cfg_first, .cfg_last,
    .cfg_accept, .cfg_reject, .dir
  );

  always #5 clk = ~clk;

  logic [17:0] model [N];
  int accepted = 0, rejected = 0;

  // mark -> {k1, k2, k3}
  function automatic logic [2:0] expect_dir(logic [2:0] m);
    case (m)
      3'd0: return 3'b000;
      3'd1: return 3'b111;
      3'd2: return 3'b010;
      3'd3: return 3'b101;
      3'd4: return 3'b001;
      3'd5: return 3'b110;
      3'd6: return 3'b011;
      default: return 3'b100;
    endcase
  endfunction

  function automatic logic [17:0] expect_bit(logic [17:0] n);
    logic [17:0] d;
    for (int k = 0; k < 6; k++) d[17 - 3 * k -: 3] = expect_dir(n[17 - 3 * k -: 3]);
    return d;
  endfunction

  task automatic compare_all(string what);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (18'(dir[i]) != expect_bit(model[i])) begin
        failures++;
        $display("FAIL %s: bit %0d holds %b, want %b", what, i, 18'(dir[i]), expect_bit(model[i]));
      end
    end
  endtask

  task automatic send(ntr_t n, int first, int last, bit want_accept);
    cfg_valid = 1;
    cfg_ntr   = n;
    cfg_first = IW'(first);
    cfg_last  = IW'(last);
    @(posedge clk);
    #1 cfg_valid = 0;
    checks++;
    if (cfg_accept != want_accept || cfg_reject != !want_accept) begin
      failures++;
      $display("FAIL entry %o [%0d,%0d]: accept=%b reject=%b", n, first, last,
               cfg_accept, cfg_reject);
    end
    if (cfg_accept) accepted++;
    if (cfg_reject) rejected++;
    if (want_accept)
      for (int i = first; i <= last; i++) model[i] = n;
    compare_all("after entry");
  endtask

  initial begin
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    compare_all("after reset");
    // f1, f2, f3 allocation (0-based)
    send(NTR_T, 0, 13, 1);    send(NTR_W, 14, 27, 1);   send(NTR_TP, 28, 42, 1);
    send(NTR_WP, 43, 57, 1);  send(NTR_T, 58, 73, 1);
    send(NTR_T, 74, 82, 1);   send(NTR_W, 83, 91, 1);   send(NTR_TP, 92, 101, 1);
    send(NTR_WP, 102, 111, 1); send(NTR_T, 112, 122, 1);
    send(NTR_T, 123, 134, 1); send(NTR_W, 135, 146, 1); send(NTR_TP, 147, 159, 1);
    send(NTR_WP, 160, 172, 1); send(NTR_T, 173, 186, 1);
    for (int k = 0; k < 100; k++) begin
      logic [17:0] n;
      int f, l;
      for (int r = 0; r < 3; r++) begin
        logic [2:0] hm;
        hm = 3'($urandom);
        n[17 - 6 * r -: 6] = {hm, 3'($urandom) & ~hm};
      end
      f = $urandom_range(N - 1);
      l = $urandom_range(N - 1, f);
      send(ntr_t'(n), f, l, 1);
    end
    send(18'o110000, 0, 10, 0);   // row D: H and V both at column D
    send(18'o000066, 5, 9, 0);    // row V overlap
    send(NTR_T, 20, 10, 0);       // empty range
    send(NTR_T, 180, 200, 0);     // past the last bit
    // an idle cycle changes nothing
    @(posedge clk);
    #1;
    checks++;
    if (cfg_accept || cfg_reject) failures++;
    compare_all("idle");
    checks++;
    if (accepted != 115 || rejected != 4) failures++;
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
