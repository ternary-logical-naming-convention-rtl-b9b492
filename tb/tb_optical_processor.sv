// tb_optical_processor: parallel processor bits and the decoder latch.
//
// A 24-bit processor gets a random legal name per bit (through the name
// translator) and random data frames. After each frame the decoded result of
// every bit must equal what its name defines for its inputs; result_valid must
// pulse for exactly the cycle after the frame, and the result must hold while
// no frame runs even if the inputs change. One bit is then given an
// overlapping name and an input pair that lights both units: conflict_any must
// be set for that frame.
module tb_optical_processor;
  import toc_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 24;

  int checks = 0;
  int failures = 0;

  logic     clk = 0;
  logic     rst_n = 0;
  ntr_t     names   [N];
  bit_dir_t dir     [N];
  logic     legal   [N];
  light_t   main_in [N];
  light_t   ctrl_in [N];
  logic     frame_en = 0;
  light_t   result  [N];
  logic     result_valid, conflict_any;

  for (genvar i = 0; i < N; i++) begin : g_tr
    ntr_translator u_tr (.ntr(names[i]), .dir(dir[i]), .legal(legal[i]));
  end

  optical_processor #(.N_BITS(N)) dut (
    .clk, .rst_n, .dir, .main_in, .ctrl_in, .frame_en,
    .result, .result_valid, .conflict_any
  );

  always #5 clk = ~clk;

  light_t states [3] = '{LIGHT_D, LIGHT_H, LIGHT_V};
  light_t expected [N];
  int frames = 0, holds = 0;

  task automatic randomize_frame();
    for (int i = 0; i < N; i++) begin
      main_in[i] = states[$urandom_range(2)];
      ctrl_in[i] = states[$urandom_range(2)];
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      names[i] = '0;
      main_in[i] = LIGHT_D;
      ctrl_in[i] = LIGHT_D;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    #1;
    checks++;
    if (result_valid) failures++;
    for (int k = 0; k < 200; k++) begin
      for (int i = 0; i < N; i++) begin
        logic [17:0] n;
        for (int r = 0; r < 3; r++) begin
          logic [2:0] hm;
          hm = 3'($urandom);
          n[17 - 6 * r -: 6] = {hm, 3'($urandom) & ~hm};
        end
        names[i] = ntr_t'(n);
      end
      randomize_frame();
      frame_en = 1;
      #1;
      for (int i = 0; i < N; i++) expected[i] = ntr_eval(names[i], main_in[i], ctrl_in[i]);
      @(posedge clk);
      #1 frame_en = 0;
      frames++;
      checks++;
      if (!result_valid || conflict_any) begin
        failures++;
        $display("FAIL frame %0d valid=%b conflict=%b", k, result_valid, conflict_any);
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (result[i] != expected[i]) begin
          failures++;
          $display("FAIL frame %0d bit %0d: got %s want %s", k, i,
                   result[i].name(), expected[i].name());
        end
      end
      // no frame: inputs change, result and valid must hold / drop
      randomize_frame();
      @(posedge clk);
      #1;
      checks++;
      if (result_valid) failures++;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (result[i] != expected[i]) failures++;
      end
      holds++;
    end

    // an illegal name on bit 5: row V lights both units for control input D
    names[5] = 18'o000011;
    main_in[5] = LIGHT_V;
    ctrl_in[5] = LIGHT_D;
    frame_en = 1;
    @(posedge clk);
    #1 frame_en = 0;
    checks++;
    if (!conflict_any) begin
      failures++;
      $display("FAIL conflict not reported");
    end

    checks++;
    if (frames != 200 || holds != 200) failures++;
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
