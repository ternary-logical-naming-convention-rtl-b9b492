// tb_msd_adder_pipe: the TW-MSD adder routing with a model of its processor slice.
//
// The testbench stands in for the optical processor: each bit of the 14-digit
// adder's 74-bit slice applies the printed truth table of the transform the
// slice layout assigns to it (T, W, T', W', T), and its output is latched on
// every frame. Random MSD operands are fed in a stream with bubbles and with
// idle cycles between frames. Every sum must have the value a + b, must appear
// three frames after its operands, and the three steps must all be busy in the
// same frame at least once (pipelining).
module tb_msd_adder_pipe;
  import toc_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 14;
  localparam int S = 5 * W + 4;

  int checks = 0;
  int failures = 0;

  logic   clk = 0;
  logic   rst_n = 0;
  logic   frame_en = 0;
  logic   in_valid = 0;
  light_t op_a [W], op_b [W];
  light_t main_out [S], ctrl_out [S], dec_in [S];
  light_t sum [W+2];
  logic   sum_valid;
  logic [2:0] stage_busy;

  msd_adder_pipe #(.WIDTH(W)) dut (
    .clk, .rst_n, .frame_en, .in_valid, .op_a, .op_b,
    .main_out, .ctrl_out, .dec_in, .sum, .sum_valid, .stage_busy
  );

  always #5 clk = ~clk;

  function automatic tf_t slice_fn(int j);
    if (j < W)         return TF_T;
    if (j < 2 * W)     return TF_W;
    if (j < 3 * W + 1) return TF_TP;
    if (j < 4 * W + 2) return TF_WP;
    return TF_T;
  endfunction

  // processor slice model: latch the transform outputs on every frame
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < S; j++) dec_in[j] <= LIGHT_D;
    end else if (frame_en) begin
      for (int j = 0; j < S; j++)
        dec_in[j] <= digit_to_light(table_eval(slice_fn(j),
                       light_to_digit(main_out[j]), light_to_digit(ctrl_out[j])));
    end
  end

  int exp_val [$];
  int exp_frame [$];
  int frame_no = 0;
  int results = 0, overlaps = 0, bubbles = 0;

  function automatic int value_of(light_t d [W+2]);
    int v = 0;
    for (int i = W + 1; i >= 0; i--) v = 2 * v + light_to_digit(d[i]);
    return v;
  endfunction

  // output checker, half a cycle after the edge that produced sum_valid
  always @(negedge clk) begin
    if (rst_n && sum_valid) begin
      results++;
      checks += 2;
      if (exp_val.size() == 0) begin
        failures += 2;
        $display("FAIL unexpected sum");
      end else begin
        int v, f;
        v = exp_val.pop_front();
        f = exp_frame.pop_front();
        if (value_of(sum) != v) begin
          failures++;
          $display("FAIL sum %0d, want %0d", value_of(sum), v);
        end
        // sum_valid is seen in the cycle after frame f + 2 ran
        if (frame_no - f != 3) begin
          failures++;
          $display("FAIL latency %0d frames", frame_no - f);
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      op_a[i] = LIGHT_D;
      op_b[i] = LIGHT_D;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      int va, vb;
      in_valid = ($urandom_range(3) != 0);
      va = 0;
      vb = 0;
      for (int i = W - 1; i >= 0; i--) begin
        int da, db;
        da = $urandom_range(2) - 1;
        db = $urandom_range(2) - 1;
        op_a[i] = digit_to_light(da);
        op_b[i] = digit_to_light(db);
        va = 2 * va + da;
        vb = 2 * vb + db;
      end
      if (in_valid) begin
        exp_val.push_back(va + vb);
        exp_frame.push_back(frame_no);
      end else bubbles++;
      frame_en = 1;
      #1;
      if (stage_busy == 3'b111) overlaps++;
      @(posedge clk);
      frame_no++;
      #1 frame_en = 0;
      in_valid = 0;
      if ($urandom_range(1) == 1) @(posedge clk);   // idle cycle between frames
      #1;
    end
    // drain
    repeat (3) begin
      frame_en = 1;
      @(posedge clk);
      frame_no++;
      #1 frame_en = 0;
    end
    @(posedge clk);
    checks += 3;
    if (exp_val.size() != 0) begin
      failures++;
      $display("FAIL %0d sums missing", exp_val.size());
    end
    if (overlaps == 0) begin
      failures++;
      $display("FAIL the three steps never overlapped");
    end
    if (bubbles == 0) failures++;
    $display("results=%0d overlaps=%0d bubbles=%0d", results, overlaps, bubbles);
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
