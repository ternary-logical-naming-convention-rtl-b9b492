// toc_msd_top: ternary optical processor running three pipelined MSD adders.
//
// The processor's N_BITS reconfigurable ternary bits are shared by N_ADDERS
// TW-MSD adders. Adder k of width WIDTHS[k] occupies the 5*WIDTHS[k]+4 bits
// starting at BASES[k]; bits outside every slice stay dark (input D). The host
// first sends the reconstructed frame: one entry per calculator with its
// standard name and bit range (for the default layout: T, W, T', W', T for each
// adder, fifteen entries in all). It then runs optical frames: in every
// cycle with frame_en high all bits compute at once and the decoder latches
// the results, which feed the next step of each adder in the next frame. Each
// adder accepts one addition per frame and returns its sum three frames later.
//
// Default sizes follow the published experiment: 192 processor bits and three
// adders for 14-, 9- and 12-digit operands placed at bits 1, 75 and 124
// (1-based), 187 bits in use. The entry format, the frame timing and the port
// layout are this design's own. Operand and sum arrays are MAXW and MAXW+2
// digits wide for every adder (MAXW must be at least the widest adder); digits above an adder's width are ignored on
// input and D on output.
module toc_msd_top
  import toc_pkg::*;
#(
  parameter  int N_BITS            = 192,
  parameter  int N_ADDERS          = 3,
  parameter  int WIDTHS [N_ADDERS] = '{14, 9, 12},
  parameter  int BASES  [N_ADDERS] = '{0, 74, 123},
  parameter  int MAXW              = 14,   // widest adder; sizes the operand ports
  localparam int IDX_W             = $clog2(N_BITS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // reconstructed frame
  input  logic             cfg_valid,
  input  ntr_t             cfg_ntr,
  input  logic [IDX_W-1:0] cfg_first,
  input  logic [IDX_W-1:0] cfg_last,
  output logic             cfg_accept,
  output logic             cfg_reject,
  // optical frames and additions
  input  logic             frame_en,
  input  logic             op_valid   [N_ADDERS],
  input  light_t           op_a       [N_ADDERS][MAXW],
  input  light_t           op_b       [N_ADDERS][MAXW],
  output light_t           sum        [N_ADDERS][MAXW+2],
  output logic             sum_valid  [N_ADDERS],
  output logic [2:0]       stage_busy [N_ADDERS],
  output logic             frame_done, // the decoded frame was written last cycle
  output logic             conflict    // that frame held a bit with H and V together
);

  bit_dir_t dir      [N_BITS];
  light_t   main_in  [N_BITS];
  light_t   ctrl_in  [N_BITS];
  light_t   result   [N_BITS];
  light_t   adder_main [N_ADDERS][N_BITS];
  light_t   adder_ctrl [N_ADDERS][N_BITS];

  reconfig_unit #(.N_BITS(N_BITS)) u_reconfig (
    .clk, .rst_n,
    .cfg_valid, .cfg_ntr, .cfg_first, .cfg_last,
    .cfg_accept, .cfg_reject,
    .dir
  );

  optical_processor #(.N_BITS(N_BITS)) u_proc (
    .clk, .rst_n,
    .dir, .main_in, .ctrl_in, .frame_en,
    .result, .result_valid(frame_done), .conflict_any(conflict)
  );

  for (genvar k = 0; k < N_ADDERS; k++) begin : g_adder
    localparam int W     = WIDTHS[k];
    localparam int BASE  = BASES[k];
    localparam int SLICE = 5 * W + 4;

    light_t a_k [W], b_k [W];
    light_t main_s [SLICE], ctrl_s [SLICE], dec_s [SLICE];
    light_t sum_k [W+2];

    for (genvar j = 0; j < W; j++) begin : g_op
      assign a_k[j] = op_a[k][j];
      assign b_k[j] = op_b[k][j];
    end
    for (genvar j = 0; j < SLICE; j++) begin : g_dec
      assign dec_s[j] = result[BASE + j];
    end
    for (genvar i = 0; i < N_BITS; i++) begin : g_place
      if (i >= BASE && i < BASE + SLICE) begin : g_in
        assign adder_main[k][i] = main_s[i - BASE];
        assign adder_ctrl[k][i] = ctrl_s[i - BASE];
      end else begin : g_out
        assign adder_main[k][i] = LIGHT_D;
        assign adder_ctrl[k][i] = LIGHT_D;
      end
    end
    for (genvar j = 0; j < MAXW + 2; j++) begin : g_sum
      if (j < W + 2) begin : g_in
        assign sum[k][j] = sum_k[j];
      end else begin : g_out
        assign sum[k][j] = LIGHT_D;
      end
    end

    msd_adder_pipe #(.WIDTH(W)) u_adder (
      .clk, .rst_n, .frame_en,
      .in_valid  (op_valid[k]),
      .op_a      (a_k),
      .op_b      (b_k),
      .main_out  (main_s),
      .ctrl_out  (ctrl_s),
      .dec_in    (dec_s),
      .sum       (sum_k),
      .sum_valid (sum_valid[k]),
      .stage_busy(stage_busy[k])
    );
  end

  // Merge the adders' slices into the processor's data frames.
  always_comb begin
    for (int i = 0; i < N_BITS; i++) begin
      main_in[i] = LIGHT_D;
      ctrl_in[i] = LIGHT_D;
      for (int k = 0; k < N_ADDERS; k++) begin
        if (i >= BASES[k] && i < BASES[k] + 5 * WIDTHS[k] + 4) begin
          main_in[i] = adder_main[k][i];
          ctrl_in[i] = adder_ctrl[k][i];
        end
      end
    end
  end

  // Every adder must fit MAXW, lie inside the processor and not overlap another.
  initial begin
    for (int k = 0; k < N_ADDERS; k++) begin
      assert (WIDTHS[k] >= 1 && WIDTHS[k] <= MAXW)
        else $error("adder %0d is wider than MAXW", k);
      assert (BASES[k] >= 0 && BASES[k] + 5 * WIDTHS[k] + 4 <= N_BITS)
        else $error("adder %0d does not fit in the processor", k);
      for (int m = k + 1; m < N_ADDERS; m++)
        assert (BASES[m] >= BASES[k] + 5 * WIDTHS[k] + 4 ||
                BASES[k] >= BASES[m] + 5 * WIDTHS[m] + 4)
          else $error("adders %0d and %0d overlap", k, m);
    end
  end

endmodule
