// reconfig_unit: reconstructs logic calculators from a reconstructed frame.
//
// The host sends the reconstructed frame as a sequence of entries, one per
// calculator: a standard name (NTR) and the first and last processor bit it
// occupies (0-based, inclusive). For an accepted entry, every bit in the range
// gets the directives of that name in the next cycle. An entry is rejected,
// and nothing is written, when the name breaks the row constraints of the
// naming convention or the range is empty or outside the processor.
// cfg_accept / cfg_reject pulse for one cycle after the entry.
//
// After reset every bit holds the all-dark operation (name [00 00 00]),
// so an unconfigured bit always outputs D.
//
// Following the published design: configuration by standard name per range of
// processor bits (the allocation table of the experiment). This design's
// choices: the entry format, one entry per cycle, the reject rule and the
// reset state. The value-feature name is fixed to D(0,-1,1) by the adders and
// is not part of an entry.
module reconfig_unit
  import toc_pkg::*;
#(
  parameter int N_BITS = 192,
  localparam int IDX_W = $clog2(N_BITS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_valid,    // an entry is presented this cycle
  input  ntr_t             cfg_ntr,      // standard name of the calculator
  input  logic [IDX_W-1:0] cfg_first,    // first processor bit
  input  logic [IDX_W-1:0] cfg_last,     // last processor bit
  output logic             cfg_accept,   // previous entry was written
  output logic             cfg_reject,   // previous entry was refused
  output bit_dir_t         dir [N_BITS]  // directives of every processor bit
);

  bit_dir_t new_dir;
  logic     name_legal;
  logic     range_ok;
  logic     take;

  ntr_translator u_translate (
    .ntr(cfg_ntr), .dir(new_dir), .legal(name_legal)
  );

  always_comb begin
    range_ok = (cfg_first <= cfg_last) && (int'(cfg_last) < N_BITS);
    take     = cfg_valid && name_legal && range_ok;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_BITS; i++) dir[i] <= '0;
      cfg_accept <= 1'b0;
      cfg_reject <= 1'b0;
    end else begin
      cfg_accept <= take;
      cfg_reject <= cfg_valid && !take;
      if (take) begin
        for (int i = 0; i < N_BITS; i++) begin
          if (i >= int'(cfg_first) && i <= int'(cfg_last)) dir[i] <= new_dir;
        end
      end
    end
  end

  // Every entry gets exactly one answer, and only entries get answers.
  a_one_answer: assert property (@(posedge clk) disable iff (!rst_n)
    !(cfg_accept && cfg_reject));
  a_answer_follows_entry: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_valid |=> (cfg_accept || cfg_reject));

endmodule
