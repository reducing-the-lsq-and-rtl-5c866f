// fwd_predictor: combined forwarding predictor for DL1 access filtering.
//
// Two predictors vote, and a load is "predicted-dependent" (expected to get its
// data by forwarding, so the DL1 access is omitted) only if both agree:
//   - a counting Bloom filter on addresses: every load and store increments its
//     entry at issue and decrements it at commit; a load reads the entry before
//     its own increment and predicts dependence when it is non-zero;
//   - a PC-indexed bimodal table trained with each load's actual outcome.
//
// Interface and timing: issue_* is the memory instruction issuing this cycle
// (pred_dep is combinational and meaningful for loads); commit_* decrements;
// upd_* trains the bimodal table; flush clears the Bloom filter since the
// discarded instructions will never commit. Defaults (64 Bloom-filter entries,
// 256 bimodal entries) are the document's evaluated configuration. The 4-bit
// saturating counters are this design's choice, sized so that the two tables
// stay under 100 bytes (64x4 + 256x2 bits = 96 bytes).
module fwd_predictor
  import lsq_filter_pkg::*;
#(
  parameter int unsigned BF_ENTRIES  = 64,
  parameter int unsigned BF_CNT_W    = 4,
  parameter int unsigned BIM_ENTRIES = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  input  logic  issue_valid,
  input  addr_t issue_addr,
  input  addr_t issue_pc,
  output logic  pred_dep,
  output logic  bf_dep,
  output logic  bim_dep,
  input  logic  commit_valid,
  input  addr_t commit_addr,
  input  logic  upd_valid,
  input  addr_t upd_pc,
  input  logic  upd_forwarded
);
  logic [BF_CNT_W-1:0] cnt;

  counting_bloom_filter #(
    .ENTRIES (BF_ENTRIES),
    .CNT_W   (BF_CNT_W),
    .SATURATE(1'b1)
  ) u_bf (
    .clk, .rst_n, .flush,
    .lookup_addr (issue_addr),
    .lookup_count(cnt),
    .inc_valid   (issue_valid),
    .inc_addr    (issue_addr),
    .dec_valid   (commit_valid),
    .dec_addr    (commit_addr)
  );

  bimodal_fwd_pred #(.ENTRIES(BIM_ENTRIES)) u_bim (
    .clk, .rst_n,
    .lookup_pc    (issue_pc),
    .pred_dep     (bim_dep),
    .upd_valid, .upd_pc, .upd_forwarded
  );

  assign bf_dep   = (cnt != '0);
  assign pred_dep = bf_dep && bim_dep;
endmodule
