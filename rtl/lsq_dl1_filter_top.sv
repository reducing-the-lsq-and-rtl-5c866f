// lsq_dl1_filter_top: load/store queue and L1 data cache access filtering for
// an out-of-order core.
//
// Two independent mechanisms share the memory-instruction stream:
//  * LSQ filtering. Issuing stores consult the Multi-YLA registers to decide
//    whether the load queue must be searched for premature loads. Issuing loads
//    and stores pass the hybrid SQ filter: the OFS register (oldest in-flight
//    store) first, then the counting Bloom filter of resolved stores together
//    with the PAS count of unresolved stores and, for loads, the load-store
//    alias predictor (LSAP). The outcome selects no SQ search, a cheap scan
//    for the closest unresolved store, or the full associative search, and
//    gates the Bloom-filter and LSAP reads.
//  * DL1 filtering. A combined forwarding predictor (address Bloom filter AND
//    PC-indexed bimodal table) marks each load predicted-dependent or not.
//    Predicted-dependent loads skip the DL1 read; if neither the store queue
//    (in-flight stores, or committed stores still held in its free entries)
//    nor the cached load queue forwards their data, the read is issued one
//    cycle later. Every load searches the committed stores, whatever the
//    prediction, so the predictor also learns about that source.
//
// Interface (one memory instruction per port per cycle):
//   disp_st_* : a store is dispatched (allocated in the SQ in program order);
//               disp_sq_idx returns its SQ entry.
//   iss_*     : a load or store issues with its age, address, PC, store data
//               and, for stores, its SQ entry. All filter decisions, SQ search
//               results, the forwarding prediction and the early DL1 request
//               are combinational outputs for this instruction.
//   cmt_*     : the oldest instruction commits; for a load cmt_addr is its
//               address, a store's address comes from the SQ head.
//   lsap_train_*: a load PC that violated memory ordering (from the load queue,
//               outside this block).
//   clq_fwd_* : forwarding found by the cached load queue (outside this block).
//   flush     : every in-flight instruction is discarded.
// The load queue, the cached load queue and the DL1 itself are outside; their
// request and result signals are ports. All state changes on the rising clock
// edge; reset is synchronous and active low.
module lsq_dl1_filter_top
  import lsq_filter_pkg::*;
#(
  parameter int unsigned SQ_DEPTH        = 32,
  parameter int unsigned YLA_GROUPS      = 16,
  parameter int unsigned SQ_BF_ENTRIES   = 128,
  parameter int unsigned LSAP_ENTRIES    = 16,
  parameter int unsigned FWD_BF_ENTRIES  = 64,
  parameter int unsigned FWD_BIM_ENTRIES = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  // store dispatch
  input  logic       disp_st_valid,
  input  age_t       disp_st_age,
  output logic [$clog2(SQ_DEPTH)-1:0] disp_sq_idx,
  output logic       sq_full,
  // issue
  input  logic       iss_valid,
  input  logic       iss_is_store,
  input  age_t       iss_age,
  input  addr_t      iss_addr,
  input  addr_t      iss_pc,
  input  data_t      iss_data,
  input  logic [$clog2(SQ_DEPTH)-1:0] iss_sq_idx,
  // commit
  input  logic       cmt_valid,
  input  logic       cmt_is_store,
  input  addr_t      cmt_addr,
  // outside structures
  input  logic       lsap_train_valid,
  input  addr_t      lsap_train_pc,
  input  logic       clq_fwd_hit,
  input  data_t      clq_fwd_data,
  // LSQ filtering results
  output logic       lq_search,
  output sq_action_e sq_action,
  output logic       sq_bf_access,
  output logic       lsap_access,
  output logic       lsap_dep,
  output logic       timing_filtered,
  output logic       st_match_hit,
  output logic       unres_hit,
  output age_t       unres_age,
  output logic       csq_fwd_hit,
  output logic       ld_fwd_hit,
  output data_t      ld_fwd_data,
  output logic       ofs_valid,
  output age_t       ofs,
  output logic [$clog2(SQ_DEPTH+1)-1:0] pas,
  // DL1 filtering results
  output logic       pred_dep,
  output logic       dl1_req,
  output addr_t      dl1_addr,
  output logic       dl1_late_req,
  output addr_t      dl1_late_addr,
  output logic       ev_dl1_avoided,
  output logic       ev_dl1_late,
  output logic       ev_dl1_wasted
);
  localparam int unsigned PAS_W  = $clog2(SQ_DEPTH+1);
  localparam int unsigned SQ_CNT = $clog2(SQ_DEPTH+1);

  logic iss_ld, iss_st, cmt_st;
  assign iss_ld = iss_valid && !iss_is_store;
  assign iss_st = iss_valid &&  iss_is_store;
  assign cmt_st = cmt_valid &&  cmt_is_store;

  // ---------------- store queue ----------------
  logic  sq_empty, head_valid, next_valid, match_hit, pas_zero, cached_hit;
  data_t cached_data;
  age_t  head_age, next_age, match_age;
  addr_t head_addr;
  data_t match_data;

  store_queue #(.DEPTH(SQ_DEPTH)) u_sq (
    .clk, .rst_n, .flush,
    .disp_valid    (disp_st_valid),
    .disp_age      (disp_st_age),
    .disp_idx      (disp_sq_idx),
    .full          (sq_full),
    .empty         (sq_empty),
    .st_issue_valid(iss_st),
    .st_issue_idx  (iss_sq_idx),
    .st_issue_addr (iss_addr),
    .st_issue_data (iss_data),
    .srch_action   (sq_action),
    .srch_age      (iss_age),
    .srch_addr     (iss_addr),
    .match_hit, .match_data, .match_age,
    .unres_hit, .unres_age,
    .srch_cached   (iss_ld),
    .cached_hit, .cached_data,
    .commit_valid  (cmt_st),
    .head_valid, .head_age, .head_addr,
    .next_valid, .next_age
  );

  // ---------------- LQ filtering ----------------
  multi_yla #(.NGROUPS(YLA_GROUPS)) u_yla (
    .clk, .rst_n, .flush,
    .ld_issue_valid(iss_ld), .ld_issue_age(iss_age), .ld_issue_addr(iss_addr),
    .st_issue_valid(iss_st), .st_issue_age(iss_age), .st_issue_addr(iss_addr),
    .lq_search
  );

  // ---------------- SQ / LSAP filtering ----------------
  ofs_reg u_ofs (
    .clk, .rst_n, .flush,
    .sq_empty,
    .st_dispatch    (disp_st_valid),
    .st_dispatch_age(disp_st_age),
    .st_commit      (cmt_st),
    .next_valid, .next_age,
    .ofs_valid, .ofs
  );

  pas_counter #(.SQ_DEPTH(SQ_DEPTH)) u_pas (
    .clk, .rst_n, .flush,
    .st_dispatch(disp_st_valid),
    .st_resolve (iss_st),
    .pas, .pas_zero
  );

  logic [SQ_CNT-1:0] sq_bf_count;
  counting_bloom_filter #(
    .ENTRIES (SQ_BF_ENTRIES),
    .CNT_W   (SQ_CNT),
    .SATURATE(1'b0)
  ) u_sq_bf (
    .clk, .rst_n, .flush,
    .lookup_addr (iss_addr),
    .lookup_count(sq_bf_count),
    .inc_valid   (iss_st),
    .inc_addr    (iss_addr),
    .dec_valid   (cmt_st),
    .dec_addr    (head_addr)
  );

  lsap #(.ENTRIES(LSAP_ENTRIES)) u_lsap (
    .clk, .rst_n,
    .lookup_en  (lsap_access),
    .lookup_pc  (iss_pc),
    .dep        (lsap_dep),
    .train_valid(lsap_train_valid),
    .train_pc   (lsap_train_pc)
  );

  hybrid_sq_filter #(.CNT_W(SQ_CNT), .PAS_W(PAS_W)) u_filt (
    .valid      (iss_valid),
    .is_store   (iss_is_store),
    .age        (iss_age),
    .ofs_valid, .ofs, .pas,
    .bf_count   (sq_bf_count),
    .lsap_dep,
    .bf_access  (sq_bf_access),
    .lsap_access,
    .sq_action,
    .timing_filtered
  );

  assign st_match_hit = iss_st && match_hit;
  // priority: in-flight store, committed (cached) store, cached load queue
  assign csq_fwd_hit  = iss_ld && !match_hit && cached_hit;
  assign ld_fwd_hit   = iss_ld && (match_hit || cached_hit || clq_fwd_hit);
  assign ld_fwd_data  = match_hit  ? match_data  :
                        cached_hit ? cached_data : clq_fwd_data;

  // ---------------- DL1 filtering ----------------
  fwd_predictor #(
    .BF_ENTRIES (FWD_BF_ENTRIES),
    .BIM_ENTRIES(FWD_BIM_ENTRIES)
  ) u_fp (
    .clk, .rst_n, .flush,
    .issue_valid  (iss_valid),
    .issue_addr   (iss_addr),
    .issue_pc     (iss_pc),
    .pred_dep,
    .bf_dep       (),
    .bim_dep      (),
    .commit_valid (cmt_valid),
    .commit_addr  (cmt_is_store ? head_addr : cmt_addr),
    .upd_valid    (iss_ld),
    .upd_pc       (iss_pc),
    .upd_forwarded(ld_fwd_hit)
  );

  dl1_access_ctrl u_dl1 (
    .clk, .rst_n, .flush,
    .ld_valid     (iss_ld),
    .ld_addr      (iss_addr),
    .pred_dep,
    .fwd_hit      (ld_fwd_hit),
    .dl1_req, .dl1_addr, .dl1_late_req, .dl1_late_addr,
    .ev_avoided   (ev_dl1_avoided),
    .ev_late      (ev_dl1_late),
    .ev_wasted    (ev_dl1_wasted)
  );

  logic unused;
  assign unused = ^{head_valid, head_age, match_age, pas_zero};
endmodule
