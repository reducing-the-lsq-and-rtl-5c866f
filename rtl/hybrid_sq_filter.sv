// hybrid_sq_filter: decides, for each issuing load or store, which of the
// Bloom filter, the load-store alias predictor (LSAP) and the store queue it
// must access, and what kind of store-queue search it needs.
//
// Two stages. First the timing stage: the issuing instruction's age is held
// against the OFS register (age of the oldest in-flight store). A load older
// than every in-flight store, or a store that is itself the oldest one, cannot
// need any older store, so Bloom filter, LSAP and store queue are all skipped.
// Otherwise the address stage uses the Bloom filter count of in-flight
// resolved stores mapping to the instruction's address group and the PAS count
// of stores whose address is still unknown:
//   load : BF>0                      -> full associative SQ search
//          BF=0, PAS=0               -> no SQ search
//          BF=0, PAS>0, LSAP no dep  -> no SQ search
//          BF=0, PAS>0, LSAP dep     -> scan for closest older unresolved store
//          LSAP is only read when PAS>0.
//   store: BF>0                      -> full associative SQ search
//          BF=0, PAS=0               -> no SQ search
//          BF=0, PAS>0               -> scan for closest older unresolved store
// An issuing store is itself still counted in PAS (its address becomes known
// in this very cycle), so for stores "PAS is zero" is taken to mean that no
// store other than the issuing one is unresolved, i.e. PAS <= 1. This reading
// is this design's; without it the store rule could never apply.
//
// The block is purely combinational. bf_access / lsap_access are the enables
// for those structures; the caller must feed back bf_count and lsap_dep from
// them in the same cycle. The decision table is the document's; only the
// encoding of the outputs is this design's.
module hybrid_sq_filter
  import lsq_filter_pkg::*;
#(
  parameter int unsigned CNT_W = 6,
  parameter int unsigned PAS_W = 6
) (
  input  logic             valid,
  input  logic             is_store,
  input  age_t             age,
  input  logic             ofs_valid,
  input  age_t             ofs,
  input  logic [PAS_W-1:0] pas,
  input  logic [CNT_W-1:0] bf_count,
  input  logic             lsap_dep,
  output logic             bf_access,
  output logic             lsap_access,
  output sq_action_e       sq_action,
  output logic             timing_filtered   // first stage removed the search
);
  logic first_stage_hit;
  logic others_pending;   // an unresolved store other than the issuing one

  assign others_pending = is_store ? (pas > PAS_W'(1)) : (pas != '0);

  always_comb begin
    if (is_store) first_stage_hit = !ofs_valid || (age == ofs);
    else          first_stage_hit = !ofs_valid || age_older(age, ofs);

    bf_access       = valid && !first_stage_hit;
    lsap_access     = valid && !is_store && !first_stage_hit && others_pending;
    timing_filtered = valid && first_stage_hit;

    if (!valid || first_stage_hit)       sq_action = SQ_SKIP;
    else if (bf_count != '0)             sq_action = SQ_FULL;
    else if (!others_pending)            sq_action = SQ_SKIP;
    else if (is_store || lsap_dep)       sq_action = SQ_UNRESOLVED;
    else                                 sq_action = SQ_SKIP;
  end
endmodule
