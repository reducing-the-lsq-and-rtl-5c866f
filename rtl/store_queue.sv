// store_queue: in-flight stores in program order, with the three kinds of
// search the filters choose between.
//
// A circular buffer of DEPTH entries. A store takes the tail entry at dispatch
// (age known, address not), fills in address and data when it issues
// ("resolved"), and leaves from the head when it commits. Searches are made by
// an issuing load or store against the entries older than it:
//   SQ_FULL       : associative address search; returns the youngest older
//                   resolved store with the same 8-byte word address (data for
//                   store-to-load forwarding, or the store-store match), and
//                   also the youngest older unresolved store;
//   SQ_UNRESOLVED : scan for the youngest older store whose address is still
//                   unknown; no addresses are compared;
//   SQ_SKIP       : nothing is read.
// The head and the entry after it are exported so that the OFS register can
// be updated at commit, and the head address for the Bloom filter decrement.
//
// Cached stores: a committed store is not erased. Its entry keeps address and
// data, marked "cached", until a new store is allocated into it. The free part
// of the ring therefore holds the most recently committed stores, oldest at the
// tail and youngest just behind the head. With srch_cached set, a load also
// looks there: cached_hit / cached_data give the youngest cached store to the
// same word (the one closest behind the head). A load is forwarded from a
// cached store only when no in-flight store matches; the caller gives
// match_hit priority. A flush discards the in-flight entries (the tail moves
// back to the head) and keeps the cached ones.
//
// Interface and timing: searches are combinational on the state before this
// cycle's updates; dispatch, issue and commit update on the rising clock edge.
// One dispatch, one store issue, one commit and one search per cycle.
// Reset (synchronous, active low) and flush empty the queue.
// The depth (32) is the document's; the rest is a conventional store queue of
// this design's own making, as the document builds on an existing one. Keeping
// committed stores in free entries follows the cached load/store queue idea
// the DL1 filter is paired with; how entries are reused and searched is this
// design's choice.
module store_queue
  import lsq_filter_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  // dispatch
  input  logic       disp_valid,
  input  age_t       disp_age,
  output logic [$clog2(DEPTH)-1:0] disp_idx,
  output logic       full,
  output logic       empty,
  // store issue (address and data become known)
  input  logic       st_issue_valid,
  input  logic [$clog2(DEPTH)-1:0] st_issue_idx,
  input  addr_t      st_issue_addr,
  input  data_t      st_issue_data,
  // search by an issuing instruction
  input  sq_action_e srch_action,
  input  age_t       srch_age,
  input  addr_t      srch_addr,
  output logic       match_hit,
  output data_t      match_data,
  output age_t       match_age,
  output logic       unres_hit,
  output age_t       unres_age,
  input  logic       srch_cached,
  output logic       cached_hit,
  output data_t      cached_data,
  // commit
  input  logic       commit_valid,
  output logic       head_valid,
  output age_t       head_age,
  output addr_t      head_addr,
  output logic       next_valid,
  output age_t       next_age
);
  localparam int unsigned IW = $clog2(DEPTH);

  typedef struct packed {
    logic  valid;
    logic  cached;
    logic  resolved;
    age_t  age;
    addr_t addr;
    data_t data;
  } sq_entry_t;

  sq_entry_t     q [DEPTH];
  logic [IW-1:0] head, tail;
  logic [IW:0]   count;

  assign full     = (count == DEPTH[IW:0]);
  assign empty    = (count == '0);
  assign disp_idx = tail;

  assign head_valid = q[head].valid;
  assign head_age   = q[head].age;
  assign head_addr  = q[head].addr;
  assign next_valid = q[IW'(head + 1'b1)].valid && (count > 1);
  assign next_age   = q[IW'(head + 1'b1)].age;

  // Youngest older entry = smallest age distance to the searcher.
  always_comb begin
    age_t best_m, best_u, d;
    match_hit  = 1'b0;
    match_data = '0;
    match_age  = '0;
    unres_hit  = 1'b0;
    unres_age  = '0;
    best_m     = '1;
    best_u     = '1;
    d          = '0;
    if (srch_action != SQ_SKIP) begin
      for (int i = 0; i < DEPTH; i++) begin
        d = srch_age - q[i].age;
        if (q[i].valid && age_older(q[i].age, srch_age)) begin
          if (!q[i].resolved && d <= best_u) begin
            unres_hit = 1'b1;
            unres_age = q[i].age;
            best_u    = d;
          end
          if (srch_action == SQ_FULL && q[i].resolved &&
              q[i].addr[ADDR_W-1:3] == srch_addr[ADDR_W-1:3] && d <= best_m) begin
            match_hit  = 1'b1;
            match_data = q[i].data;
            match_age  = q[i].age;
            best_m     = d;
          end
        end
      end
    end
  end

  // Youngest cached store = smallest distance behind the head.
  always_comb begin
    logic [IW-1:0] best_c, dc;
    cached_hit  = 1'b0;
    cached_data = '0;
    best_c      = '1;
    dc          = '0;
    if (srch_cached) begin
      for (int i = 0; i < DEPTH; i++) begin
        dc = head - IW'(i + 1);
        if (q[i].cached && q[i].addr[ADDR_W-1:3] == srch_addr[ADDR_W-1:3] &&
            (!cached_hit || dc < best_c)) begin
          cached_hit  = 1'b1;
          cached_data = q[i].data;
          best_c      = dc;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else if (flush) begin
      tail  <= head;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) q[i].valid <= 1'b0;
    end else begin
      if (disp_valid) begin
        q[tail] <= '{valid: 1'b1, cached: 1'b0, resolved: 1'b0, age: disp_age, addr: '0, data: '0};
        tail    <= tail + 1'b1;
      end
      if (st_issue_valid) begin
        q[st_issue_idx].resolved <= 1'b1;
        q[st_issue_idx].addr     <= st_issue_addr;
        q[st_issue_idx].data     <= st_issue_data;
      end
      if (commit_valid) begin
        q[head].valid  <= 1'b0;
        q[head].cached <= 1'b1;
        head           <= head + 1'b1;
      end
      count <= count + (IW+1)'(disp_valid) - (IW+1)'(commit_valid);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n || flush)
                                   disp_valid |-> (!full || commit_valid));
  a_commit_ready: assert property (@(posedge clk) disable iff (!rst_n || flush)
                                   commit_valid |-> (head_valid && q[head].resolved));
endmodule
