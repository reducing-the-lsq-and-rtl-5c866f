// tb_store_queue: self-checking test of the store queue and its searches.
// Stores are dispatched with increasing ages (gaps leave room for loads),
// issued out of order with random addresses from a small set, and committed in
// order once resolved. Each cycle a random full or unresolved-only search is
// made with an age inside the in-flight window; the testbench finds the
// youngest older matching resolved store and the youngest older unresolved
// store in its own list and compares hit, data and age. It also checks the
// head / next-entry outputs and full / empty. Committed stores are kept in a
// second list, each with its ring index, until a new store is dispatched into
// that index; a cached search must return the most recently committed of them
// to the searched word.
module tb_store_queue;
  import lsq_filter_pkg::*;
  typedef struct { int seq; logic res; addr_t addr; data_t data; int idx; } ent_t;

  logic clk = 0, rst_n = 0, flush = 0;
  logic disp_valid = 0, st_issue_valid = 0, commit_valid = 0;
  age_t disp_age = '0, srch_age = '0;
  logic [4:0] disp_idx, st_issue_idx = '0;
  logic full, empty, match_hit, unres_hit, head_valid, next_valid;
  addr_t st_issue_addr = '0, srch_addr = '0, head_addr;
  data_t st_issue_data = '0, match_data;
  age_t match_age, unres_age, head_age, next_age;
  sq_action_e srch_action = SQ_SKIP;
  logic srch_cached = 0, cached_hit;
  data_t cached_data;
  ent_t cq [$];
  int n_cached = 0;
  int checks = 0, failures = 0, n_match = 0, n_unres = 0;
  ent_t q [$];
  int nseq;

  store_queue #(.DEPTH(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nseq = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      int pick, lo, hi, sseq, bm, bu, didx;
      logic e_m, e_u;
      data_t e_d; int e_ma, e_ua;
      @(negedge clk);
      flush = (cyc % 1500 == 1499);
      disp_valid = ($urandom_range(0, 2) != 0) && q.size() < 32;
      disp_age   = age_t'(nseq);
      didx = int'(disp_idx);
      if (disp_valid && q.size() > 0 && didx != (q[$].idx + 1) % 32) begin
        failures++; $display("FAIL dispatch index");
      end
      // issue a random unresolved store
      st_issue_valid = 0;
      pick = -1;
      foreach (q[i]) if (!q[i].res && $urandom_range(0, 2) == 0) pick = i;
      if (pick >= 0) begin
        st_issue_valid = 1;
        st_issue_idx   = 5'(q[pick].idx);
        st_issue_addr  = addr_t'(64'h2000 + 64'($urandom_range(0, 7)) * 8);
        st_issue_data  = data_t'({$urandom, $urandom});
      end
      commit_valid = (q.size() > 0) && q[0].res && ($urandom_range(0, 2) == 0);
      // search
      lo = (q.size() > 0) ? q[0].seq - 3 : nseq - 3;
      hi = nseq + 2;
      sseq = lo + int'($urandom_range(0, hi - lo));
      srch_age    = age_t'(sseq);
      srch_addr   = addr_t'(64'h2000 + 64'($urandom_range(0, 7)) * 8 + 64'($urandom_range(0, 7)));
      srch_action = ($urandom_range(0, 1) == 0) ? SQ_FULL : SQ_UNRESOLVED;
      e_m = 0; e_u = 0; e_d = '0; e_ma = 0; e_ua = 0; bm = -1000; bu = -1000;
      foreach (q[i]) if (q[i].seq < sseq) begin
        if (!q[i].res && q[i].seq > bu) begin e_u = 1; e_ua = q[i].seq; bu = q[i].seq; end
        if (srch_action == SQ_FULL && q[i].res && q[i].addr[47:3] == srch_addr[47:3] && q[i].seq > bm) begin
          e_m = 1; e_d = q[i].data; e_ma = q[i].seq; bm = q[i].seq;
        end
      end
      srch_cached = $urandom_range(0, 1);
      begin
        logic e_c; data_t e_cd;
        e_c = 0; e_cd = '0;
        if (srch_cached) foreach (cq[i]) if (cq[i].addr[47:3] == srch_addr[47:3]) begin
          e_c = 1; e_cd = cq[i].data;
        end
        #1;
        checks++;
        if (cached_hit !== e_c || (e_c && cached_data !== e_cd)) begin
          failures++; $display("FAIL cyc %0d cached hit=%0b exp=%0b", cyc, cached_hit, e_c);
        end
        n_cached += int'(e_c);
      end
      checks += 3;
      if (match_hit !== e_m || (e_m && (match_data !== e_d || match_age !== age_t'(e_ma)))) begin
        failures++; $display("FAIL cyc %0d match hit=%0b exp=%0b age=%0d exp=%0d", cyc, match_hit, e_m, match_age, age_t'(e_ma));
      end
      if (unres_hit !== e_u || (e_u && unres_age !== age_t'(e_ua))) begin
        failures++; $display("FAIL cyc %0d unresolved hit=%0b exp=%0b sseq=%0d act=%s n=%0d q0=%0d res=%0b", cyc, unres_hit, e_u, sseq, srch_action.name(), q.size(), q[0].seq, q[0].res);
      end
      if (empty !== (q.size() == 0) || full !== (q.size() == 32) ||
          (q.size() > 0 && (head_age !== age_t'(q[0].seq) || !head_valid)) ||
          next_valid !== (q.size() > 1) || (q.size() > 1 && next_age !== age_t'(q[1].seq)) ||
          (q.size() > 0 && q[0].res && head_addr !== q[0].addr)) begin
        failures++; $display("FAIL cyc %0d head/next/occupancy", cyc);
      end
      n_match += int'(e_m); n_unres += int'(e_u);
      @(posedge clk);
      if (flush) q.delete();
      else begin
        if (pick >= 0) begin q[pick].res = 1; q[pick].addr = st_issue_addr; q[pick].data = st_issue_data; end
        if (commit_valid) cq.push_back(q.pop_front());
        if (disp_valid) begin
          ent_t e;
          for (int i = cq.size() - 1; i >= 0; i--) if (cq[i].idx == didx) cq.delete(i);
          e.seq = nseq; e.res = 0; e.addr = '0; e.data = '0; e.idx = didx;
          q.push_back(e);
        end
      end
      if (disp_valid && !flush) nseq += $urandom_range(1, 3);
    end
    checks++;
    if (n_match == 0 || n_unres == 0 || n_cached == 0) failures++;
    $display("matches %0d unresolved %0d cached %0d", n_match, n_unres, n_cached);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
