// tb_lsq_dl1_filter_top: end-to-end test of the LSQ and DL1 filtering design
// at its default sizes.
//
// The testbench plays an out-of-order core: it dispatches a program-order
// stream of loads and stores (ages are consecutive), issues one in-flight
// instruction per cycle (usually the oldest, often a random younger one, so
// stores stay unresolved while later loads issue), commits in order and
// flushes now and then. In quiet phases few instructions are dispatched and
// issue is in order, so the queues drain and every store becomes resolved. Addresses come from a few "spill" words that are both
// stored and loaded and from words that are only loaded; the load PC is a
// function of the address, so the PC-indexed predictor can learn.
// Its own list of in-flight instructions gives, for every issue:
//   - the youngest older resolved store to the same word (forwarding) and the
//     youngest older unresolved store; a filtered search must never hide a
//     forwarding, a made search must return exactly these;
//   - whether any younger load to the same word has issued; a filtered
//     load-queue search must never hide one;
//   - the most recently committed store to the same word still held in a free
//     SQ entry (it is held until a new store is dispatched into its entry),
//     which forwards when no in-flight store does;
//   - OFS (oldest in-flight store) and PAS (unresolved stores);
//   - DL1 requests: immediate for predicted-independent loads, one cycle later
//     for predicted-dependent loads that found no forwarding.
// Load-ordering violations it finds are reported to the alias predictor.
// Every filtering outcome and DL1 event must occur at least once.
module tb_lsq_dl1_filter_top;
  import lsq_filter_pkg::*;

  typedef struct {
    int    seq;
    bit    st;
    addr_t addr;
    addr_t pc;
    data_t data;
    bit    issued;
    int    sqidx;
  } instr_t;

  localparam int NCYC   = 30000;
  localparam int WINDOW = 64;

  logic clk = 0, rst_n = 0, flush = 0;
  logic disp_st_valid = 0, iss_valid = 0, iss_is_store = 0, cmt_valid = 0, cmt_is_store = 0;
  age_t disp_st_age = '0, iss_age = '0;
  addr_t iss_addr = '0, iss_pc = '0, cmt_addr = '0, lsap_train_pc = '0;
  data_t iss_data = '0, clq_fwd_data = '0;
  logic [4:0] disp_sq_idx, iss_sq_idx = '0;
  logic lsap_train_valid = 0, clq_fwd_hit = 0;
  logic sq_full, lq_search, sq_bf_access, lsap_access, lsap_dep, timing_filtered;
  logic st_match_hit, unres_hit, ld_fwd_hit, csq_fwd_hit, ofs_valid, pred_dep;
  logic dl1_req, dl1_late_req, ev_dl1_avoided, ev_dl1_late, ev_dl1_wasted;
  sq_action_e sq_action;
  age_t unres_age, ofs;
  data_t ld_fwd_data;
  addr_t dl1_addr, dl1_late_addr;
  logic [5:0] pas;

  lsq_dl1_filter_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  instr_t win [$];
  instr_t csq [$];   // committed stores still held in the SQ
  int nseq = 0;
  bit exp_late = 0;
  addr_t exp_late_addr = '0;

  // mechanism counters
  typedef enum int {
    M_LD_TIMING, M_ST_TIMING, M_LD_SKIP_PAS0, M_LD_SKIP_LSAP, M_LD_UNRES, M_LD_FULL,
    M_ST_SKIP_PAS0, M_ST_UNRES, M_ST_FULL, M_LSAP_READ, M_LSAP_DEP, M_LSAP_TRAIN,
    M_LQ_SKIP, M_LQ_SEARCH, M_FWD_SQ, M_FWD_CSQ, M_FWD_CLQ, M_ST_ST_MATCH,
    M_DL1_AVOIDED, M_DL1_LATE, M_DL1_WASTED, M_DL1_PARALLEL, M_FLUSH, M_SQ_FULL, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mname [M_NUM] = '{"load filtered by OFS", "store filtered by OFS", "load skip (BF=0,PAS=0)",
    "load skip (BF=0,LSAP no)", "load unresolved scan", "load full search", "store skip (BF=0,PAS=0)",
    "store unresolved scan", "store full search", "LSAP read", "LSAP predicts alias", "LSAP trained",
    "LQ search filtered", "LQ search made", "forwarding from SQ", "forwarding from committed store",
    "forwarding from cached LQ",
    "store-store match", "DL1 access avoided", "DL1 access late", "DL1 access wasted",
    "DL1 access in parallel", "flush", "SQ full"};

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL t=%0t: %s", $time, msg);
  endtask

  function automatic addr_t word_addr(int w);
    return addr_t'(48'h7fff_0000 + w * 8);
  endfunction

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mech[i]) mech[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      int n_st, n_unres, pick, dsq, oldest_st;
      int bm, bu, e_ua;
      bit e_m, e_u, e_old_st, viol, quiet, e_c, cs;
      data_t e_d, e_cd;
      addr_t viol_pc;
      instr_t cur;
      @(negedge clk);
      disp_st_valid = 0; iss_valid = 0; cmt_valid = 0; flush = 0; clq_fwd_hit = 0;
      lsap_train_valid = 0;

      // reference occupancy before this cycle
      n_st = 0; n_unres = 0; oldest_st = -1;
      foreach (win[i]) if (win[i].st) begin
        n_st++;
        if (!win[i].issued) n_unres++;
        if (oldest_st < 0) oldest_st = win[i].seq;
      end
      checks++;
      if (int'(pas) != n_unres) fail($sformatf("PAS %0d expected %0d", pas, n_unres));
      checks++;
      if (ofs_valid !== (n_st > 0) || (n_st > 0 && ofs !== age_t'(oldest_st)))
        fail($sformatf("OFS %0b/%0d expected %0b/%0d", ofs_valid, ofs, n_st > 0, oldest_st));
      checks++;
      if (sq_full !== (n_st == 32)) fail("SQ full flag");
      if (n_st == 32) mech[M_SQ_FULL]++;
      checks++;
      if (dl1_late_req !== exp_late || (exp_late && dl1_late_addr !== exp_late_addr))
        fail($sformatf("late DL1 request %0b expected %0b", dl1_late_req, exp_late));

      if (cyc % 997 == 996) begin
        flush = 1;
        mech[M_FLUSH]++;
      end else begin
        // ---- dispatch ----
        dsq = int'(disp_sq_idx);
        quiet = (cyc % 500) >= 420;
        if (win.size() < WINDOW && (!quiet || $urandom_range(0, 3) == 0)) begin
          instr_t ni;
          int w;
          ni.seq = nseq;
          ni.st  = ($urandom_range(0, 99) < 45);
          if (ni.st && n_st == 32) ni.st = 0;
          // words 0..5 are spill slots (stored and loaded); 6..29 are only loaded
          w = ni.st ? $urandom_range(0, 5) :
              (($urandom_range(0, 1) == 0) ? $urandom_range(0, 5) : $urandom_range(6, 29));
          if (ni.st && $urandom_range(0, quiet ? 1 : 19) == 0) w = $urandom_range(6, 29);
          ni.addr   = word_addr(w);
          ni.pc     = addr_t'(48'h40_0000 + w * 4 + (ni.st ? 'h800 : 0));
          ni.data   = data_t'({$urandom, $urandom});
          ni.issued = 0;
          ni.sqidx  = dsq;
          if (ni.st) begin
            disp_st_valid = 1;
            disp_st_age   = age_t'(ni.seq);
          end
          win.push_back(ni);
          nseq++;
        end
        // ---- issue (only instructions dispatched in earlier cycles) ----
        pick = -1;
        if ($urandom_range(0, 9) != 0) begin
          int lim;
          lim = win.size() - 1;
          if (!quiet && $urandom_range(0, 2) == 0) begin
            int k;
            k = $urandom_range(0, lim > 0 ? lim - 1 : 0);
            for (int i = k; i < lim && pick < 0; i++) if (!win[i].issued) pick = i;
          end
          for (int i = 0; i < lim && pick < 0; i++) if (!win[i].issued) pick = i;
        end
        if (pick >= 0) begin
          cur = win[pick];
          iss_valid    = 1;
          iss_is_store = cur.st;
          iss_age      = age_t'(cur.seq);
          iss_addr     = cur.addr;
          iss_pc       = cur.pc;
          iss_data     = cur.data;
          iss_sq_idx   = 5'(cur.sqidx);
          if (!cur.st && $urandom_range(0, 24) == 0) begin
            clq_fwd_hit  = 1;
            clq_fwd_data = data_t'({$urandom, $urandom});
          end
        end
        // ---- commit (oldest, issued in an earlier cycle) ----
        if (win.size() > 0 && win[0].issued && $urandom_range(0, 9) < 7) begin
          cmt_valid    = 1;
          cmt_is_store = win[0].st;
          cmt_addr     = win[0].addr;
        end
      end

      #1;
      // ---- checks for the issuing instruction ----
      if (iss_valid) begin
        e_m = 0; e_u = 0; e_d = '0; e_ua = 0; bm = -1; bu = -1; e_old_st = 0;
        viol = 0; viol_pc = '0;
        foreach (win[i]) begin
          if (win[i].seq < cur.seq && win[i].st) begin
            e_old_st = 1;
            if (!win[i].issued && win[i].seq > bu) begin e_u = 1; e_ua = win[i].seq; bu = win[i].seq; end
            if (win[i].issued && win[i].addr == cur.addr && win[i].seq > bm) begin
              e_m = 1; e_d = win[i].data; bm = win[i].seq;
            end
          end
          if (cur.st && win[i].seq > cur.seq && !win[i].st && win[i].issued && win[i].addr == cur.addr) begin
            viol = 1; viol_pc = win[i].pc;
          end
        end
        checks++;
        if (timing_filtered && e_old_st) fail("OFS stage filtered an instruction with an older store in flight");
        if (timing_filtered) mech[cur.st ? M_ST_TIMING : M_LD_TIMING]++;
        checks++;
        if (sq_action != SQ_FULL && e_m) fail($sformatf("%s search filtered but an older store to the same word exists",
                                                       cur.st ? "store" : "load"));
        e_c = 0; e_cd = '0;
        cs = !cur.st;
        if (cs) foreach (csq[i]) if (csq[i].addr == cur.addr) begin e_c = 1; e_cd = csq[i].data; end
        if (sq_action != SQ_FULL) e_m = 0;
        checks++;
        if (cur.st ? (st_match_hit !== e_m) : (ld_fwd_hit !== (e_m || e_c || clq_fwd_hit)))
          fail($sformatf("forwarding hit %0b expected %0b/%0b", cur.st ? st_match_hit : ld_fwd_hit, e_m, e_c));
        if (!cur.st) begin
          checks++;
          if (e_m && ld_fwd_data !== e_d) fail("forwarded data (in-flight store)");
          if (!e_m && e_c && ld_fwd_data !== e_cd) fail("forwarded data (committed store)");
          if (!e_m && !e_c && clq_fwd_hit && ld_fwd_data !== clq_fwd_data) fail("forwarded data (cached LQ)");
          if (csq_fwd_hit !== (!e_m && e_c)) fail("committed-store forwarding flag");
        end
        if (sq_action != SQ_SKIP) begin
          checks++;
          if (unres_hit !== e_u || (e_u && unres_age !== age_t'(e_ua)))
            fail($sformatf("unresolved scan %0b/%0d expected %0b/%0d", unres_hit, unres_age, e_u, e_ua));
        end
        checks++;
        if (lsap_access !== (!cur.st && !timing_filtered && n_unres > 0)) fail("LSAP read enable");
        if (cur.st) begin
          checks++;
          if (viol && !lq_search) fail("LQ search filtered but a younger load to the same word has issued");
          if (lq_search) mech[M_LQ_SEARCH]++; else mech[M_LQ_SKIP]++;
          if (viol) begin
            lsap_train_valid = 1;
            lsap_train_pc    = viol_pc;
            mech[M_LSAP_TRAIN]++;
          end
          if (st_match_hit) mech[M_ST_ST_MATCH]++;
        end
        // outcome classes
        if (!timing_filtered) begin
          case (sq_action)
            SQ_FULL:       mech[cur.st ? M_ST_FULL : M_LD_FULL]++;
            SQ_UNRESOLVED: mech[cur.st ? M_ST_UNRES : M_LD_UNRES]++;
            default:       if (n_unres == 0 || (cur.st && n_unres == 1)) mech[cur.st ? M_ST_SKIP_PAS0 : M_LD_SKIP_PAS0]++;
                           else if (!cur.st) mech[M_LD_SKIP_LSAP]++;
          endcase
        end
        if (lsap_access) mech[M_LSAP_READ]++;
        if (lsap_access && lsap_dep) mech[M_LSAP_DEP]++;
        if (!cur.st) begin
          checks++;
          if (dl1_req !== !pred_dep || (dl1_req && dl1_addr !== cur.addr)) fail("early DL1 request");
          if (e_m) mech[M_FWD_SQ]++;
          if (!e_m && e_c) mech[M_FWD_CSQ]++;
          if (clq_fwd_hit && !e_m && !e_c) mech[M_FWD_CLQ]++;
          if (pred_dep && ld_fwd_hit)   mech[M_DL1_AVOIDED]++;
          if (pred_dep && !ld_fwd_hit)  mech[M_DL1_LATE]++;
          if (!pred_dep && ld_fwd_hit)  mech[M_DL1_WASTED]++;
          if (!pred_dep && !ld_fwd_hit) mech[M_DL1_PARALLEL]++;
        end
      end else begin
        checks++;
        if (dl1_req || lq_search || sq_action != SQ_SKIP) fail("activity without an issue");
      end

      @(posedge clk);
      // ---- reference update ----
      exp_late      = !flush && iss_valid && !iss_is_store && pred_dep && !ld_fwd_hit;
      exp_late_addr = iss_addr;
      if (flush) win.delete();
      else begin
        if (pick >= 0) win[pick].issued = 1;
        if (cmt_valid) begin
          if (win[0].st) csq.push_back(win[0]);
          void'(win.pop_front());
        end
        if (disp_st_valid)
          for (int i = csq.size() - 1; i >= 0; i--) if (csq[i].sqidx == dsq) csq.delete(i);
      end
    end

    foreach (mech[i]) begin
      checks++;
      $display("  %-28s %0d", mname[i], mech[i]);
      if (mech[i] == 0) fail($sformatf("mechanism never exercised: %s", mname[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
