// tb_fwd_pred_sizes: the DL1 filter at the four forwarding-predictor sizes
// evaluated for the method: a 64-entry address Bloom filter with a bimodal
// table of 256, 512, 1024 or 2048 entries.
//
// Four copies of the top see the same instruction stream. The stream is issued
// in order and has 1024 load PCs. A fixed pseudo-random third of them are
// "reloads": a store to a spill word is emitted a few instructions earlier, so
// the load is forwarded. The others load words that are never stored. Load PCs
// are consecutive, so a 256-entry table aliases four PCs per entry, a
// 512-entry table two, and 1024 or more entries none.
// For every copy and every load the testbench checks:
//   - a predicted-independent load requests the DL1 in its issue cycle;
//   - a predicted-dependent load does not;
//   - a predicted-dependent load without forwarding requests it exactly one
//     cycle later.
// It prints the fraction of loads whose DL1 read was avoided and the fraction
// that paid the one-cycle delay. Each copy must avoid some reads. The largest
// table must not mispredict more often than the smallest.
module tb_fwd_pred_sizes;
  import lsq_filter_pkg::*;

  localparam int NCFG = 4;
  localparam int NCYC = 40000;
  localparam int BIM [NCFG] = '{256, 512, 1024, 2048};

  typedef struct { bit st; addr_t addr; addr_t pc; data_t data; int seq; int sqidx; bit issued; } ins_t;

  logic clk = 0, rst_n = 0;
  logic disp_st_valid = 0, iss_valid = 0, iss_is_store = 0, cmt_valid = 0, cmt_is_store = 0;
  age_t disp_st_age = '0, iss_age = '0;
  addr_t iss_addr = '0, iss_pc = '0, cmt_addr = '0;
  data_t iss_data = '0;
  logic [4:0] iss_sq_idx = '0;

  logic [4:0] disp_sq_idx [NCFG];
  logic       pred_dep    [NCFG];
  logic       dl1_req     [NCFG];
  logic       dl1_late    [NCFG];
  logic       fwd         [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    lsq_dl1_filter_top #(.FWD_BIM_ENTRIES(BIM[g])) dut (
      .clk, .rst_n, .flush(1'b0),
      .disp_st_valid, .disp_st_age, .disp_sq_idx(disp_sq_idx[g]), .sq_full(),
      .iss_valid, .iss_is_store, .iss_age, .iss_addr, .iss_pc, .iss_data, .iss_sq_idx,
      .cmt_valid, .cmt_is_store, .cmt_addr,
      .lsap_train_valid(1'b0), .lsap_train_pc('0), .clq_fwd_hit(1'b0), .clq_fwd_data('0),
      .lq_search(), .sq_action(), .sq_bf_access(), .lsap_access(), .lsap_dep(), .timing_filtered(),
      .st_match_hit(), .unres_hit(), .unres_age(), .csq_fwd_hit(), .ld_fwd_hit(fwd[g]), .ld_fwd_data(),
      .ofs_valid(), .ofs(), .pas(),
      .pred_dep(pred_dep[g]), .dl1_req(dl1_req[g]), .dl1_addr(), .dl1_late_req(dl1_late[g]), .dl1_late_addr(),
      .ev_dl1_avoided(), .ev_dl1_late(), .ev_dl1_wasted());
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_loads = 0;
  int avoided [NCFG], late [NCFG], wasted [NCFG];
  bit exp_late [NCFG];
  ins_t win [$];
  ins_t pending [$];   // reloads waiting to be emitted
  int   delay   [$];
  int nseq = 0;

  function automatic bit is_reload(int k);
    int unsigned h;
    h = (k * 32'd2654435761) >> 11;
    return (h % 3) == 0;
  endfunction

  function automatic addr_t pc_of(int k);
    return addr_t'(48'h40_0000 + k);
  endfunction

  initial begin
    repeat (NCYC + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < NCFG; g++) begin avoided[g] = 0; late[g] = 0; wasted[g] = 0; exp_late[g] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      int pick, dsq;
      ins_t ni;
      @(negedge clk);
      disp_st_valid = 0; iss_valid = 0; cmt_valid = 0;
      // expected late requests from the previous cycle
      for (int g = 0; g < NCFG; g++) begin
        checks++;
        if (dl1_late[g] !== exp_late[g]) begin
          failures++; $display("FAIL cfg %0d cyc %0d: late request %0b expected %0b", g, cyc, dl1_late[g], exp_late[g]);
        end
      end
      // dispatch: a due reload, or a new instruction
      dsq = int'(disp_sq_idx[0]);
      if (win.size() < 48) begin
        int n_st;
        n_st = 0;
        foreach (win[i]) n_st += int'(win[i].st);
        foreach (delay[i]) delay[i]--;
        if (delay.size() > 0 && delay[0] <= 0) begin
          ni = pending.pop_front(); void'(delay.pop_front());
        end else begin
          int k;
          k = $urandom_range(0, 1023);
          ni.pc = pc_of(k); ni.data = '0; ni.issued = 0;
          if (is_reload(k) && n_st < 30) begin
            ins_t rl;
            ni.st   = 1;
            ni.addr = addr_t'(48'h7000_0000 + (k % 64) * 8);
            ni.pc   = addr_t'(48'h50_0000 + k);
            ni.data = data_t'({$urandom, $urandom});
            rl.st = 0; rl.addr = ni.addr; rl.pc = pc_of(k); rl.data = '0; rl.issued = 0;
            pending.push_back(rl); delay.push_back($urandom_range(2, 6));
          end else begin
            ni.st   = 0;
            ni.addr = addr_t'(48'h6000_0000 + k * 8 * 64 + $urandom_range(0, 63) * 8);
          end
        end
        ni.seq = nseq; ni.sqidx = dsq; nseq++;
        if (ni.st) begin disp_st_valid = 1; disp_st_age = age_t'(ni.seq); end
        win.push_back(ni);
      end
      // in-order issue of the oldest unissued instruction from an earlier cycle
      pick = -1;
      for (int i = 0; i < win.size() - 1 && pick < 0; i++) if (!win[i].issued) pick = i;
      if (pick >= 0) begin
        iss_valid = 1; iss_is_store = win[pick].st; iss_age = age_t'(win[pick].seq);
        iss_addr = win[pick].addr; iss_pc = win[pick].pc; iss_data = win[pick].data;
        iss_sq_idx = 5'(win[pick].sqidx);
      end
      if (win.size() > 0 && win[0].issued && $urandom_range(0, 3) != 0) begin
        cmt_valid = 1; cmt_is_store = win[0].st; cmt_addr = win[0].addr;
      end
      #1;
      if (iss_valid && !iss_is_store) begin
        n_loads++;
        for (int g = 0; g < NCFG; g++) begin
          checks++;
          if (dl1_req[g] !== !pred_dep[g]) begin
            failures++; $display("FAIL cfg %0d cyc %0d: early request %0b with prediction %0b", g, cyc, dl1_req[g], pred_dep[g]);
          end
          if (pred_dep[g] && fwd[g])   avoided[g]++;
          if (pred_dep[g] && !fwd[g])  late[g]++;
          if (!pred_dep[g] && fwd[g])  wasted[g]++;
        end
      end
      for (int g = 0; g < NCFG; g++) exp_late[g] = iss_valid && !iss_is_store && pred_dep[g] && !fwd[g];
      @(posedge clk);
      if (pick >= 0) win[pick].issued = 1;
      if (cmt_valid) void'(win.pop_front());
    end
    $display("loads %0d", n_loads);
    for (int g = 0; g < NCFG; g++) begin
      $display("  BF=64 + bimodal=%0d: DL1 reads avoided %0d (%0d.%0d%%), delayed %0d (%0d.%0d%%), wasted %0d",
               BIM[g], avoided[g], avoided[g] * 100 / n_loads, (avoided[g] * 1000 / n_loads) % 10,
               late[g], late[g] * 100 / n_loads, (late[g] * 1000 / n_loads) % 10, wasted[g]);
      checks++;
      if (avoided[g] == 0) begin failures++; $display("FAIL cfg %0d avoided no DL1 read", g); end
    end
    checks++;
    if (late[NCFG-1] + wasted[NCFG-1] > late[0] + wasted[0]) begin
      failures++; $display("FAIL largest table mispredicts more than the smallest");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
