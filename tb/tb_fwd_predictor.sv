// tb_fwd_predictor: self-checking test of the combined forwarding predictor.
// Loads and stores issue and commit on a small address set; reference models
// of the saturating address Bloom filter (64 x 4 bits, word-address bits
// [8:3]) and of the bimodal table (256 x 2 bits, PC bits [7:0]) give the
// expected prediction, which must be the AND of the two. Each combination of
// the two votes must be seen.
module tb_fwd_predictor;
  import lsq_filter_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  logic issue_valid = 0, commit_valid = 0, upd_valid = 0, upd_forwarded = 0;
  addr_t issue_addr = '0, issue_pc = '0, commit_addr = '0, upd_pc = '0;
  logic pred_dep, bf_dep, bim_dep;
  int checks = 0, failures = 0;
  int bf [64];
  int bim [256];
  int combo [4];
  addr_t inflight [$];

  fwd_predictor #(.BF_ENTRIES(64), .BF_CNT_W(4), .BIM_ENTRIES(256)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (bf[i]) bf[i] = 0;
    foreach (bim[i]) bim[i] = 1;
    foreach (combo[i]) combo[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      logic e_bf, e_bim;
      int ii, di, ui;
      @(negedge clk);
      flush        = (cyc % 1000 == 999);
      issue_valid  = ($urandom_range(0, 3) != 0) && inflight.size() < 40;
      issue_addr   = addr_t'(64'h8000 + 64'($urandom_range(0, 150)) * 8);
      issue_pc     = addr_t'(48'h1000 + issue_addr[9:3]);
      commit_valid = ($urandom_range(0, 2) == 0) && inflight.size() > 0;
      commit_addr  = commit_valid ? inflight[0] : '0;
      upd_valid    = issue_valid;
      upd_pc       = issue_pc;
      upd_forwarded = $urandom_range(0, 2) != 0;
      ii = int'(issue_addr[8:3]); di = int'(commit_addr[8:3]); ui = int'(upd_pc[7:0]);
      e_bf  = bf[ii] > 0;
      e_bim = bim[int'(issue_pc[7:0])] >= 2;
      #1;
      checks++;
      if (bf_dep !== e_bf || bim_dep !== e_bim || pred_dep !== (e_bf && e_bim)) begin
        failures++;
        $display("FAIL cyc %0d bf %0b/%0b bim %0b/%0b pred %0b", cyc, bf_dep, e_bf, bim_dep, e_bim, pred_dep);
      end
      if (issue_valid) combo[{e_bf, e_bim}]++;
      @(posedge clk);
      if (flush) begin
        foreach (bf[i]) bf[i] = 0;
        inflight.delete();
      end else begin
        if (!(issue_valid && commit_valid && ii == di)) begin
          if (issue_valid && bf[ii] < 15) bf[ii]++;
          if (commit_valid && bf[di] > 0) bf[di]--;
        end
        if (commit_valid) void'(inflight.pop_front());
        if (issue_valid) inflight.push_back(issue_addr);
      end
      if (upd_valid) begin
        if (upd_forwarded && bim[ui] < 3) bim[ui]++;
        if (!upd_forwarded && bim[ui] > 0) bim[ui]--;
      end
    end
    foreach (combo[i]) begin
      checks++;
      if (combo[i] == 0) begin failures++; $display("FAIL combination %0d never seen", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
