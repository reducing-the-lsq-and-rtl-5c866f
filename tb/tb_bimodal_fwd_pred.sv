// tb_bimodal_fwd_pred: self-checking test of the bimodal forwarding
// predictor. An integer array of 2-bit saturating counters (reset to 1) is the
// reference; random updates and lookups on PCs that share and differ in their
// index bits are compared every cycle.
module tb_bimodal_fwd_pred;
  import lsq_filter_pkg::*;
  logic clk = 0, rst_n = 0, upd_valid = 0, upd_forwarded = 0, pred_dep;
  addr_t lookup_pc = '0, upd_pc = '0;
  int checks = 0, failures = 0, ndep = 0;
  int ctr [256];

  bimodal_fwd_pred #(.ENTRIES(256)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ctr[i]) ctr[i] = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int k;
      @(negedge clk);
      lookup_pc = addr_t'($urandom_range(0, 1023) * 256 + $urandom_range(0, 31));
      upd_valid = $urandom_range(0, 1);
      upd_pc    = ($urandom_range(0, 1) == 0) ? lookup_pc : addr_t'($urandom_range(0, 31) + 4096);
      // entries with an odd index mostly forward, even ones mostly do not
      upd_forwarded = (upd_pc[0] == 1'b1) ? ($urandom_range(0, 5) != 0) : ($urandom_range(0, 5) == 0);
      #1;
      checks++;
      if (pred_dep !== (ctr[int'(lookup_pc[7:0])] >= 2)) begin
        failures++;
        $display("FAIL cyc %0d idx %0d pred=%0b ctr=%0d", cyc, lookup_pc[7:0], pred_dep, ctr[int'(lookup_pc[7:0])]);
      end
      if (pred_dep) ndep++;
      @(posedge clk);
      k = int'(upd_pc[7:0]);
      if (upd_valid) begin
        if (upd_forwarded && ctr[k] < 3) ctr[k]++;
        if (!upd_forwarded && ctr[k] > 0) ctr[k]--;
      end
    end
    checks++;
    if (ndep == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
