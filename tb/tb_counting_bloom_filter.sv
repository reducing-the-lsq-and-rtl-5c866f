// tb_counting_bloom_filter: self-checking test of the counting Bloom filter,
// both the exact variant (SATURATE=0, 128 x 6 bits) and the saturating one
// (SATURATE=1, 64 x 4 bits). Random increments, decrements (often of the same
// entry in one cycle) and lookups are mirrored in integer arrays indexed by
// the word-address bits; every lookup is compared before the clock edge, so
// it also checks the read-before-update behaviour.
module tb_counting_bloom_filter;
  import lsq_filter_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  logic inc_v = 0, dec_v = 0;
  addr_t lk = '0, ia = '0, da = '0;
  logic [5:0] cnt_e;
  logic [3:0] cnt_s;
  int checks = 0, failures = 0;
  int ref_e [128];
  int ref_s [64];

  counting_bloom_filter #(.ENTRIES(128), .CNT_W(6), .SATURATE(1'b0)) dut_e (
    .clk, .rst_n, .flush, .lookup_addr(lk), .lookup_count(cnt_e),
    .inc_valid(inc_v), .inc_addr(ia), .dec_valid(dec_v), .dec_addr(da));
  counting_bloom_filter #(.ENTRIES(64), .CNT_W(4), .SATURATE(1'b1)) dut_s (
    .clk, .rst_n, .flush, .lookup_addr(lk), .lookup_count(cnt_s),
    .inc_valid(inc_v), .inc_addr(ia), .dec_valid(dec_v), .dec_addr(da));

  always #5 clk = ~clk;

  function automatic addr_t rnd();
    return {28'h0, 20'($urandom_range(0, 1023) * 8)};
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_e[i]) ref_e[i] = 0;
    foreach (ref_s[i]) ref_s[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      int ie, de, is, ds;
      @(negedge clk);
      flush = (cyc % 2000 == 1999);
      ia = rnd();
      da = ($urandom_range(0, 3) == 0) ? ia : rnd();
      lk = ($urandom_range(0, 1) == 0) ? ia : rnd();
      ie = int'(ia[9:3]); de = int'(da[9:3]);
      is = int'(ia[8:3]); ds = int'(da[8:3]);
      inc_v = ($urandom_range(0, 2) != 0) && ref_e[ie] < 63;
      // exact filter must never go below zero: decrement only a counted entry
      dec_v = ($urandom_range(0, 2) != 0) && ref_e[de] > 0;
      #1;
      checks += 2;
      if (int'(cnt_e) != ref_e[int'(lk[9:3])]) begin
        failures++; $display("FAIL exact cyc %0d: %0d exp %0d", cyc, cnt_e, ref_e[int'(lk[9:3])]);
      end
      if (int'(cnt_s) != ref_s[int'(lk[8:3])]) begin
        failures++; $display("FAIL sat cyc %0d: %0d exp %0d", cyc, cnt_s, ref_s[int'(lk[8:3])]);
      end
      @(posedge clk);
      if (flush) begin
        foreach (ref_e[i]) ref_e[i] = 0;
        foreach (ref_s[i]) ref_s[i] = 0;
      end else begin
        if (!(inc_v && dec_v && ie == de)) begin
          if (inc_v) ref_e[ie]++;
          if (dec_v) ref_e[de]--;
        end
        if (!(inc_v && dec_v && is == ds)) begin
          if (inc_v && ref_s[is] < 15) ref_s[is]++;
          if (dec_v && ref_s[ds] > 0)  ref_s[ds]--;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
