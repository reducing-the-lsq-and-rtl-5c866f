// tb_hybrid_sq_filter: self-checking test of the hybrid SQ / LSAP filter
// decision logic. Random loads and stores meet random OFS, PAS, Bloom-filter
// and LSAP values (biased so that every branch of the decision is taken often,
// including age equal to OFS and an empty store queue). The expected accesses
// are worked out in the testbench from the rules written as separate cases,
// with ages compared as plain integers inside a window. For a store, a PAS of
// one is the store itself and counts as no other pending store.
module tb_hybrid_sq_filter;
  import lsq_filter_pkg::*;
  logic valid, is_store, ofs_valid, lsap_dep, bf_access, lsap_access, timing_filtered;
  age_t age, ofs;
  logic [5:0] pas, bf_count;
  sq_action_e sq_action;
  int checks = 0, failures = 0;
  int seen [4];

  hybrid_sq_filter #(.CNT_W(6), .PAS_W(6)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int n = 0; n < 20000; n++) begin
      int base, ofs_off, age_off;
      logic e_bf, e_lsap, e_tf;
      sq_action_e e_act;
      base     = $urandom_range(0, 255);
      ofs_off  = $urandom_range(0, 60);
      age_off  = ($urandom_range(0, 3) == 0) ? ofs_off : $urandom_range(0, 60);
      valid    = ($urandom_range(0, 15) != 0);
      is_store = $urandom_range(0, 1);
      ofs_valid = ($urandom_range(0, 7) != 0);
      ofs      = age_t'(base + ofs_off);
      age      = age_t'(base + age_off);
      pas      = ($urandom_range(0, 2) == 0) ? 6'd0 : ($urandom_range(0, 1) == 0) ? 6'd1 : 6'($urandom_range(2, 32));
      bf_count = ($urandom_range(0, 1) == 0) ? 6'd0 : 6'($urandom_range(1, 32));
      lsap_dep = $urandom_range(0, 1);
      // expected
      e_bf = 0; e_lsap = 0; e_tf = 0; e_act = SQ_SKIP;
      if (valid) begin
        if (!ofs_valid) e_tf = 1;
        else if (is_store && age_off == ofs_off) e_tf = 1;
        else if (!is_store && age_off < ofs_off) e_tf = 1;
        if (!e_tf) begin
          e_bf = 1;
          if (!is_store && pas != 0) e_lsap = 1;
          if (bf_count != 0) e_act = SQ_FULL;
          else if (pas == 0 || (is_store && pas == 1)) e_act = SQ_SKIP;
          else if (is_store) e_act = SQ_UNRESOLVED;
          else if (lsap_dep) e_act = SQ_UNRESOLVED;
          else e_act = SQ_SKIP;
        end
      end
      #1;
      checks++;
      if (bf_access !== e_bf || lsap_access !== e_lsap || timing_filtered !== e_tf || sq_action !== e_act) begin
        failures++;
        if (failures < 10)
          $display("FAIL st=%0b age+%0d ofs+%0d ofsv=%0b pas=%0d bf=%0d lsap=%0b: got %0b%0b%0b %s exp %0b%0b%0b %s",
                   is_store, age_off, ofs_off, ofs_valid, pas, bf_count, lsap_dep,
                   bf_access, lsap_access, timing_filtered, sq_action.name(), e_bf, e_lsap, e_tf, e_act.name());
      end
      seen[e_tf ? 3 : int'(e_act)]++;
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
