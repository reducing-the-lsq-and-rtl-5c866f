// tb_multi_yla: self-checking test of the Multi-YLA load-queue filter.
// Random loads and stores issue with ages inside a 100-instruction window and
// addresses drawn from a few words; the expected lq_search is recomputed from
// the list of loads issued since the last flush (search iff a load of the same
// address group, younger than the store, has issued). Flushes happen
// periodically, which also keeps all ages inside the window.
module tb_multi_yla;
  import lsq_filter_pkg::*;
  localparam int NG = 16;
  logic clk = 0, rst_n = 0, flush = 0;
  logic ld_v = 0, st_v = 0, lq_search;
  age_t ld_age = '0, st_age = '0;
  addr_t ld_addr = '0, st_addr = '0;
  int checks = 0, failures = 0;
  int nsearch = 0, nskip = 0;

  multi_yla #(.NGROUPS(NG)) dut (.clk, .rst_n, .flush,
    .ld_issue_valid(ld_v), .ld_issue_age(ld_age), .ld_issue_addr(ld_addr),
    .st_issue_valid(st_v), .st_issue_age(st_age), .st_issue_addr(st_addr),
    .lq_search);

  always #5 clk = ~clk;

  int  n_ld;
  int  ld_ages [$];
  int  ld_grp  [$];
  int  base;

  function automatic addr_t rnd_addr();
    return addr_t'((64'h1000 + 64'($urandom_range(0, 40)) * 8));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    base = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      flush = 0; ld_v = 0; st_v = 0;
      if (cyc % 50 == 49) begin
        flush = 1;
        ld_ages.delete(); ld_grp.delete();
        base = (base + 37) % 256;
      end else if ($urandom_range(0, 1) == 0) begin
        ld_v = 1; ld_age = age_t'(base + $urandom_range(0, 100)); ld_addr = rnd_addr();
      end else begin
        logic exp;
        st_v = 1; st_age = age_t'(base + $urandom_range(0, 100)); st_addr = rnd_addr();
        exp = 0;
        foreach (ld_ages[i])
          if (ld_grp[i] == int'(st_addr[3 +: 4]) &&
              ((ld_ages[i] - base + 256) % 256) > ((int'(st_age) - base + 256) % 256))
            exp = 1;
        #1;
        checks++;
        if (lq_search !== exp) begin
          failures++;
          $display("FAIL cyc %0d: store age %0d grp %0d lq_search=%0b exp=%0b", cyc, st_age, st_addr[6:3], lq_search, exp);
        end
        if (exp) nsearch++; else nskip++;
      end
      if (ld_v) begin
        ld_ages.push_back(int'(ld_age));
        ld_grp.push_back(int'(ld_addr[3 +: 4]));
      end
    end
    checks++;
    if (nsearch == 0 || nskip == 0) failures++;
    $display("searches %0d filtered %0d", nsearch, nskip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
