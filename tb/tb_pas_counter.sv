// tb_pas_counter: self-checking test of the pending-address-store counter.
// Random store dispatches and address resolutions (never more resolutions than
// pending stores) are mirrored by an integer count; pas and pas_zero are
// compared with it after every edge, with occasional flushes.
module tb_pas_counter;
  logic clk = 0, rst_n = 0, flush = 0, st_dispatch = 0, st_resolve = 0, pas_zero;
  logic [5:0] pas;
  int checks = 0, failures = 0, ref_cnt = 0;

  pas_counter #(.SQ_DEPTH(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      flush       = (cyc % 700 == 699);
      st_dispatch = ($urandom_range(0, 1) == 0) && ref_cnt < 32;
      st_resolve  = ($urandom_range(0, 1) == 0) && (ref_cnt > 0);
      @(posedge clk);
      if (flush) ref_cnt = 0;
      else ref_cnt = ref_cnt + int'(st_dispatch) - int'(st_resolve);
      #1;
      checks++;
      if (int'(pas) != ref_cnt || pas_zero !== (ref_cnt == 0)) begin
        failures++;
        $display("FAIL cyc %0d: pas=%0d expected %0d", cyc, pas, ref_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
