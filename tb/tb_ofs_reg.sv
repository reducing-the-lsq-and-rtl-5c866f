// tb_ofs_reg: self-checking test of the OFS register.
// The testbench keeps its own queue of in-flight store ages, dispatches and
// commits stores at random (including into an empty queue and with both in one
// cycle), supplies the "next entry" information the store queue would give,
// and checks after every edge that OFS equals the oldest queued age and that
// the valid bit is low exactly when the queue is empty.
module tb_ofs_reg;
  import lsq_filter_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  logic sq_empty, st_dispatch = 0, st_commit = 0, next_valid, ofs_valid;
  age_t st_dispatch_age = '0, next_age, ofs;
  int checks = 0, failures = 0;
  age_t q [$];
  age_t nxt;

  ofs_reg dut (.*);
  always #5 clk = ~clk;


  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nxt = 8'd200;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      flush       = (cyc % 500 == 499);
      st_dispatch = ($urandom_range(0, 2) == 0) && q.size() < 32;
      st_commit   = ($urandom_range(0, 2) == 0) && q.size() > 0;
      st_dispatch_age = nxt;
      sq_empty   = (q.size() == 0);
      next_valid = (q.size() > 1);
      next_age   = (q.size() > 1) ? q[1] : '0;
      @(posedge clk);
      if (flush) q.delete();
      else begin
        if (st_commit) void'(q.pop_front());
        if (st_dispatch) q.push_back(st_dispatch_age);
      end
      if (st_dispatch) nxt = nxt + age_t'($urandom_range(1, 3));
      #1;
      checks++;
      if (ofs_valid !== (q.size() > 0) || (q.size() > 0 && ofs !== q[0])) begin
        failures++;
        $display("FAIL cyc %0d: ofs_valid=%0b ofs=%0d expected valid=%0b age=%0d",
                 cyc, ofs_valid, ofs, q.size() > 0, q.size() > 0 ? q[0] : 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
