// tb_lsap: self-checking test of the load-store alias predictor.
// PCs drawn from a set of 40 are trained at random; the testbench keeps the
// last 16 distinct trained PCs in FIFO order as its reference, and checks the
// prediction for random lookups with the read enable both on and off.
module tb_lsap;
  import lsq_filter_pkg::*;
  logic clk = 0, rst_n = 0, lookup_en = 0, train_valid = 0, dep;
  addr_t lookup_pc = '0, train_pc = '0;
  int checks = 0, failures = 0, nhit = 0;
  addr_t fifo [$];

  lsap #(.ENTRIES(16)) dut (.*);
  always #5 clk = ~clk;

  function automatic addr_t pc_of(int k);
    return addr_t'(48'h40_0000 + k * 7);
  endfunction

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
      logic exp, present;
      @(negedge clk);
      lookup_en   = ($urandom_range(0, 3) != 0);
      lookup_pc   = pc_of($urandom_range(0, 39));
      train_valid = ($urandom_range(0, 3) == 0);
      train_pc    = pc_of($urandom_range(0, 39));
      exp = 0;
      foreach (fifo[i]) if (fifo[i] == lookup_pc) exp = lookup_en;
      #1;
      checks++;
      if (dep !== exp) begin
        failures++;
        $display("FAIL cyc %0d pc %h dep=%0b exp=%0b", cyc, lookup_pc, dep, exp);
      end
      if (exp) nhit++;
      @(posedge clk);
      if (train_valid) begin
        present = 0;
        foreach (fifo[i]) if (fifo[i] == train_pc) present = 1;
        if (!present) begin
          fifo.push_back(train_pc);
          if (fifo.size() > 16) void'(fifo.pop_front());
        end
      end
    end
    checks++;
    if (nhit == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
