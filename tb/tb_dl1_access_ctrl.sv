// tb_dl1_access_ctrl: self-checking test of the DL1 access controller.
// Random loads with random predictions and forwarding outcomes. Checks that a
// predicted-independent load requests the DL1 in its issue cycle, that a
// predicted-dependent load does not, and that one that was not forwarded is
// requested on the late port exactly one cycle later with its address (the
// one-cycle penalty), and that a flush cancels a pending late request.
module tb_dl1_access_ctrl;
  import lsq_filter_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, ld_valid = 0, pred_dep = 0, fwd_hit = 0;
  addr_t ld_addr = '0, dl1_addr, dl1_late_addr;
  logic dl1_req, dl1_late_req, ev_avoided, ev_late, ev_wasted;
  int checks = 0, failures = 0;
  int n_av = 0, n_late = 0, n_w = 0;
  logic  exp_late;
  addr_t exp_late_addr;

  dl1_access_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_late = 0; exp_late_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      flush    = ($urandom_range(0, 99) == 0);
      ld_valid = $urandom_range(0, 3) != 0;
      ld_addr  = addr_t'({$urandom, $urandom});
      pred_dep = $urandom_range(0, 1);
      fwd_hit  = $urandom_range(0, 1);
      #1;
      checks += 3;
      if (dl1_req !== (ld_valid && !pred_dep) || (dl1_req && dl1_addr !== ld_addr)) begin
        failures++; $display("FAIL cyc %0d early request", cyc);
      end
      if (dl1_late_req !== exp_late || (exp_late && dl1_late_addr !== exp_late_addr)) begin
        failures++; $display("FAIL cyc %0d late request %0b exp %0b", cyc, dl1_late_req, exp_late);
      end
      if (ev_avoided !== (ld_valid && pred_dep && fwd_hit) || ev_wasted !== (ld_valid && !pred_dep && fwd_hit)
          || ev_late !== (ld_valid && pred_dep && !fwd_hit)) begin
        failures++; $display("FAIL cyc %0d events", cyc);
      end
      n_av += int'(ev_avoided); n_late += int'(ev_late); n_w += int'(ev_wasted);
      @(posedge clk);
      exp_late      = !flush && ld_valid && pred_dep && !fwd_hit;
      exp_late_addr = ld_addr;
    end
    $display("avoided %0d late %0d wasted %0d", n_av, n_late, n_w);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
