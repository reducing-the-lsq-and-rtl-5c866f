// dl1_access_ctrl: launches or withholds the L1 data cache access of each load.
//
// A predicted-independent load reads the DL1 in the cycle it issues, in
// parallel with the store-queue / cached-load-queue search (if forwarding is
// found after all, that DL1 read was wasted). A predicted-dependent load reads
// only the queues; if they do not forward its data, the DL1 access is launched
// one cycle later on a second request port. If they do, the DL1 access has
// been avoided.
//
// Interface and timing: ld_* and fwd_hit are sampled in the same cycle;
// dl1_req/dl1_addr are combinational, dl1_late_req/dl1_late_addr are
// registered (exactly one cycle after issue). The event outputs are
// combinational pulses for statistics. Reset is synchronous, active low; a
// flush cancels a pending late access. The policy and the one-cycle delay are
// the document's; the separate late port is this design's choice.
module dl1_access_ctrl
  import lsq_filter_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  input  logic  ld_valid,
  input  addr_t ld_addr,
  input  logic  pred_dep,
  input  logic  fwd_hit,
  output logic  dl1_req,
  output addr_t dl1_addr,
  output logic  dl1_late_req,
  output addr_t dl1_late_addr,
  output logic  ev_avoided,    // predicted-dependent and forwarded
  output logic  ev_late,       // predicted-dependent, not forwarded
  output logic  ev_wasted      // predicted-independent, but forwarded
);
  assign dl1_req    = ld_valid && !pred_dep;
  assign dl1_addr   = ld_addr;
  assign ev_avoided = ld_valid && pred_dep && fwd_hit;
  assign ev_late    = ld_valid && pred_dep && !fwd_hit;
  assign ev_wasted  = ld_valid && !pred_dep && fwd_hit;

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      dl1_late_req  <= 1'b0;
      dl1_late_addr <= '0;
    end else begin
      dl1_late_req  <= ev_late;
      dl1_late_addr <= ld_addr;
    end
  end
endmodule
