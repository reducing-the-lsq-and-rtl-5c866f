// bimodal_fwd_pred: PC-indexed forwarding predictor in the style of a bimodal
// branch predictor.
//
// A table of 2-bit saturating counters indexed by the low-order bits of the
// load's PC. The upper counter bit is the prediction: 1 means the load is
// expected to receive its data by forwarding from the store queue or cached
// load queue. After a load has executed, its counter moves towards the actual
// outcome. Because only the PC is needed, the prediction is available as soon
// as the load is decoded.
//
// Interface and timing: lookup is combinational; update on the rising clock
// edge; synchronous active-low reset sets every counter to 01 (weakly "not
// forwarded"). The 2-bit bimodal organisation and the 256-entry size are the
// document's; the index bits and reset value are this design's choices.
module bimodal_fwd_pred
  import lsq_filter_pkg::*;
#(
  parameter int unsigned ENTRIES = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  input  addr_t lookup_pc,
  output logic  pred_dep,
  input  logic  upd_valid,
  input  addr_t upd_pc,
  input  logic  upd_forwarded
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [1:0] ctr [ENTRIES];

  logic [IW-1:0] li, ui;
  assign li = lookup_pc[IW-1:0];
  assign ui = upd_pc[IW-1:0];
  assign pred_dep = ctr[li][1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ctr[i] <= 2'b01;
    end else if (upd_valid) begin
      if (upd_forwarded && ctr[ui] != 2'b11)  ctr[ui] <= ctr[ui] + 2'b01;
      if (!upd_forwarded && ctr[ui] != 2'b00) ctr[ui] <= ctr[ui] - 2'b01;
    end
  end
endmodule
