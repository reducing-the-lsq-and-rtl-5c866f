// lsap: load-store alias predictor.
//
// A small fully associative table of load PCs. A load whose PC is in the
// table is predicted to depend on (alias) an earlier store. An entry is
// written when a load is found to have aliased an older store (a memory-order
// violation reported by the load queue); entries are replaced in FIFO order.
// The table is only read when the SQ filter asks for it (lookup_en), so the
// number of reads reflects the filtering.
//
// Interface and timing: lookup is combinational; train_* inserts a PC on the
// rising clock edge if it is not already present; synchronous active-low
// reset empties the table. The table size (16) is the document's; the tag
// (full PC), the training event and FIFO replacement are this design's
// choices, as the predictor belongs to the base processor.
module lsap
  import lsq_filter_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  lookup_en,
  input  addr_t lookup_pc,
  output logic  dep,
  input  logic  train_valid,
  input  addr_t train_pc
);
  localparam int unsigned IW = $clog2(ENTRIES);

  addr_t            tag [ENTRIES];
  logic [ENTRIES-1:0] v;
  logic [IW-1:0]    wptr;

  logic hit_lookup, hit_train;
  always_comb begin
    hit_lookup = 1'b0;
    hit_train  = 1'b0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (v[i] && tag[i] == lookup_pc) hit_lookup = 1'b1;
      if (v[i] && tag[i] == train_pc)  hit_train  = 1'b1;
    end
  end
  assign dep = lookup_en && hit_lookup;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v    <= '0;
      wptr <= '0;
      for (int i = 0; i < ENTRIES; i++) tag[i] <= '0;
    end else if (train_valid && !hit_train) begin
      tag[wptr] <= train_pc;
      v[wptr]   <= 1'b1;
      wptr      <= wptr + 1'b1;
    end
  end
endmodule
