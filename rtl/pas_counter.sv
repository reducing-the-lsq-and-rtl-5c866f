// pas_counter: the "pending address stores" register.
//
// Counts the in-flight stores whose address is not yet known. It goes up when
// a store is dispatched and down when a store issues (computes its address).
// Both in the same cycle leave it unchanged. A flush discards all in-flight
// stores and clears it. pas_zero tells the SQ filter that every in-flight
// store is resolved, so the Bloom filter alone can be trusted.
//
// Timing: updated on the rising clock edge; synchronous active-low reset.
// The counter's meaning follows the document; its width (enough for a full
// 32-entry store queue) and the update points are this design's choices.
module pas_counter #(
  parameter int unsigned SQ_DEPTH = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic flush,
  input  logic st_dispatch,
  input  logic st_resolve,
  output logic [$clog2(SQ_DEPTH+1)-1:0] pas,
  output logic pas_zero
);
  assign pas_zero = (pas == '0);

  always_ff @(posedge clk) begin
    if (!rst_n || flush)             pas <= '0;
    else if (st_dispatch && !st_resolve) pas <= pas + 1'b1;
    else if (!st_dispatch && st_resolve) pas <= pas - 1'b1;
  end

  // A store cannot resolve unless one is pending.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n || flush)
                                   (st_resolve && !st_dispatch) |-> pas != '0);
endmodule
