// ofs_reg: the single "oldest in-flight store" register.
//
// Holds the age of the oldest store that has been dispatched and not yet
// committed, plus a valid bit that is low while no store is in flight. When a
// store commits, the register simply takes the age of the store in the next
// (contiguous) store-queue entry, supplied by the store queue as next_age /
// next_valid. When a store is dispatched into an empty store queue the
// register takes that store's age. A flush empties the store queue and clears
// the valid bit.
//
// Timing: updated on the rising clock edge; synchronous active-low reset.
// The commit-time update follows the document; the dispatch-into-empty case,
// the valid bit and the flush are this design's choices.
module ofs_reg
  import lsq_filter_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic flush,
  input  logic sq_empty,        // store queue holds no in-flight store
  input  logic st_dispatch,     // a store is dispatched this cycle
  input  age_t st_dispatch_age,
  input  logic st_commit,       // the oldest store commits this cycle
  input  logic next_valid,      // the entry after the committing one holds a store
  input  age_t next_age,        // age of that store
  output logic ofs_valid,
  output age_t ofs
);
  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      ofs_valid <= 1'b0;
      ofs       <= '0;
    end else if (st_commit) begin
      if (next_valid) begin
        ofs_valid <= 1'b1;
        ofs       <= next_age;
      end else if (st_dispatch) begin
        ofs_valid <= 1'b1;
        ofs       <= st_dispatch_age;
      end else begin
        ofs_valid <= 1'b0;
      end
    end else if (st_dispatch && sq_empty) begin
      ofs_valid <= 1'b1;
      ofs       <= st_dispatch_age;
    end
  end
endmodule
