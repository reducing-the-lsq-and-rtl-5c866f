// counting_bloom_filter: a hash table of counters, one per group of addresses.
//
// Each counter holds how many in-flight instructions of interest map to its
// entry: an instruction increments its entry when it issues (its address is
// then known) and decrements it when it commits. A zero counter proves that no
// such instruction with an address in that group is in flight; a non-zero one
// only says that one may be. The hash is the low-order bits of the 8-byte word
// address (address bits [3 +: log2(ENTRIES)]).
//
// The lookup port is combinational and returns the counter as it stood before
// this cycle's increment or decrement ("read before increment"). Increment and
// decrement of the same entry in one cycle cancel. With SATURATE=1 a counter
// sticks at its maximum and ignores decrements at zero (used where the filter
// is only a predictor); with SATURATE=0 the width must cover the largest
// possible count and an assertion checks it. A flush clears all counters,
// because every in-flight instruction is discarded.
//
// Timing: one lookup, one increment and one decrement per cycle, updated on
// the rising clock edge; synchronous active-low reset. The counters and their
// update points follow the document; the hash, one port of each kind and the
// flush are this design's choices.
module counting_bloom_filter
  import lsq_filter_pkg::*;
#(
  parameter int unsigned ENTRIES  = 128,
  parameter int unsigned CNT_W    = 6,
  parameter bit          SATURATE = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  addr_t            lookup_addr,
  output logic [CNT_W-1:0] lookup_count,
  input  logic             inc_valid,
  input  addr_t            inc_addr,
  input  logic             dec_valid,
  input  addr_t            dec_addr
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [CNT_W-1:0] cnt [ENTRIES];

  function automatic logic [IW-1:0] hash(input addr_t a);
    return a[3 +: IW];
  endfunction

  logic [IW-1:0] li, ii, di;
  assign li = hash(lookup_addr);
  assign ii = hash(inc_addr);
  assign di = hash(dec_addr);

  assign lookup_count = cnt[li];

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      for (int i = 0; i < ENTRIES; i++) cnt[i] <= '0;
    end else if (inc_valid && dec_valid && ii == di) begin
      // increment and decrement of one entry cancel
    end else begin
      if (inc_valid && !(SATURATE && cnt[ii] == '1))
        cnt[ii] <= cnt[ii] + 1'b1;
      if (dec_valid && !(SATURATE && cnt[di] == '0))
        cnt[di] <= cnt[di] - 1'b1;
    end
  end

  if (!SATURATE) begin : g_exact
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n || flush)
      (inc_valid && !(dec_valid && ii == di)) |-> cnt[ii] != '1);
    a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n || flush)
      (dec_valid && !(inc_valid && ii == di)) |-> cnt[di] != '0);
  end
endmodule
