// multi_yla: load-queue search filter built from "youngest issued load age"
// registers, one per address group.
//
// A store that issues must normally search the load queue for younger loads to
// the same address that already issued (memory-ordering violations). Each
// register holds the age of the youngest load issued so far whose address falls
// in its group. If the issuing store is younger than (or equal to) the register
// of its group, or the register was never written, no younger load of that
// group has issued and the load-queue search is skipped.
//
// Interface and timing:
//   ld_issue_*   : a load issues; its group register takes its age if younger.
//   st_issue_*   : a store issues; lq_search is combinational from the
//                  registers as they stood before this cycle's update.
//   flush        : all in-flight instructions are discarded; registers clear.
// Registers are updated on the rising clock edge; reset is synchronous and
// active low.
//
// The register set and the age test follow the document. The number of groups
// (16), the grouping by low-order word-address bits and the clearing on flush
// are this design's choices.
module multi_yla
  import lsq_filter_pkg::*;
#(
  parameter int unsigned NGROUPS = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  input  logic  ld_issue_valid,
  input  age_t  ld_issue_age,
  input  addr_t ld_issue_addr,
  input  logic  st_issue_valid,
  input  age_t  st_issue_age,
  input  addr_t st_issue_addr,
  output logic  lq_search
);
  localparam int unsigned GW = $clog2(NGROUPS);

  age_t            yla   [NGROUPS];
  logic [NGROUPS-1:0] yla_v;

  logic [GW-1:0] ld_g, st_g;
  assign ld_g = ld_issue_addr[3 +: GW];
  assign st_g = st_issue_addr[3 +: GW];

  // Search only if a load younger than the store has issued in this group.
  assign lq_search = st_issue_valid && yla_v[st_g] &&
                     age_older(st_issue_age, yla[st_g]);

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      yla_v <= '0;
      for (int i = 0; i < NGROUPS; i++) yla[i] <= '0;
    end else if (ld_issue_valid) begin
      if (!yla_v[ld_g] || age_older(yla[ld_g], ld_issue_age)) begin
        yla[ld_g]   <= ld_issue_age;
        yla_v[ld_g] <= 1'b1;
      end
    end
  end
endmodule
