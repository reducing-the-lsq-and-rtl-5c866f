// lsq_filter_pkg: types and helpers shared by the LSQ and DL1 access filters.
//
// Instruction ages are small wrapping sequence numbers handed out in program
// order at dispatch. Two in-flight ages never differ by half the age range or
// more (the reorder window is 128 instructions and ages are 8 bits), so the
// sign of their difference orders them. The width is this design's choice.
//
// sq_action_e encodes what an issuing load or store does in the store queue:
// nothing, the cheap scan for the closest older store whose address is still
// unknown (no address comparison), or the full associative address search.
package lsq_filter_pkg;

  localparam int unsigned AGE_W  = 8;
  localparam int unsigned ADDR_W = 48;
  localparam int unsigned DATA_W = 64;

  typedef logic [AGE_W-1:0]  age_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  typedef enum logic [1:0] {
    SQ_SKIP       = 2'd0,
    SQ_UNRESOLVED = 2'd1,
    SQ_FULL       = 2'd2
  } sq_action_e;

  // a is older (earlier in program order) than b.
  function automatic logic age_older(input age_t a, input age_t b);
    age_t d;
    d = a - b;
    return d[AGE_W-1];
  endfunction

endpackage
