// ncl_pkg: shared types for the dual-rail NULL Convention Logic (NCL) stages.
//
// A dual-rail signal carries one bit on two wires. Rail 1 asserted means
// DATA1, rail 0 asserted means DATA0, both low means NULL (the spacer between
// two DATA wavefronts) and both high is illegal. Handshake lines (Ki, Ko) are
// single wires: 1 is "request for DATA" (rfd), 0 is "request for NULL" (rfn).
// The variant enums select between the completion-incomplete arrangements a
// designer might first draw and the fixes that make them completion-complete;
// the defaults in each stage are the fixes chosen for that stage.
package ncl_pkg;

  typedef struct packed {
    logic r1;  // DATA1 rail
    logic r0;  // DATA0 rail
  } dr_t;

  localparam dr_t DR_NULL = '{r1: 1'b0, r0: 1'b0};

  localparam logic RFD = 1'b1;  // request for DATA
  localparam logic RFN = 1'b0;  // request for NULL

  // Completion sets of the six-AND stage.
  typedef enum logic [1:0] {
    CSET_PARTITION = 2'd0,  // bit-wise sets: only outputs that use the bit (TH33)
    CSET_EXTENDED  = 2'd1,  // sets widened by A(0) / A(5) (TH44)
    CSET_FULLWORD  = 2'd2   // full-word: one TH44 + TH33 tree over all six outputs
  } and6_cset_e;

  // Gate-level versions of the GEN_S7 component.
  typedef enum logic [1:0] {
    GEN_S7_ORIG = 2'd0,  // complete only with respect to C
    GEN_S7_X    = 2'd1,  // also complete with respect to X
    GEN_S7_XY   = 2'd2   // also complete with respect to X and Y
  } gen_s7_e;

  function automatic dr_t dr_data(input logic v);
    return '{r1: v, r0: ~v};
  endfunction

  function automatic logic dr_is_data(input dr_t s);
    return s.r1 ^ s.r0;
  endfunction

  function automatic logic dr_is_null(input dr_t s);
    return ~(s.r1 | s.r0);
  endfunction

endpackage
