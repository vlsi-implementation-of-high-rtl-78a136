// da_lms_pkg: constants and types shared by the multiplier-less LMS filter.
// The APC-OMS LUT multiplier works on a 5-bit input (L = 5) and keeps nine
// LUT words; both numbers come from the APC-OMS design it implements. The
// pipeline-occupancy type of the filter is this design's own.
package da_lms_pkg;

  // APC-OMS multiplier: input width and number of LUT words.
  localparam int unsigned APC_L     = 5;
  localparam int unsigned APC_WORDS = 9;
  // LUT address of the word used when the 4 low input bits are all zero.
  localparam logic [3:0]  APC_ZERO_ADDR = 4'b1000;

  // Occupancy of the two pipeline stages of the adaptive filter.
  typedef struct packed {
    logic err;   // a sample is in the error stage (y, e formed; LUT loaded)
    logic upd;   // a sample is in the update stage (weights written)
  } af_pipe_t;

endpackage
