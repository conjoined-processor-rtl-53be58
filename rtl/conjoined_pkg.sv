// conjoined_pkg: types shared by the conjoined pipeline.
//
// The clock stall controller walks through the states below. NORMAL is
// ordinary conjoined operation. An error seen in NORMAL restores the leading
// (L) registers from the shadow (S) registers at the end of that cycle, which
// is the first recovery cycle; STALL holds the L registers for the second
// cycle; RESUME lets the L registers capture again for the third cycle while
// the S registers are still held. SINGLE is the degraded single-pipeline mode
// entered after too many back-to-back recoveries.
package conjoined_pkg;

  typedef enum logic [1:0] {
    ST_NORMAL = 2'd0,
    ST_STALL  = 2'd1,
    ST_RESUME = 2'd2,
    ST_SINGLE = 2'd3
  } stall_state_t;

endpackage
