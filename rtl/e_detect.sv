// e_detect: error detector of one conjoined pipeline stage.
//
// Compares the value held in the stage's leading (L) pipeline register with
// the value produced by the stage's shadow logic from the same inputs, and
// raises `error` on any mismatch in any bit (a single differing bit anywhere
// is enough). The comparison is a bitwise XOR reduced by OR.
//
// The metastability detection that a silicon implementation adds on the L
// register flip-flops cannot be expressed in two-valued RTL and is not
// modelled; a metastable bit shows up here only as a wrong value.
//
// Purely combinational; the caller decides in which cycles `error` counts.
module e_detect #(
  parameter int W = 8
) (
  input  logic [W-1:0] l_q,       // L-PIPELINE register contents
  input  logic [W-1:0] s_logic,   // S-LOGIC result for the same inputs
  output logic         error
);

  assign error = |(l_q ^ s_logic);

endmodule
