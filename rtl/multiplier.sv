// multiplier: unsigned WIDTH x WIDTH -> 2*WIDTH multiplier.
//
// Stage-2 logic of the conjoined add-multiply pipeline (instantiated as the
// leading and the shadow copy). The pipeline multiplies the upper and lower
// 32-bit words of the adder result. The multiplier circuit the pipeline was
// built around is a published high-speed low-power design that is not
// reproduced here; this module states only the function and leaves the
// multiplier architecture to synthesis.
//
// Purely combinational; no clock.
module multiplier #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);

  assign p = (2 * WIDTH)'(a) * (2 * WIDTH)'(b);

endmodule
