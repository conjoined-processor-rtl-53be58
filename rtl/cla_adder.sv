// cla_adder: hierarchical carry look-ahead adder (sum = a + b + cin).
//
// This is the stage-1 logic of the conjoined add-multiply pipeline, where it
// is instantiated twice: once as leading logic and once as shadow logic.
// The pipeline's adder is 64 bits wide and of the carry look-ahead kind;
// how the look-ahead is organised is this design's own choice:
// 4-bit carry look-ahead units arranged in a tree. Level 0 holds the bit
// generate/propagate signals; each node of level l+1 combines four nodes of
// level l into a group generate/propagate. Carries are then pushed down the
// tree, each unit producing the carries of its four children with the
// expanded look-ahead equations (no rippling inside a unit). WIDTH must be a
// power of four (4, 16, 64, 256, ...).
//
// Purely combinational; no clock.
module cla_adder #(
  parameter int WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int LEVELS = $clog2(WIDTH) / 2;   // number of 4:1 tree levels

  if ((1 << (2 * LEVELS)) != WIDTH) begin : g_bad_width
    $error("cla_adder: WIDTH must be a power of four");
  end

  // Group generate / propagate and carry-in of every node, per level.
  // Level l has WIDTH >> (2*l) nodes.
  logic [WIDTH-1:0] gg [LEVELS+1];
  logic [WIDTH-1:0] pp [LEVELS+1];
  logic [WIDTH-1:0] cc [LEVELS+1];

  always_comb begin
    for (int l = 0; l <= LEVELS; l++) begin
      gg[l] = '0;
      pp[l] = '0;
      cc[l] = '0;
    end
    gg[0] = a & b;
    pp[0] = a ^ b;
    // Upward pass: group generate and propagate.
    for (int l = 0; l < LEVELS; l++) begin
      for (int j = 0; j < (WIDTH >> (2 * (l + 1))); j++) begin
        gg[l+1][j] = gg[l][4*j+3]
                   | (pp[l][4*j+3] & gg[l][4*j+2])
                   | (pp[l][4*j+3] & pp[l][4*j+2] & gg[l][4*j+1])
                   | (pp[l][4*j+3] & pp[l][4*j+2] & pp[l][4*j+1] & gg[l][4*j]);
        pp[l+1][j] = pp[l][4*j+3] & pp[l][4*j+2] & pp[l][4*j+1] & pp[l][4*j];
      end
    end
    // Downward pass: each 4-bit look-ahead unit forms its children's carries.
    cc[LEVELS][0] = cin;
    for (int l = LEVELS; l > 0; l--) begin
      for (int j = 0; j < (WIDTH >> (2 * l)); j++) begin
        cc[l-1][4*j]   = cc[l][j];
        cc[l-1][4*j+1] = gg[l-1][4*j] | (pp[l-1][4*j] & cc[l][j]);
        cc[l-1][4*j+2] = gg[l-1][4*j+1]
                       | (pp[l-1][4*j+1] & gg[l-1][4*j])
                       | (pp[l-1][4*j+1] & pp[l-1][4*j] & cc[l][j]);
        cc[l-1][4*j+3] = gg[l-1][4*j+2]
                       | (pp[l-1][4*j+2] & gg[l-1][4*j+1])
                       | (pp[l-1][4*j+2] & pp[l-1][4*j+1] & gg[l-1][4*j])
                       | (pp[l-1][4*j+2] & pp[l-1][4*j+1] & pp[l-1][4*j] & cc[l][j]);
      end
    end
  end

  assign sum  = pp[0] ^ cc[0];
  assign cout = gg[LEVELS][0] | (pp[LEVELS][0] & cin);

endmodule
