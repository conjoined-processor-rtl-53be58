// conjoined_addmult: two-stage conjoined add-multiply pipeline.
//
// Each operation adds two DATA_W-bit operands with a carry look-ahead adder
// (stage 1) and multiplies the upper half of the sum by its lower half
// (stage 2), giving a DATA_W-bit product. The whole pipeline exists twice.
// The leading (L) pipeline does the real work and may be overclocked. The
// shadow (S) pipeline checks it: every stage's shadow logic reads the
// previous stage's L register, and its result is compared with what the L
// register of its own stage captured. Only checked values enter the S
// registers. On any mismatch the controller (clk_stall_cntrl) rolls the L
// registers back to the S registers, stalls the L side one cycle and
// resumes: three cycles per recovery, with no checkpoint beyond the S
// registers themselves. Repeated errors lead to single-pipeline mode.
//
// Register stages (each a conjoined_stage):
//   stage 0  operands {valid, a, b}; its "logic" is the input selection
//   stage 1  {valid, sum}      from cla_adder on stage 0's L register
//   stage 2  {valid, product}  from multiplier on stage 1's L register
//
// Interface and timing (one clock, clk = L_Clk):
//   * in_valid/in_a/in_b/in_ready: an operation is taken at a rising edge
//     with in_valid && in_ready. in_ready is low in recovery and in the cycle
//     that restarts a rolled-back operation.
//   * out_valid/out_p: in conjoined mode results are read from the stage-2
//     S register, i.e. only after they were checked; out_valid is high for
//     one cycle per result, three cycles after the operation was taken when
//     no error occurs, one result per cycle at full rate. In single-pipeline
//     mode results come from the stage-2 L register, two cycles after the
//     operation was taken.
//   * Rolling back throws away the operation taken in the cycle the error
//     was seen; the last taken operation is kept in hold_q and fed again
//     when the pipeline resumes. hold_q is this design's addition: the
//     architecture description does not say how the input source is
//     rewound.
//   * fi_l*/fi_s* are fault-injection masks, XORed onto the L-LOGIC and
//     S-LOGIC outputs of each stage before they are registered (a soft error
//     or a timing error reaching the register). Tie them to zero in use.
//   * single_use_s: after a permanent fault, chooses which logic copy feeds
//     the L registers (0 = leading logic, 1 = shadow logic). Which copy is
//     healthy is meant to be found by diagnostic test vectors, which are not
//     part of this design.
//   * retry_cnt counts the recoveries since the last error-free cycle.
//   * overclock_ok falls when single-pipeline mode is entered; the external
//     clock generator must then return to its worst-case frequency.
module conjoined_addmult
  import conjoined_pkg::*;
#(
  parameter int DATA_W    = 64,   // adder width; the multiplier is DATA_W/2
  parameter int MAX_RETRY = 4     // recoveries in a row before a fault is permanent
) (
  input  logic                clk,
  input  logic                rst_n,
  // operation input
  input  logic                in_valid,
  input  logic [DATA_W-1:0]   in_a,
  input  logic [DATA_W-1:0]   in_b,
  output logic                in_ready,
  // result output
  output logic                out_valid,
  output logic [DATA_W-1:0]   out_p,
  // fault injection
  input  logic [2*DATA_W:0]   fi_l0,
  input  logic [2*DATA_W:0]   fi_s0,
  input  logic [DATA_W:0]     fi_l1,
  input  logic [DATA_W:0]     fi_s1,
  input  logic [DATA_W:0]     fi_l2,
  input  logic [DATA_W:0]     fi_s2,
  // configuration and status
  input  logic                single_use_s,
  output logic                l_clock_en,
  output logic                s_clock_en,
  output logic                load_sp,
  output logic                rec_start,
  output logic                recovering,
  output logic                single_mode,
  output logic                overclock_ok,
  output logic [2:0]          stage_err,
  output logic [$clog2(MAX_RETRY+1)-1:0] retry_cnt
);

  localparam int HALF = DATA_W / 2;

  typedef struct packed {
    logic              valid;
    logic [DATA_W-1:0] a;
    logic [DATA_W-1:0] b;
  } opnd_t;

  typedef struct packed {
    logic              valid;
    logic [DATA_W-1:0] value;
  } res_t;

  logic l_en, s_en;

  // ---------------------------------------------------------------- input
  opnd_t hold_q;          // last operation taken from the input
  logic  replay_q;        // a rolled-back operation must be fed again
  opnd_t bus_op, in_sel;
  logic  l_capture;       // the L registers take new values at this edge

  assign l_capture = l_en && !load_sp;
  assign in_ready  = l_capture && !replay_q;
  assign bus_op    = '{valid: in_valid, a: in_a, b: in_b};
  assign in_sel    = replay_q ? hold_q : bus_op;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_q   <= '0;
      replay_q <= 1'b0;
    end else begin
      if (in_ready) hold_q <= bus_op;
      if (load_sp) replay_q <= 1'b1;
      else if (l_capture) replay_q <= 1'b0;
    end
  end

  // --------------------------------------------------------------- stages
  opnd_t l0_d, s0_d, l0_q;
  res_t  l1_d, s1_d, l1_q;
  res_t  l2_d, s2_d, l2_q, s2_q;
  res_t  l1_logic, s1_logic, l2_logic, s2_logic;
  logic  use_s;

  // Stage 0 logic: the input selection, one copy per pipeline.
  assign l0_d = in_sel ^ fi_l0;
  assign s0_d = in_sel ^ fi_s0;

  // Stage 1 logic: DATA_W-bit carry look-ahead adders.
  cla_adder #(.WIDTH(DATA_W)) u_l_add (
    .a(l0_q.a), .b(l0_q.b), .cin(1'b0), .sum(l1_logic.value), .cout()
  );
  cla_adder #(.WIDTH(DATA_W)) u_s_add (
    .a(l0_q.a), .b(l0_q.b), .cin(1'b0), .sum(s1_logic.value), .cout()
  );
  assign l1_logic.valid = l0_q.valid;
  assign s1_logic.valid = l0_q.valid;

  // Stage 2 logic: upper half times lower half of the sum.
  multiplier #(.WIDTH(HALF)) u_l_mul (
    .a(l1_q.value[DATA_W-1:HALF]), .b(l1_q.value[HALF-1:0]), .p(l2_logic.value)
  );
  multiplier #(.WIDTH(HALF)) u_s_mul (
    .a(l1_q.value[DATA_W-1:HALF]), .b(l1_q.value[HALF-1:0]), .p(s2_logic.value)
  );
  assign l2_logic.valid = l1_q.valid;
  assign s2_logic.valid = l1_q.valid;

  // In single-pipeline mode the L registers may be fed from the shadow copy.
  assign use_s = single_mode && single_use_s;
  // The fault masks belong to the logic copies, so a broken copy stays
  // broken whichever register it feeds.
  assign s1_d  = s1_logic ^ fi_s1;
  assign s2_d  = s2_logic ^ fi_s2;
  assign l1_d  = use_s ? s1_d : (l1_logic ^ fi_l1);
  assign l2_d  = use_s ? s2_d : (l2_logic ^ fi_l2);

  conjoined_stage #(.W($bits(opnd_t))) u_stage0 (
    .clk, .rst_n, .l_en, .s_en, .load_sp,
    .l_d(l0_d), .s_d(s0_d), .l_q(l0_q), .s_q(), .error(stage_err[0])
  );
  conjoined_stage #(.W($bits(res_t))) u_stage1 (
    .clk, .rst_n, .l_en, .s_en, .load_sp,
    .l_d(l1_d), .s_d(s1_d), .l_q(l1_q), .s_q(), .error(stage_err[1])
  );
  conjoined_stage #(.W($bits(res_t))) u_stage2 (
    .clk, .rst_n, .l_en, .s_en, .load_sp,
    .l_d(l2_d), .s_d(s2_d), .l_q(l2_q), .s_q(s2_q), .error(stage_err[2])
  );

  // ----------------------------------------------------------- controller
  clk_stall_cntrl #(.NSTAGES(3), .MAX_RETRY(MAX_RETRY)) u_ctrl (
    .clk, .rst_n,
    .stage_err  (stage_err),
    .l_en       (l_en),
    .s_en       (s_en),
    .load_sp    (load_sp),
    .rec_start  (rec_start),
    .recovering (recovering),
    .single_mode(single_mode),
    .retry_cnt  (retry_cnt)
  );

  assign l_clock_en   = l_en;
  assign s_clock_en   = s_en;
  assign overclock_ok = !single_mode;

  // --------------------------------------------------------------- output
  logic s_new_q, l_new_q;   // the S / L registers took new results last edge

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_new_q <= 1'b0;
      l_new_q <= 1'b0;
    end else begin
      s_new_q <= s_en;
      l_new_q <= l_capture;
    end
  end

  assign out_valid = single_mode ? (l2_q.valid && l_new_q) : (s2_q.valid && s_new_q);
  assign out_p     = single_mode ? l2_q.value : s2_q.value;

endmodule
