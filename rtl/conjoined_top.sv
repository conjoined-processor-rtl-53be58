// conjoined_top: the two conjoined designs side by side.
//
// am_*: the conjoined add-multiply pipeline (conjoined_addmult): a 64-bit
//       carry look-ahead addition followed by a 32 x 32 multiplication of
//       the sum's two halves, with leading and shadow copies of every stage.
// mp_*: the five-stage conjoined MIPS pipeline (conjoined_mips).
//
// The two share the clock and nothing else; each has its own reset, its own
// fault-injection inputs and its own recovery controller and status
// outputs. Port meanings and timing are those of the two modules.
module conjoined_top #(
  parameter int DATA_W     = 64,
  parameter int IMEM_WORDS = 1024,
  parameter int DMEM_WORDS = 16384,
  parameter int MAX_RETRY  = 4
) (
  input  logic                  clk,
  // ---------------------------------------------- add-multiply pipeline
  input  logic                  am_rst_n,
  input  logic                  am_in_valid,
  input  logic [DATA_W-1:0]     am_in_a,
  input  logic [DATA_W-1:0]     am_in_b,
  output logic                  am_in_ready,
  output logic                  am_out_valid,
  output logic [DATA_W-1:0]     am_out_p,
  input  logic [2*DATA_W:0]     am_fi_l0,
  input  logic [2*DATA_W:0]     am_fi_s0,
  input  logic [DATA_W:0]       am_fi_l1,
  input  logic [DATA_W:0]       am_fi_s1,
  input  logic [DATA_W:0]       am_fi_l2,
  input  logic [DATA_W:0]       am_fi_s2,
  input  logic                  am_single_use_s,
  output logic                  am_l_clock_en,
  output logic                  am_s_clock_en,
  output logic                  am_load_sp,
  output logic                  am_rec_start,
  output logic                  am_recovering,
  output logic                  am_single_mode,
  output logic                  am_overclock_ok,
  output logic [2:0]            am_stage_err,
  output logic [$clog2(MAX_RETRY+1)-1:0] am_retry_cnt,
  // ------------------------------------------------------ MIPS pipeline
  input  logic                  mp_rst_n,
  input  logic                  mp_imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] mp_imem_waddr,
  input  logic [31:0]           mp_imem_wdata,
  input  logic [$clog2(DMEM_WORDS)-1:0] mp_dbg_addr,
  output logic [31:0]           mp_dbg_rdata,
  output logic                  mp_halted,
  output logic [31:0]           mp_instret,
  input  logic [4:0]            mp_fi_l_en,
  input  logic [4:0]            mp_fi_s_en,
  input  logic [7:0]            mp_fi_bit,
  input  logic                  mp_single_use_s,
  output logic                  mp_l_clock_en,
  output logic                  mp_s_clock_en,
  output logic                  mp_load_sp,
  output logic                  mp_rec_start,
  output logic                  mp_recovering,
  output logic                  mp_single_mode,
  output logic                  mp_overclock_ok,
  output logic [4:0]            mp_stage_err,
  output logic [$clog2(MAX_RETRY+1)-1:0] mp_retry_cnt,
  output logic                  mp_ev_load_use,
  output logic                  mp_ev_redirect,
  output logic                  mp_ev_forward
);

  conjoined_addmult #(.DATA_W(DATA_W), .MAX_RETRY(MAX_RETRY)) u_addmult (
    .clk, .rst_n(am_rst_n),
    .in_valid(am_in_valid), .in_a(am_in_a), .in_b(am_in_b), .in_ready(am_in_ready),
    .out_valid(am_out_valid), .out_p(am_out_p),
    .fi_l0(am_fi_l0), .fi_s0(am_fi_s0), .fi_l1(am_fi_l1), .fi_s1(am_fi_s1),
    .fi_l2(am_fi_l2), .fi_s2(am_fi_s2), .single_use_s(am_single_use_s),
    .l_clock_en(am_l_clock_en), .s_clock_en(am_s_clock_en), .load_sp(am_load_sp),
    .rec_start(am_rec_start), .recovering(am_recovering), .single_mode(am_single_mode),
    .overclock_ok(am_overclock_ok), .stage_err(am_stage_err), .retry_cnt(am_retry_cnt)
  );

  conjoined_mips #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS),
                   .MAX_RETRY(MAX_RETRY)) u_mips (
    .clk, .rst_n(mp_rst_n),
    .imem_we(mp_imem_we), .imem_waddr(mp_imem_waddr), .imem_wdata(mp_imem_wdata),
    .dbg_addr(mp_dbg_addr), .dbg_rdata(mp_dbg_rdata),
    .halted(mp_halted), .instret(mp_instret),
    .fi_l_en(mp_fi_l_en), .fi_s_en(mp_fi_s_en), .fi_bit(mp_fi_bit),
    .single_use_s(mp_single_use_s),
    .l_clock_en(mp_l_clock_en), .s_clock_en(mp_s_clock_en), .load_sp(mp_load_sp),
    .rec_start(mp_rec_start), .recovering(mp_recovering), .single_mode(mp_single_mode),
    .overclock_ok(mp_overclock_ok), .stage_err(mp_stage_err), .retry_cnt(mp_retry_cnt),
    .ev_load_use(mp_ev_load_use), .ev_redirect(mp_ev_redirect), .ev_forward(mp_ev_forward)
  );

endmodule
