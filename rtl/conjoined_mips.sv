// conjoined_mips: five-stage in-order conjoined MIPS pipeline with operand
// forwarding.
//
// The classic IF / ID / EX / MEM / WB pipeline is built twice in the
// conjoined way. Every pipeline register (PC, IF/ID, ID/EX, EX/MEM, MEM/WB)
// is a conjoined_stage with a leading (L) and a shadow (S) copy, and the
// combinational logic of all stages exists as two copies of mips_logic,
// both reading the L registers. The feedback paths of the pipeline
// (forwarding, branch redirect, load-use stall, register bypass) therefore
// reach both pipelines alike. clk_stall_cntrl runs the same three-cycle
// recovery as in the arithmetic pipeline.
//
// Architectural state outside the pipeline registers (register file, data
// memory, halt flag, retired-instruction count) is shared and is written
// only at the end of a cycle whose pipeline state has been checked (s_en).
// A recovery rolls the pipeline back by exactly one state, to the S
// registers; the writes of that state have already been made, so repeating
// its later instructions rewrites the same values and the state stays
// consistent. How the register file and memories join the conjoined scheme
// is this design's own choice; so are the instruction subset (see mips_pkg),
// branches resolved in EX without a delay slot, and the memory sizes.
//
// Interface and timing (one clock, clk = L_Clk):
//   * imem_we/imem_waddr/imem_wdata load the program (word addresses) while
//     the pipeline is held in reset; execution starts at address 0.
//   * dbg_addr/dbg_rdata read a data memory word (word address) at any time.
//   * halted rises once a BREAK instruction has been checked and retired.
//   * instret counts retired instructions.
//   * fi_l_en/fi_s_en/fi_bit: fault injection. For each stage whose enable
//     bit is set, bit (fi_bit mod width) of that stage's L-LOGIC or S-LOGIC
//     result is flipped. Stage order: 0 PC, 1 IF/ID, 2 ID/EX, 3 EX/MEM,
//     4 MEM/WB. Tie to zero in use.
//   * single_use_s and the status outputs behave as in conjoined_addmult.
//   * ev_load_use/ev_redirect/ev_forward report, for the leading logic, a
//     load-use hold, a taken branch or jump, and an operand forwarded into
//     EX in the current cycle.
module conjoined_mips
  import mips_pkg::*;
#(
  parameter int IMEM_WORDS = 1024,
  parameter int DMEM_WORDS = 16384,
  parameter int MAX_RETRY  = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // program load
  input  logic        imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  // data memory inspection
  input  logic [$clog2(DMEM_WORDS)-1:0] dbg_addr,
  output logic [31:0] dbg_rdata,
  // execution status
  output logic        halted,
  output logic [31:0] instret,
  // fault injection
  input  logic [4:0]  fi_l_en,
  input  logic [4:0]  fi_s_en,
  input  logic [7:0]  fi_bit,
  // configuration and status
  input  logic        single_use_s,
  output logic        l_clock_en,
  output logic        s_clock_en,
  output logic        load_sp,
  output logic        rec_start,
  output logic        recovering,
  output logic        single_mode,
  output logic        overclock_ok,
  output logic [4:0]  stage_err,
  output logic [$clog2(MAX_RETRY+1)-1:0] retry_cnt,
  // pipeline events of the leading copy in this cycle
  output logic        ev_load_use,
  output logic        ev_redirect,
  output logic        ev_forward
);

  localparam int IA = $clog2(IMEM_WORDS);
  localparam int DA = $clog2(DMEM_WORDS);

  logic l_en, s_en;

  // ------------------------------------------------------------ memories
  logic [31:0] imem [IMEM_WORDS];
  logic [31:0] dmem [DMEM_WORDS];

  // ------------------------------------------------------ pipeline state
  pc_reg_t pc_l, pc_ld, pc_sd, pc_ll, pc_sl;
  ifid_t   ifid_l, ifid_ld, ifid_sd, ifid_ll, ifid_sl;
  idex_t   idex_l, idex_ld, idex_sd, idex_ll, idex_sl;
  exmem_t  exmem_l, exmem_ld, exmem_sd, exmem_ll, exmem_sl;
  memwb_t  memwb_l, memwb_ld, memwb_sd, memwb_ll, memwb_sl;

  // ------------------------------------------------- the two logic copies
  logic [4:0]  ra [4];
  logic [31:0] rd [4];
  logic [31:0] dmem_addr_l, dmem_addr_s;
  logic [31:0] imem_rd_l, imem_rd_s, dmem_rd_l, dmem_rd_s;

  assign imem_rd_l = imem[pc_l.pc[IA+1:2]];
  assign imem_rd_s = imem[pc_l.pc[IA+1:2]];
  assign dmem_rd_l = dmem[dmem_addr_l[DA+1:2]];
  assign dmem_rd_s = dmem[dmem_addr_s[DA+1:2]];

  mips_logic u_l_logic (
    .pc_q(pc_l), .ifid_q(ifid_l), .idex_q(idex_l), .exmem_q(exmem_l), .memwb_q(memwb_l),
    .imem_rdata(imem_rd_l),
    .rf_ra_rs(ra[0]), .rf_ra_rt(ra[1]), .rf_rd_rs(rd[0]), .rf_rd_rt(rd[1]),
    .dmem_addr(dmem_addr_l), .dmem_rdata(dmem_rd_l),
    .pc_d(pc_ll), .ifid_d(ifid_ll), .idex_d(idex_ll), .exmem_d(exmem_ll), .memwb_d(memwb_ll),
    .ev_load_use(ev_load_use), .ev_redirect(ev_redirect), .ev_forward(ev_forward)
  );

  mips_logic u_s_logic (
    .pc_q(pc_l), .ifid_q(ifid_l), .idex_q(idex_l), .exmem_q(exmem_l), .memwb_q(memwb_l),
    .imem_rdata(imem_rd_s),
    .rf_ra_rs(ra[2]), .rf_ra_rt(ra[3]), .rf_rd_rs(rd[2]), .rf_rd_rt(rd[3]),
    .dmem_addr(dmem_addr_s), .dmem_rdata(dmem_rd_s),
    .pc_d(pc_sl), .ifid_d(ifid_sl), .idex_d(idex_sl), .exmem_d(exmem_sl), .memwb_d(memwb_sl),
    .ev_load_use(), .ev_redirect(), .ev_forward()
  );

  // --------------------------------------------- fault masks and selection
  logic use_s;
  assign use_s = single_mode && single_use_s;

  function automatic logic [255:0] flip(logic en, logic [7:0] b, int w);
    logic [255:0] m;
    m = '0;
    if (en) m[int'(b) % w] = 1'b1;
    return m;
  endfunction

  localparam int W0 = $bits(pc_reg_t);
  localparam int W1 = $bits(ifid_t);
  localparam int W2 = $bits(idex_t);
  localparam int W3 = $bits(exmem_t);
  localparam int W4 = $bits(memwb_t);

  always_comb begin
    pc_sd    = pc_sl    ^ W0'(flip(fi_s_en[0], fi_bit, W0));
    ifid_sd  = ifid_sl  ^ W1'(flip(fi_s_en[1], fi_bit, W1));
    idex_sd  = idex_sl  ^ W2'(flip(fi_s_en[2], fi_bit, W2));
    exmem_sd = exmem_sl ^ W3'(flip(fi_s_en[3], fi_bit, W3));
    memwb_sd = memwb_sl ^ W4'(flip(fi_s_en[4], fi_bit, W4));
    pc_ld    = use_s ? pc_sd    : pc_ll    ^ W0'(flip(fi_l_en[0], fi_bit, W0));
    ifid_ld  = use_s ? ifid_sd  : ifid_ll  ^ W1'(flip(fi_l_en[1], fi_bit, W1));
    idex_ld  = use_s ? idex_sd  : idex_ll  ^ W2'(flip(fi_l_en[2], fi_bit, W2));
    exmem_ld = use_s ? exmem_sd : exmem_ll ^ W3'(flip(fi_l_en[3], fi_bit, W3));
    memwb_ld = use_s ? memwb_sd : memwb_ll ^ W4'(flip(fi_l_en[4], fi_bit, W4));
  end

  // ------------------------------------------------------------- stages
  conjoined_stage #(.W(W0)) u_pc (
    .clk, .rst_n, .l_en, .s_en, .load_sp,
    .l_d(pc_ld), .s_d(pc_sd), .l_q(pc_l), .s_q(), .error(stage_err[0])
  );
  conjoined_stage #(.W(W1)) u_ifid (
    .clk, .rst_n, .l_en, .s_en, .load_sp,
    .l_d(ifid_ld), .s_d(ifid_sd), .l_q(ifid_l), .s_q(), .error(stage_err[1])
  );
  conjoined_stage #(.W(W2)) u_idex (
    .clk, .rst_n, .l_en, .s_en, .load_sp,
    .l_d(idex_ld), .s_d(idex_sd), .l_q(idex_l), .s_q(), .error(stage_err[2])
  );
  conjoined_stage #(.W(W3)) u_exmem (
    .clk, .rst_n, .l_en, .s_en, .load_sp,
    .l_d(exmem_ld), .s_d(exmem_sd), .l_q(exmem_l), .s_q(), .error(stage_err[3])
  );
  conjoined_stage #(.W(W4)) u_memwb (
    .clk, .rst_n, .l_en, .s_en, .load_sp,
    .l_d(memwb_ld), .s_d(memwb_sd), .l_q(memwb_l), .s_q(), .error(stage_err[4])
  );

  clk_stall_cntrl #(.NSTAGES(5), .MAX_RETRY(MAX_RETRY)) u_ctrl (
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

  // ------------------------------------------------ architectural writes
  // Checked state commits at the end of its cycle. In single-pipeline mode
  // every new L state commits; the state just restored from the S registers
  // has committed already. A store behind a retiring BREAK does not commit.
  logic l_new_q, commit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) l_new_q <= 1'b0;
    else        l_new_q <= l_en && !load_sp;
  end

  assign commit = !halted && (single_mode ? l_new_q : s_en);

  mips_regfile u_rf (
    .clk, .rst_n,
    .ra, .rd,
    .we(commit && memwb_l.valid && memwb_l.reg_write),
    .wa(memwb_l.dest),
    .wd(memwb_l.value)
  );

  always_ff @(posedge clk) begin
    if (!rst_n && imem_we) imem[imem_waddr] <= imem_wdata;
  end

  always_ff @(posedge clk) begin
    if (commit && exmem_l.valid && exmem_l.mem_write && !(memwb_l.valid && memwb_l.halt))
      dmem[exmem_l.result[DA+1:2]] <= exmem_l.store_data;
  end

  assign dbg_rdata = dmem[dbg_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      halted  <= 1'b0;
      instret <= '0;
    end else if (commit && memwb_l.valid) begin
      instret <= instret + 32'd1;
      if (memwb_l.halt) halted <= 1'b1;
    end
  end

endmodule
