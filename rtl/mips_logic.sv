// mips_logic: the combinational logic of all five stages of the conjoined
// MIPS pipeline, as one copy.
//
// The conjoined pipeline instantiates this module twice: as the leading
// logic (L-LOGIC), whose results go to the L pipeline registers, and as the
// shadow logic (S-LOGIC), whose results are compared with them. Both copies
// read the same L pipeline registers, including the feedback paths (branch
// redirect, forwarding, load-use stall), so a feedback signal reaches both
// pipelines alike. The copy computes the next value of every pipeline
// register from the current L registers and from the memory read data:
//   IF   next PC: PC + 4, the EX branch/jump target, or held on a stall;
//        IF/ID from the instruction word at PC
//   ID   decode, register read with bypass from MEM/WB, load-use hazard
//        (one bubble)
//   EX   forwarding from EX/MEM and MEM/WB, ALU, branch and jump resolution
//        (taken branches squash IF/ID and ID/EX, no delay slot)
//   MEM  load data selection
// It also drives its own read addresses for the register file and the data
// memory. Purely combinational. Some outputs are plain wires from an input
// (fields carried unchanged to the next register, the data address, the
// register read addresses); they stay ports so that both copies have them.
module mips_logic
  import mips_pkg::*;
(
  input  pc_reg_t     pc_q,
  input  ifid_t       ifid_q,
  input  idex_t       idex_q,
  input  exmem_t      exmem_q,
  input  memwb_t      memwb_q,
  input  logic [31:0] imem_rdata,    // instruction word at pc_q.pc
  output logic [4:0]  rf_ra_rs,
  output logic [4:0]  rf_ra_rt,
  input  logic [31:0] rf_rd_rs,
  input  logic [31:0] rf_rd_rt,
  output logic [31:0] dmem_addr,     // byte address of the MEM-stage access
  input  logic [31:0] dmem_rdata,
  output pc_reg_t     pc_d,
  output ifid_t       ifid_d,
  output idex_t       idex_d,
  output exmem_t      exmem_d,
  output memwb_t      memwb_d,
  // events of this cycle, for performance counting
  output logic        ev_load_use,   // ID holds for a load result
  output logic        ev_redirect,   // taken branch or jump squashes IF/ID, ID/EX
  output logic        ev_forward     // an EX operand comes from EX/MEM or MEM/WB
);

  // ------------------------------------------------------------------ EX
  logic [31:0] fwd_a, fwd_b, alu_a, alu_b, alu_y, pc_plus4_ex, target;
  logic        redirect;

  function automatic logic [31:0] forward(logic [4:0] r, logic [31:0] v,
                                          exmem_t em, memwb_t mw);
    if (r != 5'd0 && em.valid && em.reg_write && !em.mem_read && em.dest == r)
      return em.result;
    if (r != 5'd0 && mw.valid && mw.reg_write && mw.dest == r)
      return mw.value;
    return v;
  endfunction

  assign ev_forward = idex_q.valid &&
                      ((fwd_a != idex_q.rs_val) || (fwd_b != idex_q.rt_val));
  assign ev_redirect = redirect;

  always_comb begin
    fwd_a = forward(idex_q.rs, idex_q.rs_val, exmem_q, memwb_q);
    fwd_b = forward(idex_q.rt, idex_q.rt_val, exmem_q, memwb_q);
    unique case (idex_q.alu_op)
      ALU_SLL, ALU_SRL, ALU_SRA: alu_a = idex_q.shift_var ? fwd_a : {27'd0, idex_q.shamt};
      default:                   alu_a = fwd_a;
    endcase
    alu_b       = idex_q.alu_imm ? idex_q.imm : fwd_b;
    pc_plus4_ex = idex_q.pc + 32'd4;
    redirect    = idex_q.valid &&
                  ((idex_q.branch && ((fwd_a == fwd_b) != idex_q.branch_ne)) ||
                   idex_q.jump || idex_q.jump_reg);
    if (idex_q.jump_reg)  target = fwd_a;
    else if (idex_q.jump) target = {pc_plus4_ex[31:28], idex_q.jindex, 2'b00};
    else                  target = pc_plus4_ex + {idex_q.imm[29:0], 2'b00};
  end

  mips_alu u_alu (.op(idex_q.alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  always_comb begin
    exmem_d            = '0;
    exmem_d.valid      = idex_q.valid;
    exmem_d.result     = idex_q.link ? pc_plus4_ex : alu_y;
    exmem_d.store_data = fwd_b;
    exmem_d.dest       = idex_q.dest;
    exmem_d.reg_write  = idex_q.valid && idex_q.reg_write;
    exmem_d.mem_read   = idex_q.valid && idex_q.mem_read;
    exmem_d.mem_write  = idex_q.valid && idex_q.mem_write;
    exmem_d.halt       = idex_q.valid && idex_q.halt;
  end

  // ----------------------------------------------------------------- MEM
  assign dmem_addr = exmem_q.result;

  always_comb begin
    memwb_d           = '0;
    memwb_d.valid     = exmem_q.valid;
    memwb_d.value     = exmem_q.mem_read ? dmem_rdata : exmem_q.result;
    memwb_d.dest      = exmem_q.dest;
    memwb_d.reg_write = exmem_q.reg_write;
    memwb_d.halt      = exmem_q.halt;
  end

  // ------------------------------------------------------------------ ID
  logic [31:0] instr;
  logic [5:0]  op, funct;
  logic [4:0]  rs, rt, rd;
  logic [31:0] sext, zext;
  logic        load_use;
  idex_t       dec;

  assign ev_load_use = load_use;

  assign instr    = ifid_q.instr;
  assign op       = instr[31:26];
  assign rs       = instr[25:21];
  assign rt       = instr[20:16];
  assign rd       = instr[15:11];
  assign funct    = instr[5:0];
  assign sext     = {{16{instr[15]}}, instr[15:0]};
  assign zext     = {16'd0, instr[15:0]};
  assign rf_ra_rs = rs;
  assign rf_ra_rt = rt;

  always_comb begin
    dec        = '0;
    dec.valid  = ifid_q.valid;
    dec.pc     = ifid_q.pc;
    dec.rs     = rs;
    dec.rt     = rt;
    dec.shamt  = instr[10:6];
    dec.jindex = instr[25:0];
    dec.alu_op = ALU_ADD;
    // register read with bypass from the instruction writing back now
    dec.rs_val = (memwb_q.valid && memwb_q.reg_write && memwb_q.dest == rs && rs != 5'd0)
                 ? memwb_q.value : rf_rd_rs;
    dec.rt_val = (memwb_q.valid && memwb_q.reg_write && memwb_q.dest == rt && rt != 5'd0)
                 ? memwb_q.value : rf_rd_rt;
    unique case (op)
      OP_RTYPE: begin
        dec.dest      = rd;
        dec.reg_write = 1'b1;
        unique case (funct)
          FN_SLL:           dec.alu_op = ALU_SLL;
          FN_SRL:           dec.alu_op = ALU_SRL;
          FN_SRA:           dec.alu_op = ALU_SRA;
          FN_SLLV: begin    dec.alu_op = ALU_SLL; dec.shift_var = 1'b1; end
          FN_SRLV: begin    dec.alu_op = ALU_SRL; dec.shift_var = 1'b1; end
          FN_JR: begin      dec.jump_reg = 1'b1; dec.reg_write = 1'b0; end
          FN_BREAK: begin   dec.halt = 1'b1; dec.reg_write = 1'b0; end
          FN_ADD, FN_ADDU:  dec.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU:  dec.alu_op = ALU_SUB;
          FN_AND:           dec.alu_op = ALU_AND;
          FN_OR:            dec.alu_op = ALU_OR;
          FN_XOR:           dec.alu_op = ALU_XOR;
          FN_NOR:           dec.alu_op = ALU_NOR;
          FN_SLT:           dec.alu_op = ALU_SLT;
          FN_SLTU:          dec.alu_op = ALU_SLTU;
          default:          dec.reg_write = 1'b0;   // unsupported: no operation
        endcase
      end
      OP_SPEC2: begin
        dec.dest      = rd;
        dec.reg_write = (funct == FN_MUL);
        dec.alu_op    = ALU_MUL;
      end
      OP_ADDI, OP_ADDIU: begin dec.alu_op = ALU_ADD;  dec.imm = sext; end
      OP_SLTI:           begin dec.alu_op = ALU_SLT;  dec.imm = sext; end
      OP_SLTIU:          begin dec.alu_op = ALU_SLTU; dec.imm = sext; end
      OP_ANDI:           begin dec.alu_op = ALU_AND;  dec.imm = zext; end
      OP_ORI:            begin dec.alu_op = ALU_OR;   dec.imm = zext; end
      OP_XORI:           begin dec.alu_op = ALU_XOR;  dec.imm = zext; end
      OP_LUI:            begin dec.alu_op = ALU_LUI;  dec.imm = zext; end
      OP_LW:             begin dec.imm = sext; dec.mem_read = 1'b1; end
      OP_SW:             begin dec.imm = sext; dec.mem_write = 1'b1; end
      OP_BEQ:            begin dec.imm = sext; dec.branch = 1'b1; end
      OP_BNE:            begin dec.imm = sext; dec.branch = 1'b1; dec.branch_ne = 1'b1; end
      OP_J:              dec.jump = 1'b1;
      OP_JAL:            begin dec.jump = 1'b1; dec.link = 1'b1; dec.dest = 5'd31; dec.reg_write = 1'b1; end
      default: ;
    endcase
    // immediate-operand instructions write rt
    unique case (op)
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI, OP_LW: begin
        dec.alu_imm   = 1'b1;
        dec.dest      = rt;
        dec.reg_write = 1'b1;
      end
      OP_SW: dec.alu_imm = 1'b1;
      default: ;
    endcase
  end

  assign load_use = idex_q.valid && idex_q.mem_read && idex_q.dest != 5'd0 &&
                    ifid_q.valid && (idex_q.dest == rs || idex_q.dest == rt);

  always_comb begin
    if (redirect || load_use) idex_d = '0;    // bubble
    else                      idex_d = dec;
  end

  // ------------------------------------------------------------------ IF
  always_comb begin
    if (redirect) begin
      pc_d.pc = target;
      ifid_d  = '0;
    end else if (load_use) begin
      pc_d    = pc_q;
      ifid_d  = ifid_q;
    end else begin
      pc_d.pc      = pc_q.pc + 32'd4;
      ifid_d.valid = 1'b1;
      ifid_d.pc    = pc_q.pc;
      ifid_d.instr = imem_rdata;
    end
  end

endmodule
