// mips_asm_pkg: instruction encoders and test programs for the conjoined
// MIPS pipeline testbenches, with the expected results of each program
// worked out here in plain SystemVerilog.
//
// Programs (byte addresses in the data memory):
//   alu     exercises every ALU operation, BEQ, J, and stores 20 results at
//           0x0; one operand is 5 + v
//   fib     stores the first n numbers of the Fibonacci recurrence started
//           from (a0, 1) at 0x400 (a0 = 0 gives F(0)..F(n-1))
//   rand    stores n numbers of the LCG x = x * 1103515245 + 12345 from the
//           given seed at 0x1000
//   matmul  a subroutine (JAL / JR) fills A[k] = k + a0 and B[k] = 2k + 3
//           (k = 0..99) at 0xC000 and 0xC200, then C = A x B as 10 x 10
//           matrices is stored at 0xC400; its inner loop has a load-use
//           hazard
// Every program ends with BREAK. The variant arguments let successive runs
// leave different results, so that no run can pass on an earlier run's data.
package mips_asm_pkg;

  logic [31:0] prog [$];

  function automatic logic [31:0] r_type(int fn, int rs, int rt, int rd, int sh);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic logic [31:0] i_type(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] j_type(int op, int word_addr);
    return {6'(op), 26'(word_addr)};
  endfunction

  function automatic void emit(logic [31:0] w);
    prog.push_back(w);
  endfunction
  function automatic int here();
    return prog.size();
  endfunction
  // branch at index `at` to index `to`
  function automatic void patch_branch(int at, int to);
    prog[at][15:0] = 16'(to - at - 1);
  endfunction

  function automatic void addiu(int rt, int rs, int imm); emit(i_type('h09, rs, rt, imm)); endfunction
  function automatic void ori  (int rt, int rs, int imm); emit(i_type('h0D, rs, rt, imm)); endfunction
  function automatic void lui  (int rt, int imm);         emit(i_type('h0F, 0, rt, imm));  endfunction
  function automatic void lw   (int rt, int off, int rs); emit(i_type('h23, rs, rt, off)); endfunction
  function automatic void sw   (int rt, int off, int rs); emit(i_type('h2B, rs, rt, off)); endfunction
  function automatic void addu (int rd, int rs, int rt);  emit(r_type('h21, rs, rt, rd, 0)); endfunction
  function automatic void mul  (int rd, int rs, int rt);  emit({6'h1C, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h02}); endfunction
  function automatic void sll  (int rd, int rt, int sh);  emit(r_type('h00, 0, rt, rd, sh)); endfunction
  function automatic void brk  ();                        emit(r_type('h0D, 0, 0, 0, 0)); endfunction
  // backward branch to index `to`
  function automatic void bne_to(int rs, int rt, int to);
    emit(i_type('h05, rs, rt, 0));
    patch_branch(here() - 1, to);
  endfunction

  // ------------------------------------------------------------- alu test
  function automatic void prog_alu(int v);
    int b, j;
    prog.delete();
    lui(1, 'h8000); ori(1, 1, 'h0010);            // r1 = 0x80000010
    addiu(2, 0, -3);                              // r2 = -3
    addiu(3, 0, 5 + v);                           // r3 = 5 + v
    emit(r_type('h23, 3, 2, 4, 0));               // subu r4 = r3 - r2
    emit(r_type('h24, 1, 2, 5, 0));               // and
    emit(r_type('h25, 1, 3, 6, 0));               // or
    emit(r_type('h26, 1, 2, 7, 0));               // xor
    emit(r_type('h27, 1, 3, 8, 0));               // nor
    emit(r_type('h2A, 2, 3, 9, 0));               // slt
    emit(r_type('h2B, 2, 3, 10, 0));              // sltu
    emit(r_type('h03, 0, 1, 11, 4));              // sra
    emit(r_type('h02, 0, 1, 12, 4));              // srl
    emit(r_type('h00, 0, 3, 13, 3));              // sll
    emit(r_type('h04, 3, 3, 14, 0));              // sllv
    emit(r_type('h06, 3, 1, 15, 0));              // srlv
    emit(i_type('h0A, 2, 16, -2));                // slti
    emit(i_type('h0B, 3, 17, 4));                 // sltiu
    emit(i_type('h0C, 2, 18, 'hFF));              // andi
    emit(i_type('h0E, 3, 19, 'hF0));              // xori
    mul(20, 2, 3);                                // mul
    b = here(); emit(i_type('h04, 3, 3, 0));      // beq taken
    addiu(21, 0, 99);                             // skipped
    patch_branch(b, here());
    addiu(22, 0, 7);
    j = here(); emit(0);                          // j over
    addiu(23, 0, 99);                             // skipped
    prog[j] = j_type('h02, here());
    for (int r = 4; r <= 23; r++) sw(r, 4 * (r - 4), 0);
    brk();
  endfunction

  function automatic logic [31:0] alu_expect(int idx, int v);
    logic [31:0] r1, r2, r3;
    r1 = 32'h8000_0010; r2 = 32'hFFFF_FFFD; r3 = 32'(5 + v);
    case (idx + 4)
      4:  return r3 - r2;
      5:  return r1 & r2;
      6:  return r1 | r3;
      7:  return r1 ^ r2;
      8:  return ~(r1 | r3);
      9:  return 32'd1;                   // -3 < r3 signed
      10: return 32'd0;                   // 0xFFFFFFFD < r3 unsigned: no
      11: return 32'hF800_0001;
      12: return 32'h0800_0001;
      13: return r3 << 3;
      14: return r3 << r3[4:0];
      15: return r1 >> r3[4:0];
      16: return 32'd1;
      17: return 32'd0;
      18: return 32'h0000_00FD;
      19: return r3 ^ 32'h0000_00F0;
      20: return r2 * r3;
      21: return 32'd0;                   // skipped by BEQ
      22: return 32'd7;
      default: return 32'd0;              // 23: skipped by J
    endcase
  endfunction

  // ------------------------------------------------------------ fibonacci
  function automatic void prog_fib(int n, int a0);
    int loop;
    prog.delete();
    addiu(1, 0, a0); addiu(2, 0, 1); addiu(3, 0, 0); addiu(4, 0, n);
    addiu(5, 0, 'h400);
    loop = here();
    sw(1, 0, 5);
    addu(6, 1, 2); addu(1, 2, 0); addu(2, 6, 0);
    addiu(5, 5, 4); addiu(3, 3, 1);
    bne_to(3, 4, loop);
    brk();
  endfunction

  function automatic logic [31:0] fib_expect(int k, int a0);
    logic [31:0] a, b, t;
    a = 32'(a0); b = 1;
    for (int i = 0; i < k; i++) begin t = a + b; a = b; b = t; end
    return a;
  endfunction

  // --------------------------------------------------------------- random
  function automatic void prog_rand(int n, int seed);
    int loop;
    prog.delete();
    lui(7, 'h41C6); ori(7, 7, 'h4E6D);
    addiu(8, 0, 12345);
    addiu(1, 0, seed);
    addiu(3, 0, 0);
    lui(4, n >> 16); ori(4, 4, n & 'hFFFF);
    addiu(5, 0, 'h1000);
    loop = here();
    mul(1, 1, 7); addu(1, 1, 8);
    sw(1, 0, 5);
    addiu(5, 5, 4); addiu(3, 3, 1);
    bne_to(3, 4, loop);
    brk();
  endfunction

  // n-th stored number (n from 0)
  function automatic logic [31:0] rand_next(logic [31:0] x);
    return x * 32'd1103515245 + 32'd12345;
  endfunction

  // ------------------------------------------------------ matrix multiply
  function automatic void prog_matmul(int a0);
    int call, init, iloop, jloop, kloop;
    prog.delete();
    call = here(); emit(0);                       // jal init
    addiu(13, 0, 10);
    addiu(1, 0, 0);
    iloop = here();
    addiu(2, 0, 0);
    jloop = here();
    addiu(3, 0, 0); addiu(14, 0, 0);
    mul(15, 1, 13); sll(15, 15, 2); ori(16, 0, 'hC000); addu(15, 15, 16);
    sll(17, 2, 2); ori(16, 0, 'hC200); addu(17, 17, 16);
    kloop = here();
    lw(18, 0, 15); lw(19, 0, 17);
    mul(20, 18, 19);                              // uses the load just before
    addu(14, 14, 20);
    addiu(15, 15, 4); addiu(17, 17, 40); addiu(3, 3, 1);
    bne_to(3, 13, kloop);
    mul(21, 1, 13); addu(21, 21, 2); sll(21, 21, 2); ori(16, 0, 'hC400); addu(21, 21, 16);
    sw(14, 0, 21);
    addiu(2, 2, 1);
    bne_to(2, 13, jloop);
    addiu(1, 1, 1);
    bne_to(1, 13, iloop);
    brk();
    // subroutine: fill A and B
    init = here();
    prog[call] = j_type('h03, init);
    addiu(3, 0, 0); addiu(4, 0, 100); ori(9, 0, 'hC000); ori(10, 0, 'hC200);
    begin
      int l;
      l = here();
      addiu(11, 3, a0); sw(11, 0, 9);
      sll(12, 3, 1); addiu(12, 12, 3); sw(12, 0, 10);
      addiu(9, 9, 4); addiu(10, 10, 4); addiu(3, 3, 1);
      bne_to(3, 4, l);
    end
    emit(r_type('h08, 31, 0, 0, 0));              // jr r31
  endfunction

  function automatic logic [31:0] matmul_expect(int i, int j, int a0);
    logic [31:0] acc;
    acc = 0;
    for (int k = 0; k < 10; k++) acc += 32'(10 * i + k + a0) * 32'(2 * (10 * k + j) + 3);
    return acc;
  endfunction

endpackage
