// tb_conjoined_mips: runs test programs on the conjoined MIPS pipeline and
// checks the data memory they leave against results computed here.
//
// For each program (ALU test, Fibonacci, LCG random numbers, 10x10 matrix
// multiply): a fault-free run, then a run with random soft errors (either
// copy) and timing errors (leading copy, never on the capture after a
// stall). The faulty run must leave the same memory contents and take
// exactly three cycles more per recovery. Then the Fibonacci program under
// intermittent faults (recovery retried), and the matrix multiply with a
// stuck bit in the leading ID/EX logic (single-pipeline mode fed from the
// shadow logic, results still right).
// Mechanisms counted, each must occur: recovery, retry, L stall, single
// mode, load-use hold, taken branch/jump, forwarding.
module tb_conjoined_mips;
  import mips_asm_pkg::*;

  localparam int MR     = 4;
  localparam int RAND_N = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        imem_we = 1'b0;
  logic [9:0]  imem_waddr = '0;
  logic [31:0] imem_wdata = '0;
  logic [13:0] dbg_addr = '0;
  logic [31:0] dbg_rdata;
  logic        halted;
  logic [31:0] instret;
  logic [4:0]  fi_l_en = '0, fi_s_en = '0;
  logic [7:0]  fi_bit = '0;
  logic        single_use_s = 1'b0;
  logic l_clock_en, s_clock_en, load_sp, rec_start, recovering, single_mode, overclock_ok;
  logic [4:0] stage_err;
  logic [$clog2(MR+1)-1:0] retry_cnt;
  logic ev_load_use, ev_redirect, ev_forward;

  conjoined_mips dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------- counters
  int n_rec = 0, n_retry = 0, n_stall = 0, n_lu = 0, n_redir = 0, n_fwd = 0;
  int run_rec = 0, run_cyc = 0;

  always @(posedge clk) if (rst_n && !halted) begin
    run_cyc++;
    if (rec_start) begin
      n_rec++; run_rec++;
      if (retry_cnt != 0) n_retry++;
    end
    if (!l_clock_en) n_stall++;
    if (l_clock_en && !load_sp) begin
      if (ev_load_use) n_lu++;
      if (ev_redirect) n_redir++;
      if (ev_forward)  n_fwd++;
    end
  end

  // --------------------------------------------------------------- faults
  int fkind = 0, frate = 0, im_left = 0;
  bit prev_l_en = 1'b1;

  // The masks are built in locals and driven once per cycle.
  always @(negedge clk) begin
    automatic logic [4:0] ml = '0, ms = '0;
    automatic int k = int'($urandom % 5);
    case (fkind)
      1: if (int'($urandom % 1000) < frate) begin
           fi_bit = 8'($urandom);
           if ($urandom % 2 == 0) begin
             if (prev_l_en) ml[k] = 1'b1;                      // timing error
           end else if ($urandom % 2 == 0) ml[k] = 1'b1;
           else ms[k] = 1'b1;
         end
      2: begin
           if (im_left == 0 && int'($urandom % 1000) < frate) begin
             im_left = 2 + int'($urandom % 5);
             fi_bit = 8'($urandom);
           end
           if (im_left > 0) begin
             ml[int'(fi_bit) % 5] = 1'b1;
             im_left--;
           end
         end
      3: begin
           fi_bit = 8'd37;
           ml[2] = 1'b1;
         end
      default: ;
    endcase
    fi_l_en = ml; fi_s_en = ms;
    prev_l_en = l_clock_en;
  end

  // ----------------------------------------------------------------- runs
  task automatic run_prog(int kind, int rate, int max_cycles, output int cycles, output int recs);
    rst_n = 1'b0;
    fkind = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      imem_we = 1'b1;
      imem_waddr = 10'(i);
      imem_wdata = (i < prog.size()) ? prog[i] : 32'd0;
    end
    @(negedge clk);
    imem_we = 1'b0;
    run_rec = 0; run_cyc = 0;
    rst_n = 1'b1;
    fkind = kind; frate = rate;
    while (!halted && run_cyc < max_cycles) @(posedge clk);
    fkind = 0;
    cycles = run_cyc;
    recs = run_rec;
    check(halted, "program reached BREAK");
    @(negedge clk);
  endtask

  task automatic read_mem(int byte_addr, output logic [31:0] v);
    dbg_addr = 14'(byte_addr / 4);
    #1;
    v = dbg_rdata;
  endtask

  task automatic check_alu(string tag, int var_);
    logic [31:0] v;
    for (int k = 0; k < 20; k++) begin
      read_mem(4 * k, v);
      check(v == alu_expect(k, var_), $sformatf("%s alu result %0d: %h expected %h", tag, k, v, alu_expect(k, var_)));
    end
  endtask

  task automatic check_fib(string tag, int n, int var_);
    logic [31:0] v;
    for (int k = 0; k < n; k++) begin
      read_mem('h400 + 4 * k, v);
      check(v == fib_expect(k, var_), $sformatf("%s F(%0d) = %0d expected %0d", tag, k, v, fib_expect(k, var_)));
    end
  endtask

  task automatic check_rand(string tag, int n, int var_);
    logic [31:0] v, x;
    x = 32'(var_);
    for (int k = 0; k < n; k++) begin
      x = rand_next(x);
      read_mem('h1000 + 4 * k, v);
      check(v == x, $sformatf("%s rand %0d = %h expected %h", tag, k, v, x));
    end
  endtask

  task automatic check_matmul(string tag, int var_);
    logic [31:0] v;
    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 10; j++) begin
        read_mem('hC400 + 4 * (10 * i + j), v);
        check(v == matmul_expect(i, j, var_), $sformatf("%s C[%0d][%0d] = %0d expected %0d", tag, i, j, v, matmul_expect(i, j, var_)));
      end
  endtask

  int c0, c1, r0, r1;

  // The faulty run goes first, into memory that no earlier run has written
  // with these values; the clean run uses another program variant.
  task automatic load_variant(int which, int var_);
    case (which)
      0: prog_alu(var_);
      1: prog_fib(45, var_);
      2: prog_rand(RAND_N, var_);
      default: prog_matmul(var_);
    endcase
  endtask

  task automatic check_variant(int which, string tag, int var_);
    case (which)
      0: check_alu(tag, var_);
      1: check_fib(tag, 45, var_);
      2: check_rand(tag, RAND_N, var_);
      default: check_matmul(tag, var_);
    endcase
  endtask

  task automatic pair(string name, int which);
    load_variant(which, 1);
    run_prog(1, 20, 200000, c1, r1);
    check_variant(which, {name, " faulty"}, 1);
    load_variant(which, 2);
    run_prog(0, 0, 200000, c0, r0);
    check_variant(which, {name, " clean"}, 2);
    check(r0 == 0, "no recovery without faults");
    check(c1 == c0 + 3 * r1, $sformatf("%s: %0d cycles clean, %0d with %0d recoveries", name, c0, c1, r1));
    $display("%-7s clean %0d cycles; with faults %0d cycles, %0d recoveries", name, c0, c1, r1);
  endtask

  initial begin
    pair("alu", 0);
    pair("fib", 1);
    pair("rand", 2);
    pair("matmul", 3);

    // intermittent faults
    prog_fib(45, 3);
    run_prog(2, 30, 200000, c1, r1);
    check_fib("fib intermittent", 45, 3);
    check(!single_mode, "intermittent faults do not end in single mode");

    // permanent fault in the leading ID/EX logic
    prog_matmul(3);
    single_use_s = 1'b1;
    run_prog(3, 0, 200000, c1, r1);
    check(single_mode, "stuck fault ends in single-pipeline mode");
    check(r1 == MR + 1, $sformatf("recoveries before single mode: %0d", r1));
    check_matmul("matmul single mode", 3);
    single_use_s = 1'b0;

    $display("mechanisms: recoveries=%0d retries=%0d stall_cycles=%0d load_use=%0d redirects=%0d forwards=%0d",
             n_rec, n_retry, n_stall, n_lu, n_redir, n_fwd);
    check(n_rec > 0,   "mechanism: recovery");
    check(n_retry > 0, "mechanism: retry");
    check(n_stall > 0, "mechanism: L stall");
    check(n_lu > 0,    "mechanism: load-use hold");
    check(n_redir > 0, "mechanism: branch/jump redirect");
    check(n_fwd > 0,   "mechanism: forwarding");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
