// tb_conjoined_top: end-to-end run of both conjoined designs at their
// default sizes, side by side and at the same time.
//
// Add-multiply pipeline (am_*):
//   * 100,000 random 64-bit additions and multiplications with soft and
//     timing faults at 10 per 1000 cycles; every result is compared with a
//     reference, and the run must take the fault-free cycle count plus
//     three cycles per recovery.
//   * then a stuck bit in the leading stage-2 logic: MAX_RETRY+1 recoveries,
//     single-pipeline mode fed from the shadow copy, 1000 more results right.
// MIPS pipeline (mp_*): the three microbenchmarks (first 45 Fibonacci
//   numbers, 10000 LCG random numbers, 10x10 matrix multiply), each once
//   without faults and once with faults at 10 per 1000 cycles; the data
//   memory is checked, and the faulty run must take three cycles more per
//   recovery. Then the matrix multiply with a stuck bit in the leading
//   ID/EX logic, which ends in single-pipeline mode with correct results.
// Mechanisms counted, each must occur in both designs: recovery, retry,
// L stall, single-pipeline mode; in the MIPS also load-use hold, taken
// branch/jump and forwarding.
module tb_conjoined_top;
  import mips_asm_pkg::*;

  localparam int W      = 64;
  localparam int MR     = 4;
  localparam int LAT    = 4;       // take edge to the edge sampling the result
  localparam int AM_OPS = 100000;
  localparam int RAND_N = 10000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  // add-multiply side
  logic         am_rst_n = 1'b0;
  logic         am_in_valid = 1'b0;
  logic [W-1:0] am_in_a = '0, am_in_b = '0;
  logic         am_in_ready, am_out_valid;
  logic [W-1:0] am_out_p;
  logic [2*W:0] am_fi_l0 = '0, am_fi_s0 = '0;
  logic [W:0]   am_fi_l1 = '0, am_fi_s1 = '0, am_fi_l2 = '0, am_fi_s2 = '0;
  logic         am_single_use_s = 1'b0;
  logic am_l_clock_en, am_s_clock_en, am_load_sp, am_rec_start, am_recovering;
  logic am_single_mode, am_overclock_ok;
  logic [2:0] am_stage_err;
  logic [$clog2(MR+1)-1:0] am_retry_cnt;

  // MIPS side
  logic        mp_rst_n = 1'b0;
  logic        mp_imem_we = 1'b0;
  logic [9:0]  mp_imem_waddr = '0;
  logic [31:0] mp_imem_wdata = '0;
  logic [13:0] mp_dbg_addr = '0;
  logic [31:0] mp_dbg_rdata, mp_instret;
  logic        mp_halted;
  logic [4:0]  mp_fi_l_en = '0, mp_fi_s_en = '0;
  logic [7:0]  mp_fi_bit = '0;
  logic        mp_single_use_s = 1'b0;
  logic mp_l_clock_en, mp_s_clock_en, mp_load_sp, mp_rec_start, mp_recovering;
  logic mp_single_mode, mp_overclock_ok;
  logic [4:0] mp_stage_err;
  logic [$clog2(MR+1)-1:0] mp_retry_cnt;
  logic mp_ev_load_use, mp_ev_redirect, mp_ev_forward;

  conjoined_top dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // ====================================================== add-multiply side
  function automatic logic [W-1:0] ref_op(logic [W-1:0] a, logic [W-1:0] b);
    logic [W-1:0] s;
    s = a + b;
    return W'(s[W-1:W/2]) * W'(s[W/2-1:0]);
  endfunction

  logic [W-1:0] expq[$];
  int  am_sent = 0, am_recv = 0, am_target = 0;
  bit  am_took = 1'b0;
  int  am_cyc = 0, first_take = -1, last_out = -1;
  int  am_rec = 0, am_retry = 0, am_stall = 0, am_single = 0;
  int  rec_edges[$];

  always @(posedge clk) begin
    am_cyc++;
    am_took = 1'b0;
    if (am_rst_n) begin
      if (am_in_valid && am_in_ready) begin
        expq.push_back(ref_op(am_in_a, am_in_b));
        if (first_take < 0) first_take = am_cyc;
        am_sent++;
        am_took = 1'b1;
      end
      if (am_out_valid) begin
        logic [W-1:0] e;
        e = (expq.size() != 0) ? expq.pop_front() : ~am_out_p;
        checks++;
        if (am_out_p != e) begin
          failures++;
          $display("FAIL t=%0t add-mult result %0d: got %h expected %h", $time, am_recv, am_out_p, e);
        end
        last_out = am_cyc;
        am_recv++;
      end
      if (am_rec_start) begin
        am_rec++;
        rec_edges.push_back(am_cyc);
        if (am_retry_cnt != 0) am_retry++;
      end
      if (!am_l_clock_en) am_stall++;
      if (am_single_mode) am_single++;
    end
  end

  always @(negedge clk) begin
    if ((am_took || !am_in_valid) && am_sent < am_target) begin
      am_in_valid = 1'b1;
      am_in_a = {$urandom, $urandom};
      am_in_b = {$urandom, $urandom};
    end else if (am_took) begin
      am_in_valid = 1'b0;
    end
  end

  // kind 0: none; 1: soft or timing at am_rate per mille; 2: stuck bit
  int am_kind = 0, am_rate = 0;
  bit am_prev_l_en = 1'b1;

  always @(negedge clk) begin
    automatic logic [2*W:0] m0 = '0;
    automatic logic [W:0]   m1 = '0;
    automatic int stage = int'($urandom % 3);
    automatic int side  = int'($urandom % 2);
    automatic int bitn  = int'($urandom % 4096);
    automatic bit fire  = int'($urandom % 1000) < am_rate;
    am_fi_l0 = '0; am_fi_s0 = '0; am_fi_l1 = '0; am_fi_s1 = '0; am_fi_l2 = '0; am_fi_s2 = '0;
    if (am_kind == 2) begin
      am_fi_l2 = (W+1)'(1) << 11;
    end else if (am_kind == 1 && fire) begin
      // half of the faults are timing errors: leading copy only, and never
      // on the capture right after a stall
      if ($urandom % 2 == 0) side = 0;
      if (!(side == 0 && !am_prev_l_en)) begin
        m0 = (2*W+1)'(1) << (bitn % (2*W+1));
        m1 = (W+1)'(1) << (bitn % (W+1));
        case ({2'(stage), 1'(side)})
          3'b000:  am_fi_l0 = m0;
          3'b001:  am_fi_s0 = m0;
          3'b010:  am_fi_l1 = m1;
          3'b011:  am_fi_s1 = m1;
          3'b100:  am_fi_l2 = m1;
          default: am_fi_s2 = m1;
        endcase
      end
    end
    am_prev_l_en = am_l_clock_en;
  end

  bit am_done = 1'b0;
  int elapsed, n_rec_win;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    am_rst_n = 1'b1;
    am_target = AM_OPS;
    am_kind = 1; am_rate = 10;
    while (am_recv < AM_OPS) @(posedge clk);
    #1;
    am_kind = 0;
    elapsed = last_out - first_take;
    n_rec_win = 0;
    foreach (rec_edges[i]) if (rec_edges[i] > first_take && rec_edges[i] < last_out) n_rec_win++;
    check(am_recv == AM_OPS && expq.size() == 0, "add-mult: all results");
    check(elapsed == (AM_OPS - 1 + LAT) + 3 * n_rec_win,
          $sformatf("add-mult: %0d cycles with %0d recoveries", elapsed, n_rec_win));
    check(n_rec_win > AM_OPS / 200, "add-mult: faults at about 10 per 1000 cycles");
    $display("add-mult: %0d operations in %0d cycles, %0d recoveries (%0d ns at 18 ns, %0d ns at 12 ns)",
             AM_OPS, elapsed, n_rec_win, elapsed * 18, elapsed * 12);
    // execution time of the three ways to run: unprotected at the
    // worst-case period, protected at the worst-case period, protected and
    // overclocked
    $display("add-mult execution time: no fault tolerance %0d ns, fault tolerance %0d ns, fault tolerance + overclocking %0d ns (%0d%% faster than unprotected)",
             (AM_OPS - 1 + LAT) * 18, elapsed * 18, elapsed * 12,
             100 - (100 * elapsed * 12) / ((AM_OPS - 1 + LAT) * 18));
    // permanent fault
    @(negedge clk);
    am_rec = 0;
    am_single_use_s = 1'b1;
    am_kind = 2;
    am_target = AM_OPS + 1000;
    while (am_recv < AM_OPS + 1000) @(posedge clk);
    #1;
    check(am_single_mode && !am_overclock_ok, "add-mult: stuck fault ends in single-pipeline mode");
    check(am_rec == MR + 1, $sformatf("add-mult: %0d recoveries before single mode", am_rec));
    check(expq.size() == 0, "add-mult: results after the stuck fault");
    am_done = 1'b1;
  end

  // ============================================================= MIPS side
  int mp_rec = 0, mp_retry = 0, mp_stall = 0, mp_single = 0;
  int mp_lu = 0, mp_redir = 0, mp_fwd = 0;
  int run_rec = 0, run_cyc = 0;

  always @(posedge clk) if (mp_rst_n && !mp_halted) begin
    run_cyc++;
    if (mp_rec_start) begin
      mp_rec++; run_rec++;
      if (mp_retry_cnt != 0) mp_retry++;
    end
    if (!mp_l_clock_en) mp_stall++;
    if (mp_single_mode) mp_single++;
    if (mp_l_clock_en && !mp_load_sp) begin
      if (mp_ev_load_use) mp_lu++;
      if (mp_ev_redirect) mp_redir++;
      if (mp_ev_forward)  mp_fwd++;
    end
  end

  // kind 0: none; 1: soft or timing at mp_rate per mille; 2: stuck bit
  int mp_kind = 0, mp_rate = 0;
  bit mp_prev_l_en = 1'b1;

  always @(negedge clk) begin
    automatic logic [4:0] ml = '0, ms = '0;
    automatic int k = int'($urandom % 5);
    case (mp_kind)
      1: if (int'($urandom % 1000) < mp_rate) begin
           mp_fi_bit = 8'($urandom);
           if ($urandom % 2 == 0) begin
             if (mp_prev_l_en) ml[k] = 1'b1;                   // timing error
           end else if ($urandom % 2 == 0) ml[k] = 1'b1;
           else ms[k] = 1'b1;
         end
      2: begin
           mp_fi_bit = 8'd37;
           ml[2] = 1'b1;
         end
      default: ;
    endcase
    mp_fi_l_en = ml; mp_fi_s_en = ms;
    mp_prev_l_en = mp_l_clock_en;
  end

  task automatic mp_run(int kind, int rate, output int cycles, output int recs);
    mp_rst_n = 1'b0;
    mp_kind = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      mp_imem_we = 1'b1;
      mp_imem_waddr = 10'(i);
      mp_imem_wdata = (i < prog.size()) ? prog[i] : 32'd0;
    end
    @(negedge clk);
    mp_imem_we = 1'b0;
    run_rec = 0; run_cyc = 0;
    mp_rst_n = 1'b1;
    mp_kind = kind; mp_rate = rate;
    while (!mp_halted && run_cyc < 400000) @(posedge clk);
    mp_kind = 0;
    cycles = run_cyc;
    recs = run_rec;
    check(mp_halted, "MIPS program reached BREAK");
    @(negedge clk);
  endtask

  task automatic read_mem(int byte_addr, output logic [31:0] v);
    mp_dbg_addr = 14'(byte_addr / 4);
    #1;
    v = mp_dbg_rdata;
  endtask

  task automatic load_bench(int which, int var_);
    case (which)
      0: prog_fib(45, var_);
      1: prog_rand(RAND_N, var_);
      default: prog_matmul(var_);
    endcase
  endtask

  task automatic check_bench(int which, string tag, int var_);
    logic [31:0] v, x;
    case (which)
      0: for (int k = 0; k < 45; k++) begin
           read_mem('h400 + 4 * k, v);
           check(v == fib_expect(k, var_), $sformatf("%s F(%0d) = %0d", tag, k, v));
         end
      1: begin
           x = 32'(var_);
           for (int k = 0; k < RAND_N; k++) begin
             x = rand_next(x);
             read_mem('h1000 + 4 * k, v);
             check(v == x, $sformatf("%s rand %0d = %h expected %h", tag, k, v, x));
           end
         end
      default:
        for (int i = 0; i < 10; i++)
          for (int j = 0; j < 10; j++) begin
            read_mem('hC400 + 4 * (10 * i + j), v);
            check(v == matmul_expect(i, j, var_), $sformatf("%s C[%0d][%0d] = %0d", tag, i, j, v));
          end
    endcase
  endtask

  bit mp_done = 1'b0;
  int c0, c1, r0, r1;
  string bname[3] = '{"fibonacci", "random", "matmul"};

  initial begin
    for (int b = 0; b < 3; b++) begin
      load_bench(b, 1);                 // faulty run first, fresh memory
      mp_run(1, 10, c1, r1);
      check_bench(b, {bname[b], " with faults"}, 1);
      load_bench(b, 2);
      mp_run(0, 0, c0, r0);
      check_bench(b, {bname[b], " fault free"}, 2);
      check(r0 == 0, "MIPS: no recovery without faults");
      check(c1 == c0 + 3 * r1, $sformatf("%s: %0d cycles fault free, %0d with %0d recoveries",
                                         bname[b], c0, c1, r1));
      $display("MIPS %-9s: %0d cycles fault free; %0d cycles with %0d recoveries (%0d ns at 18 ns, %0d ns at 12 ns)",
               bname[b], c0, c1, r1, c0 * 18, c1 * 12);
    end
    // permanent fault
    prog_matmul(3);
    mp_single_use_s = 1'b1;
    mp_run(2, 0, c1, r1);
    check(mp_single_mode && !mp_overclock_ok, "MIPS: stuck fault ends in single-pipeline mode");
    check(r1 == MR + 1, $sformatf("MIPS: %0d recoveries before single mode", r1));
    check_bench(2, "matmul single mode", 3);
    mp_done = 1'b1;
  end

  // ============================================================== summary
  initial begin
    wait (am_done && mp_done);
    $display("add-mult mechanisms: recoveries=%0d retries=%0d stall_cycles=%0d single_mode_cycles=%0d",
             am_rec, am_retry, am_stall, am_single);
    $display("MIPS mechanisms: recoveries=%0d retries=%0d stall_cycles=%0d single_mode_cycles=%0d load_use=%0d redirects=%0d forwards=%0d",
             mp_rec, mp_retry, mp_stall, mp_single, mp_lu, mp_redir, mp_fwd);
    check(am_rec > 0,    "mechanism: add-mult recovery");
    check(am_retry > 0,  "mechanism: add-mult retry");
    check(am_stall > 0,  "mechanism: add-mult L stall");
    check(am_single > 0, "mechanism: add-mult single-pipeline mode");
    check(mp_rec > 0,    "mechanism: MIPS recovery");
    check(mp_retry > 0,  "mechanism: MIPS retry");
    check(mp_stall > 0,  "mechanism: MIPS L stall");
    check(mp_single > 0, "mechanism: MIPS single-pipeline mode");
    check(mp_lu > 0,     "mechanism: MIPS load-use hold");
    check(mp_redir > 0,  "mechanism: MIPS branch/jump redirect");
    check(mp_fwd > 0,    "mechanism: MIPS forwarding");
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
