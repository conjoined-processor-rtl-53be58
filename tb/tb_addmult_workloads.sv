// tb_addmult_workloads: the evaluation runs of the conjoined add-multiply
// pipeline, at its default parameters.
//
// 1. Fault campaign: three runs of 10,000 cycles, each injecting one kind of
//    fault at random places and times, every result compared with the
//    fault-free reference:
//      soft errors   100 one-cycle bit flips on either copy
//      intermittent  100 bit flips held 2..6 cycles on either copy
//      permanent     one stuck bit in the leading multiplier, held to the end
//    A fault is counted as detected when it starts a recovery (or, for the
//    stuck bit, single-pipeline mode), as masked when no recovery follows
//    and every result is still right, and as undetected when a wrong result
//    leaves the pipeline. Undetected must be 0.
// 2. Throughput run: 100,000 additions and multiplications with 10 soft or
//    timing faults per 1000 cycles. Cycles must equal the fault-free count
//    plus three per recovery. The run time is also reported for a clock
//    period of 18 ns (worst case) and 12 ns (overclocked), the periods the
//    timing analysis of this pipeline gives.
module tb_addmult_workloads;
  localparam int W  = 64;
  localparam int MR = 4;
  localparam int LAT = 4;   // take edge to the edge sampling the result

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         in_valid = 1'b0;
  logic [W-1:0] in_a = '0, in_b = '0;
  logic         in_ready;
  logic         out_valid;
  logic [W-1:0] out_p;
  logic [2*W:0] fi_l0 = '0, fi_s0 = '0;
  logic [W:0]   fi_l1 = '0, fi_s1 = '0, fi_l2 = '0, fi_s2 = '0;
  logic         single_use_s = 1'b0;
  logic l_clock_en, s_clock_en, load_sp, rec_start, recovering, single_mode, overclock_ok;
  logic [2:0] stage_err;
  logic [$clog2(MR+1)-1:0] retry_cnt;

  conjoined_addmult dut (.*);

  int checks = 0, failures = 0;

  function automatic logic [W-1:0] ref_op(logic [W-1:0] a, logic [W-1:0] b);
    logic [W-1:0] s;
    s = a + b;
    return W'(s[W-1:W/2]) * W'(s[W/2-1:0]);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------ scoreboard
  logic [W-1:0] expq[$];
  int  n_sent = 0, n_recv = 0, n_target = 0, n_wrong = 0;
  bit  took = 1'b0;
  int  cyc = 0, first_take = -1, last_out = -1;
  int  n_rec = 0, n_rec_win = 0;
  int  rec_edges[$];

  always @(posedge clk) begin
    cyc++;
    took = 1'b0;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        expq.push_back(ref_op(in_a, in_b));
        if (first_take < 0) first_take = cyc;
        n_sent++;
        took = 1'b1;
      end
      if (out_valid) begin
        logic [W-1:0] e;
        e = (expq.size() != 0) ? expq.pop_front() : ~out_p;
        checks++;
        if (out_p != e) begin
          n_wrong++;
          failures++;
          $display("FAIL t=%0t result %0d: got %h expected %h", $time, n_recv, out_p, e);
        end
        last_out = cyc;
        n_recv++;
      end
      if (rec_start) begin
        n_rec++;
        rec_edges.push_back(cyc);
      end
    end
  end

  always @(negedge clk) begin
    if ((took || !in_valid) && n_sent < n_target) begin
      in_valid = 1'b1;
      in_a = {$urandom, $urandom};
      in_b = {$urandom, $urandom};
    end else if (took) begin
      in_valid = 1'b0;
    end
  end

  // ----------------------------------------------------------------- faults
  // kind 0: none; 1: soft (1 cycle); 2: intermittent (2..6 cycles);
  // 3: stuck bit; 4: soft or timing, for the throughput run
  int  kind = 0;
  int  per_mille = 0;
  int  n_inj = 0;               // faults started
  int  n_det = 0;               // faults followed by a recovery
  int  active_left = 0;         // cycles the current fault still lasts
  int  watch_left = 0;          // cycles left to see its recovery
  int  f_stage, f_side, f_bit;
  bit  seen_rec = 1'b0;
  bit  prev_l_en = 1'b1;

  task automatic set_fault(int stage, int side, int bitn);
    case ({stage[1:0], side[0]})
      3'b000: fi_l0[bitn % (2*W+1)] = 1'b1;
      3'b001: fi_s0[bitn % (2*W+1)] = 1'b1;
      3'b010: fi_l1[bitn % (W+1)]   = 1'b1;
      3'b011: fi_s1[bitn % (W+1)]   = 1'b1;
      3'b100: fi_l2[bitn % (W+1)]   = 1'b1;
      default: fi_s2[bitn % (W+1)]  = 1'b1;
    endcase
  endtask

  always @(negedge clk) begin
    fi_l0 = '0; fi_s0 = '0; fi_l1 = '0; fi_s1 = '0; fi_l2 = '0; fi_s2 = '0;
    if (rec_start) seen_rec = 1'b1;
    if (watch_left > 0) begin
      watch_left--;
      if (watch_left == 0 && seen_rec) n_det++;
    end
    if (kind == 3) begin
      fi_l2[11] = 1'b1;
    end else if (kind != 0) begin
      if (active_left == 0 && watch_left == 0 && int'($urandom % 1000) < per_mille) begin
        f_stage = int'($urandom % 3);
        f_side  = int'($urandom % 2);
        f_bit   = int'($urandom % 4096);
        // a timing error hits only the leading copy, and only when its
        // logic had a single cycle to settle
        if (kind == 4 && $urandom % 2 == 0) f_side = 0;
        if (!(kind == 4 && f_side == 0 && !prev_l_en)) begin
          active_left = (kind == 2) ? 2 + int'($urandom % 5) : 1;
          n_inj++;
          seen_rec = 1'b0;
        end
      end
      if (active_left > 0) begin
        set_fault(f_stage, f_side, f_bit);
        active_left--;
        if (active_left == 0) watch_left = 3;
      end
    end
    prev_l_en = l_clock_en;
  end

  // ----------------------------------------------------------------- runs
  task automatic do_reset();
    kind = 0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    n_sent = 0; n_recv = 0; n_target = 0; n_inj = 0; n_det = 0; n_wrong = 0;
    active_left = 0; watch_left = 0; n_rec = 0;
    first_take = -1; last_out = -1;
    rec_edges.delete();
    expq.delete();
    rst_n = 1'b1;
  endtask

  // Fault campaign run: feed operations for `cycles` cycles.
  task automatic campaign(string name, int k, int rate, int cycles);
    do_reset();
    single_use_s = (k == 3);
    n_target = 1 << 30;
    kind = k; per_mille = rate;
    repeat (cycles) @(posedge clk);
    kind = 0;
    n_target = n_sent;
    while (expq.size() != 0) @(posedge clk);
    repeat (8) @(posedge clk);
    if (k == 3) begin
      n_inj = 1;
      n_det = single_mode ? 1 : 0;
    end
    $display("%-13s injected=%0d detected=%0d masked=%0d undetected=%0d recoveries=%0d results=%0d%s",
             name, n_inj, n_det, n_inj - n_det, n_wrong, n_rec, n_recv,
             single_mode ? " (single-pipeline mode)" : "");
  endtask

  int elapsed, cyc_ft;

  initial begin
    // 1. fault campaign
    campaign("soft error", 1, 10, 10000);
    check(n_inj > 50, "soft errors injected");
    check(n_det == n_inj, "every soft error detected");
    check(!single_mode, "soft errors do not end in single mode");
    campaign("intermittent", 2, 10, 10000);
    check(n_inj > 50, "intermittent faults injected");
    check(n_det == n_inj, "every intermittent fault detected");
    campaign("permanent", 3, 0, 10000);
    check(single_mode && n_det == 1, "permanent fault detected: single-pipeline mode");
    check(n_rec == MR + 1, $sformatf("permanent fault: %0d recoveries", n_rec));

    // 2. throughput run
    do_reset();
    single_use_s = 1'b0;
    n_target = 100000;
    kind = 4; per_mille = 10;
    while (n_recv < 100000) @(posedge clk);
    #1;
    kind = 0;
    elapsed = last_out - first_take;
    n_rec_win = 0;
    foreach (rec_edges[i]) if (rec_edges[i] > first_take && rec_edges[i] < last_out) n_rec_win++;
    check(n_recv == 100000 && expq.size() == 0, "all 100000 results");
    check(elapsed == (100000 - 1 + LAT) + 3 * n_rec_win,
          $sformatf("%0d cycles with %0d recoveries", elapsed, n_rec_win));
    check(n_rec_win > 500, "faults injected at about 10 per 1000 cycles");
    cyc_ft = elapsed;
    $display("throughput: 100000 operations in %0d cycles, %0d recoveries; %0d ns at 18 ns, %0d ns at 12 ns",
             elapsed, n_rec_win, elapsed * 18, elapsed * 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
