// tb_conjoined_addmult: end-to-end test of the conjoined add-multiply pipeline.
//
// Streams random operand pairs through the pipeline and checks every result,
// in order, against a reference computed here: p = hi(a+b) * lo(a+b).
// Phases, each started from a drained pipeline:
//   A  no faults, continuous input: latency 3 cycles, one result per cycle
//   B  one soft error per stage and side (L and S), one at a time: each
//      costs exactly three cycles
//   C  random soft errors on both sides and timing errors on the L side
//      (a timing error is only injected when the leading logic had a single
//      cycle, never on the capture after a stall), input with bubbles
//   D  intermittent faults lasting several cycles: recovery is retried
//   E  a stuck-at fault on the leading multiplier: after the retry limit the
//      pipeline falls back to one pipeline, fed from the shadow logic
// Every phase with continuous input checks elapsed = baseline + 3 * recoveries.
// Mechanisms counted, each must occur: recovery, L stall, retry, single mode,
// masked fault (injected in a stall cycle), bubble.
module tb_conjoined_addmult;
  localparam int W  = 64;
  localparam int MR = 4;
  // A result is registered in the stage-2 S register at the third edge after
  // its operands were taken and is sampled here at the fourth; in single
  // mode it comes from the stage-2 L register one edge earlier.
  localparam int LAT    = 4;
  localparam int LAT_SM = 3;

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
  int  n_sent = 0, n_recv = 0, n_target = 0;
  bit  took = 1'b0;
  int  cyc = 0;
  int  first_take = -1, last_out = -1, first_out = -1;
  int  n_rec = 0, n_retry = 0, n_stall = 0, n_bubble = 0, n_masked = 0;
  bit  fault_now = 1'b0;
  int  rec_edges[$];      // edges at which a recovery started
  int  n_rec_win = 0;     // recoveries between first take and last result

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
        if (expq.size() == 0) check(1'b0, "result with nothing expected");
        else begin
          logic [W-1:0] e;
          e = expq.pop_front();
          check(out_p == e, $sformatf("result %0d: got %h expected %h", n_recv, out_p, e));
        end
        if (first_out < 0) first_out = cyc;
        last_out = cyc;
        n_recv++;
      end
      if (rec_start) begin
        rec_edges.push_back(cyc);
        n_rec++;
        if (retry_cnt != 0) n_retry++;
      end
      if (!l_clock_en) begin
        n_stall++;
        if (fault_now) n_masked++;
      end
    end
  end

  // ---------------------------------------------------------------- source
  bit bubbles = 1'b0;

  always @(negedge clk) begin
    if (took || !in_valid) begin
      if (n_sent < n_target && !(bubbles && ($urandom % 5 == 0))) begin
        in_valid = 1'b1;
        in_a = {$urandom, $urandom};
        in_b = {$urandom, $urandom};
      end else begin
        if (n_sent < n_target) n_bubble++;
        in_valid = 1'b0;
      end
    end
  end

  // ----------------------------------------------------------------- faults
  // mode 0: none; 1: random soft + timing; 2: intermittent; 3: stuck L2 bit
  int  fmode = 0;
  int  frate = 0;          // injections per 1000 cycles
  int  im_left = 0;        // cycles left of the current intermittent fault
  int  im_stage = 0, im_side = 0, im_bit = 0;
  bit  prev_l_en = 1'b1;

  task automatic clear_faults();
    fi_l0 = '0; fi_s0 = '0; fi_l1 = '0; fi_s1 = '0; fi_l2 = '0; fi_s2 = '0;
  endtask

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
    clear_faults();
    fault_now = 1'b0;
    case (fmode)
      1: if (int'($urandom % 1000) < frate) begin
           // timing errors only hit the leading side, and only when its logic
           // had one cycle; soft errors hit either side
           if ($urandom % 2 == 0) begin
             if (prev_l_en) begin
               set_fault(int'($urandom % 3), 0, int'($urandom % 4096));
               fault_now = 1'b1;
             end
           end else begin
             set_fault(int'($urandom % 3), int'($urandom % 2), int'($urandom % 4096));
             fault_now = 1'b1;
           end
         end
      2: begin
           if (im_left == 0 && int'($urandom % 1000) < frate) begin
             im_left  = 2 + int'($urandom % 5);
             im_stage = int'($urandom % 3);
             im_side  = int'($urandom % 2);
             im_bit   = int'($urandom % 4096);
           end
           if (im_left > 0) begin
             set_fault(im_stage, im_side, im_bit);
             fault_now = 1'b1;
             im_left--;
           end
         end
      3: begin
           fi_l2[7] = 1'b1;
           fault_now = 1'b1;
         end
      default: ;
    endcase
    prev_l_en = l_clock_en;
  end

  // ----------------------------------------------------------------- phases
  task automatic do_reset();
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // Runs n operations to completion, returns elapsed cycles from first take
  // to last result.
  task automatic run(int n, output int elapsed);
    n_sent = 0; n_recv = 0; n_target = n;
    first_take = -1; last_out = -1; first_out = -1;
    while (n_recv < n) @(posedge clk);
    #1;
    elapsed = last_out - first_take;
    n_rec_win = 0;
    foreach (rec_edges[i]) if (rec_edges[i] > first_take && rec_edges[i] < last_out) n_rec_win++;
    rec_edges.delete();
    check(expq.size() == 0, "scoreboard empty after phase");
    fmode = 0;
    repeat (8) @(posedge clk);
    check(n_recv == n, "no extra results after phase");
  endtask

  int base, el, rec0;
  int n_single = 0;

  initial begin
    do_reset();

    // A: fault free
    run(200, base);
    check(first_out - first_take == LAT, $sformatf("latency %0d, expected 4", first_out - first_take));
    check(base == 200 - 1 + LAT, $sformatf("200 results took %0d cycles", base));
    check(n_rec == 0, "no recovery without faults");

    // B: single soft error in every stage, both sides
    for (int st = 0; st < 3; st++) begin
      for (int sd = 0; sd < 2; sd++) begin
        rec0 = n_rec;
        fork
          run(100, el);
          begin
            repeat (40) @(negedge clk);
            #1 set_fault(st, sd, 3 + st);
          end
        join
        check(n_rec - rec0 == 1, $sformatf("stage %0d side %0d: one recovery (%0d)", st, sd, n_rec - rec0));
        check(el == (100 - 1 + LAT) + 3, $sformatf("stage %0d side %0d: %0d cycles, expected %0d", st, sd, el, 106));
      end
    end

    // C: random soft and timing errors, continuous input then bubbles
    rec0 = n_rec;
    fmode = 1; frate = 30;
    run(3000, el);
    check(n_rec > rec0, "random faults triggered recovery");
    check(el == (3000 - 1 + LAT) + 3 * n_rec_win,
          $sformatf("random faults: %0d cycles for %0d recoveries", el, n_rec_win));
    bubbles = 1'b1; fmode = 1; frate = 30;
    run(2000, el);
    bubbles = 1'b0;

    // D: intermittent faults
    rec0 = n_rec;
    fmode = 2; frate = 10;
    run(3000, el);
    check(el == (3000 - 1 + LAT) + 3 * n_rec_win,
          $sformatf("intermittent: %0d cycles for %0d recoveries", el, n_rec_win));
    check(!single_mode, "intermittent faults do not end in single mode");

    // E: permanent fault in the leading multiplier
    rec0 = n_rec;
    single_use_s = 1'b1;
    fmode = 3;
    run(500, el);
    check(single_mode, "stuck fault ends in single-pipeline mode");
    check(!overclock_ok, "overclocking disallowed in single mode");
    check(n_rec - rec0 == MR + 1, $sformatf("recoveries before single mode: %0d", n_rec - rec0));
    n_single = single_mode ? 1 : 0;
    // single mode keeps working without the stuck fault being masked
    fmode = 3;
    run(200, el);
    check(el == 200 - 1 + LAT_SM, $sformatf("single mode: %0d cycles for 200 results", el));
    fmode = 0;

    $display("mechanisms: recoveries=%0d retries=%0d stall_cycles=%0d masked=%0d bubbles=%0d single=%0d",
             n_rec, n_retry, n_stall, n_masked, n_bubble, n_single);
    check(n_rec > 0,    "mechanism: recovery");
    check(n_retry > 0,  "mechanism: retry");
    check(n_stall > 0,  "mechanism: L stall");
    check(n_masked > 0, "mechanism: masked fault");
    check(n_bubble > 0, "mechanism: input bubble");
    check(n_single > 0, "mechanism: single-pipeline mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
