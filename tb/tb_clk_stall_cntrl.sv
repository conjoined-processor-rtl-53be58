// tb_clk_stall_cntrl: checks the clock stall controller cycle by cycle.
//   * no error: both clocks run, no Load_SP
//   * a one-cycle error: Load_SP in that cycle, L stalled in the next, L
//     running with S still held in the third, normal again in the fourth;
//     errors during cycles 2 and 3 are ignored
//   * an error that clears after two recoveries: retry count returns to 0
//   * a persistent error: MAX_RETRY recoveries, then a last restore and
//     single-pipeline mode, where errors no longer stop anything
module tb_clk_stall_cntrl;
  localparam int N  = 3;
  localparam int MR = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [N-1:0] stage_err = '0;
  logic l_en, s_en, load_sp, rec_start, recovering, single_mode;
  logic [$clog2(MR+1)-1:0] retry_cnt;
  int checks = 0, failures = 0;

  clk_stall_cntrl #(.NSTAGES(N), .MAX_RETRY(MR)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // Expect outputs in the current cycle: {l_en, s_en, load_sp, recovering, single}
  task automatic expect_cycle(logic [N-1:0] err, logic [4:0] exp, string what);
    @(negedge clk);
    stage_err = err;
    #1;
    check({l_en, s_en, load_sp, recovering, single_mode} == exp,
          $sformatf("%s: got %b expected %b", what, {l_en, s_en, load_sp, recovering, single_mode}, exp));
  endtask

  localparam logic [4:0] NORM = 5'b11000;
  localparam logic [4:0] LOAD = 5'b10100;
  localparam logic [4:0] STAL = 5'b00010;
  localparam logic [4:0] RESU = 5'b10010;
  localparam logic [4:0] SING = 5'b10001;

  int nrec;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 5; i++) expect_cycle('0, NORM, "idle");
    // single error in each stage
    for (int s = 0; s < N; s++) begin
      expect_cycle(N'(1) << s, LOAD, "recovery cycle 1");
      check(rec_start, "rec_start pulses");
      expect_cycle('1, STAL, "recovery cycle 2 ignores errors");
      expect_cycle('1, RESU, "recovery cycle 3 ignores errors");
      expect_cycle('0, NORM, "back to normal");
      check(retry_cnt == 1, "retry count kept through the check cycle");
      expect_cycle('0, NORM, "normal");
      check(retry_cnt == 0, "retry count cleared after an error-free cycle");
    end
    // intermittent: two recoveries then clean
    expect_cycle(3'b010, LOAD, "intermittent 1");
    expect_cycle('0, STAL, "stall");
    expect_cycle('0, RESU, "resume");
    expect_cycle(3'b010, LOAD, "intermittent retry");
    check(retry_cnt == 1, "one retry counted");
    expect_cycle('0, STAL, "stall");
    expect_cycle('0, RESU, "resume");
    expect_cycle('0, NORM, "cleared");
    expect_cycle('0, NORM, "normal");
    check(retry_cnt == 0, "retry count back to 0");
    // permanent
    nrec = 0;
    for (int r = 0; r < MR; r++) begin
      expect_cycle(3'b100, LOAD, "permanent: recovery");
      nrec++;
      expect_cycle(3'b100, STAL, "stall");
      expect_cycle(3'b100, RESU, "resume");
    end
    expect_cycle(3'b100, LOAD, "permanent: last restore");
    check(int'(retry_cnt) == MR, "retry limit reached");
    for (int i = 0; i < 6; i++) expect_cycle(3'b111, SING, "single-pipeline mode");
    check(nrec == MR, "recoveries before single mode");
    // reset leaves single mode
    stage_err = '0;
    rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    expect_cycle('0, NORM, "after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
