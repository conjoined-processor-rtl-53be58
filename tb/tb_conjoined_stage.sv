// tb_conjoined_stage: checks one conjoined stage register set.
// A cycle model kept here (L register, sampled shadow result, S register)
// predicts l_q, s_q and error each cycle under random L/S logic values,
// random L_Clock stalls, S_Clock enables and Load_SP restores; directed
// cases check that a mismatch raises error and that Load_SP restores the
// last checked value.
module tb_conjoined_stage;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic l_en = 0, s_en = 0, load_sp = 0;
  logic [W-1:0] l_d = '0, s_d = '0, l_q, s_q;
  logic error;
  int checks = 0, failures = 0;

  conjoined_stage #(.W(W)) dut (.*);

  logic [W-1:0] m_l = '0, m_sl = '0, m_s = '0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // reference update at each edge, from the values driven before it
  always @(posedge clk) if (rst_n) begin
    logic [W-1:0] nl, nsl, ns;
    nl = m_l; nsl = m_sl; ns = m_s;
    if (l_en) begin
      nl  = load_sp ? m_s : l_d;
      nsl = s_d;
    end
    if (s_en) ns = m_sl;
    m_l = nl; m_sl = nsl; m_s = ns;
  end

  task automatic step(logic le, logic se, logic ld, logic [W-1:0] ldv, logic [W-1:0] sdv);
    @(negedge clk);
    l_en = le; s_en = se; load_sp = ld; l_d = ldv; s_d = sdv;
    @(negedge clk);
    check(l_q == m_l, $sformatf("l_q %h expected %h", l_q, m_l));
    check(s_q == m_s, $sformatf("s_q %h expected %h", s_q, m_s));
    check(error == (m_l != m_sl), "error flag");
  endtask

  initial begin
    logic [W-1:0] v, w;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // directed: agreeing logic, then a mismatch
    v = 16'h1234;
    @(negedge clk); l_en = 1; s_en = 0; load_sp = 0; l_d = v; s_d = v;
    @(negedge clk); check(!error && l_q == v, "agreeing copies give no error");
    s_en = 1; l_d = 16'h5678; s_d = 16'h5678;
    @(negedge clk); check(s_q == v, "checked value enters S register");
    s_en = 0; l_d = 16'h9999; s_d = 16'h1111;
    @(negedge clk); check(error, "mismatch raises error"); check(s_q == v, "S held");
    load_sp = 1;
    @(negedge clk); check(l_q == v, "Load_SP restores the checked value");
    load_sp = 0; l_en = 0; s_en = 0; l_d = 16'hAAAA; s_d = 16'hAAAA;
    @(negedge clk); check(l_q == v, "stalled L register holds");
    // random
    for (int i = 0; i < 5000; i++) begin
      logic ld, le, se;
      v = W'($urandom);
      w = ($urandom % 4 == 0) ? W'($urandom) : v;
      ld = ($urandom % 6 == 0);
      le = ($urandom % 5 != 0);
      se = !ld && ($urandom % 2 == 0);
      step(le, se, ld, v, w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
