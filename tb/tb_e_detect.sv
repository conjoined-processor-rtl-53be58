// tb_e_detect: checks the stage error detector: equal inputs give no error,
// every single-bit and random multi-bit difference raises it.
module tb_e_detect;
  localparam int W = 65;
  logic [W-1:0] l_q, s_logic;
  logic error;
  int checks = 0, failures = 0;

  e_detect #(.W(W)) dut (.l_q, .s_logic, .error);

  task automatic apply(logic [W-1:0] x, logic [W-1:0] y);
    begin
      l_q = x; s_logic = y;
      #1;
      checks++;
      if (error != (x != y)) begin
        failures++;
        $display("FAIL %h vs %h: error=%0d", x, y, error);
      end
    end
  endtask

  initial begin
    logic [W-1:0] v;
    for (int i = 0; i < 2000; i++) begin
      v = {$urandom, $urandom, $urandom};
      apply(v, v);
      apply(v, v ^ (W'(1) << ($urandom % W)));
      apply(v, v ^ W'({$urandom, $urandom, $urandom}));
    end
    for (int i = 0; i < W; i++) apply('0, W'(1) << i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
