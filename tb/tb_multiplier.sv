// tb_multiplier: checks the 32x32 multiplier against a shift-and-add
// reference on corner cases and 20000 random operand pairs.
module tb_multiplier;
  localparam int W = 32;
  logic [W-1:0] a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  multiplier #(.WIDTH(W)) dut (.a, .b, .p);

  function automatic logic [2*W-1:0] shift_add(logic [W-1:0] x, logic [W-1:0] y);
    logic [2*W-1:0] acc = '0;
    for (int i = 0; i < W; i++) if (y[i]) acc += (2*W)'(x) << i;
    return acc;
  endfunction

  task automatic apply(logic [W-1:0] x, logic [W-1:0] y);
    logic [2*W-1:0] e;
    a = x; b = y;
    #1;
    e = shift_add(x, y);
    checks++;
    if (p != e) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, p, e);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, 1);
    apply(32'h8000_0000, 32'h8000_0000);
    apply(32'hFFFF_0000, 32'h0000_FFFF);
    for (int i = 0; i < 20000; i++) apply($urandom, $urandom);
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
