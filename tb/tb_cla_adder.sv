// tb_cla_adder: checks the 64-bit carry look-ahead adder against the
// reference a + b + cin on corner cases (all carries propagating, all
// generating, alternating patterns) and 20000 random vectors; also checks a
// 16-bit instance exhaustively over its carry chain corners.
module tb_cla_adder;
  localparam int W = 64;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  logic [15:0] a16, b16, sum16;
  logic cout16;
  int checks = 0, failures = 0;

  cla_adder #(.WIDTH(W))  dut   (.a, .b, .cin, .sum, .cout);
  cla_adder #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(cin), .sum(sum16), .cout(cout16));

  task automatic apply(logic [W-1:0] x, logic [W-1:0] y, logic c);
    logic [W:0] r;
    logic [16:0] r16;
    a = x; b = y; cin = c;
    a16 = x[15:0]; b16 = y[15:0];
    #1;
    r = {1'b0, x} + {1'b0, y} + (W+1)'(c);
    r16 = {1'b0, x[15:0]} + {1'b0, y[15:0]} + 17'(c);
    checks += 2;
    if ({cout, sum} != r) begin
      failures++;
      $display("FAIL %h + %h + %0d = %h, expected %h", x, y, c, {cout, sum}, r);
    end
    if ({cout16, sum16} != r16) begin
      failures++;
      $display("FAIL16 %h + %h + %0d = %h, expected %h", x[15:0], y[15:0], c, {cout16, sum16}, r16);
    end
  endtask

  initial begin
    apply('0, '0, 0);
    apply('1, '0, 1);
    apply('1, '1, 1);
    apply('1, 64'd1, 0);
    apply({32{2'b10}}, {32{2'b01}}, 1);
    apply({32{2'b10}}, {32{2'b10}}, 0);
    apply(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 0);
    for (int i = 0; i < W; i++) apply(W'(1) << i, ('1 >> (W - i)) , 1);
    for (int i = 0; i < 20000; i++) apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
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
