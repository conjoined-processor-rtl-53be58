// mips_alu: 32-bit ALU of the conjoined MIPS pipeline's execute stage.
//
// Add, subtract, bitwise logic, signed and unsigned set-less-than, shifts,
// load-upper-immediate and the low 32 bits of a multiply. Purely
// combinational. For shifts `a` supplies the shift amount (low five bits)
// and `b` the value; for LUI `b` is the immediate.
module mips_alu
  import mips_pkg::*;
(
  input  alu_op_t     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'd0, a < b};
      ALU_SLL:  y = b << a[4:0];
      ALU_SRL:  y = b >> a[4:0];
      ALU_SRA:  y = 32'($signed(b) >>> a[4:0]);
      ALU_LUI:  y = {b[15:0], 16'd0};
      ALU_MUL:  y = a * b;
      default:  y = '0;
    endcase
  end

endmodule
