// mips_regfile: 32 x 32-bit register file, register 0 reads as zero.
//
// Four asynchronous read ports, two for each copy of the decode logic of
// the conjoined pipeline (leading and shadow), and one write port written at
// the rising clock edge when we is high. The register file is architectural
// state shared by both pipelines; the pipeline only asserts we for checked
// values. Reset clears all registers.
module mips_regfile (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ra [4],
  output logic [31:0] rd [4],
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd
);

  logic [31:0] regs [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    for (int p = 0; p < 4; p++) rd[p] = (ra[p] == 5'd0) ? '0 : regs[ra[p]];
  end

endmodule
