// conjoined_stage: the register side of one conjoined pipeline stage.
//
// A stage of the conjoined pipeline has two copies of its combinational
// logic, both fed from the previous stage's leading (L) register: the
// leading logic (L-LOGIC) and the shadow logic (S-LOGIC). This module holds
// what sits behind them:
//   * the L-PIPELINE register, loaded either from L-LOGIC or, when load_sp
//     is asserted during recovery, from this stage's own S-PIPELINE register
//     (the Load_SP multiplexer);
//   * the S-LOGIC result as seen at the shadow clock (sl_q, see below);
//   * E-DETECT, comparing the L register with that S-LOGIC result;
//   * the S-PIPELINE register, written with the S-LOGIC result only in
//     cycles where the controller reports no error anywhere (s_en), so that
//     it only ever holds checked values.
//
// Timing model. In silicon the shadow clock fires a phase shift after the
// leading clock, and the S-LOGIC contamination delay is made longer than that
// shift, so that at the shadow edge the S-LOGIC still shows the result for
// the inputs the L register just consumed. Zero-delay RTL has no
// contamination delay, so this design samples the S-LOGIC output at the
// leading edge into sl_q; sl_q is exactly the value the delayed S-LOGIC
// output still shows after that edge. E-DETECT then compares l_q with sl_q
// during the following cycle, and the S register takes sl_q at the next
// edge when s_en is high. All registers use the one clock `clk` with enables
// in place of the gated L_Clock and S_Clock. Reset clears all registers,
// so that l_q and sl_q agree and no error is flagged out of reset.
module conjoined_stage #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         l_en,      // L_Clock enabled this cycle
  input  logic         s_en,      // S_Clock enabled this cycle
  input  logic         load_sp,   // Load_SP: restore L register from S register
  input  logic [W-1:0] l_d,       // L-LOGIC output
  input  logic [W-1:0] s_d,       // S-LOGIC output
  output logic [W-1:0] l_q,       // L-PIPELINE register
  output logic [W-1:0] s_q,       // S-PIPELINE register
  output logic         error      // E-DETECT result for the current cycle
);

  logic [W-1:0] sl_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_q  <= '0;
      sl_q <= '0;
    end else if (l_en) begin
      l_q  <= load_sp ? s_q : l_d;
      sl_q <= s_d;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_q <= '0;
    else if (s_en) s_q <= sl_q;
  end

  e_detect #(.W(W)) u_e_detect (
    .l_q    (l_q),
    .s_logic(sl_q),
    .error  (error)
  );

  // Recovery reloads L from S, never while the S register is being written.
  a_no_load_and_write: assert property (@(posedge clk) disable iff (!rst_n)
    !(load_sp && s_en));

endmodule
