// clk_stall_cntrl: clock stall controller of the conjoined pipeline.
//
// Collects the Error flags of all pipeline stages and decides, cycle by
// cycle, whether the leading clock (L_Clock) and the shadow clock (S_Clock)
// tick, and whether the L registers reload from the S registers (Load_SP).
// The clocks are expressed as enables (l_en, s_en) of one clock.
//
// Recovery takes three cycles, with the S registers held throughout:
//   1. the cycle in which an error is seen (state NORMAL): the L registers
//      are loaded from the S registers at its end (load_sp);
//   2. STALL: the L registers are held, so the leading logic gets two cycles
//      to settle on the restored values;
//   3. RESUME: the L registers capture again; stage errors are ignored
//      because the S-LOGIC samples of this cycle belong to the rolled-back
//      state.
// Back in NORMAL the comparison is valid again. An error seen there right
// after a recovery is a retry. MAX_RETRY consecutive recoveries without an
// error-free NORMAL cycle in between declare the fault permanent: the L
// registers are restored one last time and the controller enters SINGLE,
// where errors are ignored, the S registers stop and overclocking must be
// switched off (single_mode drives that). Only reset leaves SINGLE.
//
// The retry limit is this design's choice; the three-cycle sequence, the
// held S registers, the repeated retries and the fall-back to one pipeline
// follow the architecture description.
module clk_stall_cntrl
  import conjoined_pkg::*;
#(
  parameter int NSTAGES   = 3,
  parameter int MAX_RETRY = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NSTAGES-1:0] stage_err,    // P-STAGE errors
  output logic               l_en,         // L_Clock ticks at the end of this cycle
  output logic               s_en,         // S_Clock ticks at the end of this cycle
  output logic               load_sp,      // Load_SP to every stage
  output logic               rec_start,    // a recovery starts this cycle
  output logic               recovering,   // in recovery cycle 2 or 3
  output logic               single_mode,  // permanent fault declared
  output logic [$clog2(MAX_RETRY+1)-1:0] retry_cnt
);

  stall_state_t state, state_nxt;
  logic err_any;

  assign err_any = |stage_err;

  always_comb begin
    state_nxt   = state;
    l_en        = 1'b1;
    s_en        = 1'b0;
    load_sp     = 1'b0;
    rec_start   = 1'b0;
    recovering  = 1'b0;
    single_mode = 1'b0;
    unique case (state)
      ST_NORMAL: begin
        if (err_any) begin
          load_sp   = 1'b1;
          rec_start = 1'b1;
          state_nxt = (int'(retry_cnt) >= MAX_RETRY) ? ST_SINGLE : ST_STALL;
        end else begin
          s_en = 1'b1;
        end
      end
      ST_STALL: begin
        l_en       = 1'b0;
        recovering = 1'b1;
        state_nxt  = ST_RESUME;
      end
      ST_RESUME: begin
        recovering = 1'b1;
        state_nxt  = ST_NORMAL;
      end
      ST_SINGLE: begin
        single_mode = 1'b1;
      end
      default: state_nxt = ST_NORMAL;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_NORMAL;
      retry_cnt <= '0;
    end else begin
      state <= state_nxt;
      if (state == ST_NORMAL) begin
        if (!err_any) retry_cnt <= '0;
        else if (int'(retry_cnt) < MAX_RETRY) retry_cnt <= retry_cnt + 1'b1;
      end
    end
  end

  a_sp_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (load_sp || !l_en || recovering || single_mode) |-> !s_en);

endmodule
