// epp_notifier: mismatch notification of a control flow checker.
//
// Each cycle the checker may report a mismatch of the current state
// (`cur_mis`, at trace offset `cur_off`) and a mismatch of the delayed check
// of a feedback edge taken one cycle earlier (`dly_mis`, at `dly_off`). If
// both occur together the delayed one is reported, because it happened
// first. The notifier owns the checker's one-bit state: RUN until the first
// mismatch, then HALT, in which the outputs keep the first report until
// reset.
//
// Timing: `fault` rises combinationally in the cycle the mismatch is seen
// and stays high; `scope_id` is the constant CHECKER_ID; `offset` is the
// trace offset of the first mismatch (valid while `fault` is high).
// `halted` is high from the cycle after the first mismatch.
module epp_notifier #(
  parameter int unsigned ID_W       = 8,
  parameter int unsigned CHECKER_ID = 0,
  parameter int unsigned OFF_W      = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cur_mis,
  input  logic [OFF_W-1:0] cur_off,
  input  logic             dly_mis,
  input  logic [OFF_W-1:0] dly_off,
  output logic             fault,
  output logic [ID_W-1:0]  scope_id,
  output logic [OFF_W-1:0] offset,
  output logic             halted
);

  typedef enum logic {CHK_RUN = 1'b0, CHK_HALT = 1'b1} chk_state_e;

  chk_state_e       state_q;
  logic [OFF_W-1:0] off_q;
  logic [OFF_W-1:0] sel_off;
  logic             any_mis;

  always_comb begin
    any_mis = cur_mis | dly_mis;
    sel_off = dly_mis ? dly_off : cur_off;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= CHK_RUN;
      off_q   <= '0;
    end else if (state_q == CHK_RUN && any_mis) begin
      state_q <= CHK_HALT;
      off_q   <= sel_off;
    end
  end

  always_comb begin
    halted   = (state_q == CHK_HALT);
    fault    = halted | any_mis;
    offset   = halted ? off_q : sel_off;
    scope_id = ID_W'(CHECKER_ID);
  end

endmodule
