// init_accel: functional module of the callee init() of the running example.
//
// The example only names init() and calls it from BB3; its body is not
// given. This module is the smallest HLS-style callee that fits: an FSM
// with an idle entry state, one state that loads the returned value from
// the `init_value` input, and a final state. The caller pulses `start` in
// its call state and waits in its idle state for `done`, which is high for
// one cycle (in C_EXIT) with `ret` valid. Its state register is brought out
// for a control flow checker of its own, which checks one path (id 0) per
// call. Start-to-done takes two cycles.
module init_accel
  import example_pkg::*;
#(
  parameter int unsigned DATA_W = example_pkg::EX_DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [DATA_W-1:0] init_value,
  output logic                     done,
  output logic signed [DATA_W-1:0] ret,
  output logic [IN_STATE_W-1:0]    present_state,
  output logic [IN_STATE_W-1:0]    next_state
);

  init_state_e state_q, state_d;
  logic signed [DATA_W-1:0] ret_q;

  always_comb begin
    unique case (state_q)
      C_IDLE:  state_d = start ? C_LOAD : C_IDLE;
      C_LOAD:  state_d = C_EXIT;
      C_EXIT:  state_d = C_IDLE;
      default: state_d = C_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= C_IDLE;
      ret_q   <= '0;
    end else begin
      state_q <= state_d;
      if (state_q == C_LOAD) ret_q <= init_value;
    end
  end

  always_comb begin
    done          = (state_q == C_EXIT);
    ret           = ret_q;
    present_state = state_q;
    next_state    = state_d;
  end

endmodule
