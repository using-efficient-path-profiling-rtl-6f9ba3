// epp_incr_rom: the increments memory of a control flow checker.
//
// A read-only memory addressed by the concatenation {present_state,
// next_state} of the checked FSM (2*STATE_W address bits). Each word holds
// the EPP edge increment of that transition, a flag marking feedback edges,
// and for feedback edges the value the EPP counter restarts from (the weight
// of the auxiliary edge from the entry state to the feedback target). For a
// feedback edge, `inc` is the weight of the auxiliary edge from its source
// to the exit state, which closes the finished path.
//
// Only edges with a non-zero increment or a feedback flag are listed in the
// E_* parameters; every other word is zero, so a synthesis tool usually
// reduces the table to a few gates. Contents are built at elaboration.
// Read is combinational.
module epp_incr_rom #(
  parameter int unsigned STATE_W = example_pkg::EX_STATE_W,
  parameter int unsigned TRACE_W = example_pkg::EX_TRACE_W,
  parameter int unsigned N_EDGES = example_pkg::EX_N_EDGES,
  parameter logic [N_EDGES-1:0][STATE_W-1:0] E_SRC = example_pkg::EX_E_SRC,
  parameter logic [N_EDGES-1:0][STATE_W-1:0] E_DST = example_pkg::EX_E_DST,
  parameter logic [N_EDGES-1:0][TRACE_W-1:0] E_INC = example_pkg::EX_E_INC,
  parameter logic [N_EDGES-1:0]              E_FB  = example_pkg::EX_E_FB,
  parameter logic [N_EDGES-1:0][TRACE_W-1:0] E_RST = example_pkg::EX_E_RST
) (
  input  logic [STATE_W-1:0] present_state,
  input  logic [STATE_W-1:0] next_state,
  output logic [TRACE_W-1:0] inc,
  output logic               feedback,
  output logic [TRACE_W-1:0] rst_val
);

  localparam int unsigned DEPTH = 2 ** (2 * STATE_W);
  localparam int unsigned WORD_W = 2 * TRACE_W + 1;

  logic [WORD_W-1:0] mem [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++) mem[a] = '0;
    for (int e = 0; e < N_EDGES; e++)
      mem[{E_SRC[e], E_DST[e]}] = {E_FB[e], E_RST[e], E_INC[e]};
  end

  always_comb {feedback, rst_val, inc} = mem[{present_state, next_state}];

endmodule
