// epp_trace_rom: the trace memory of a control flow checker.
//
// A read-only, single-port memory holding the golden EPP trace of one FSM.
// Each word is {rep, path}: `path` is the identifier of the next expected
// path (TRACE_W bits) and `rep` is the EOPT metadata, the number of times the
// same path is repeated after its first occurrence (META_W bits). The address
// is the checker's registered offset register cur_off, so the read below is
// combinational from a register; a synthesis tool can move that register
// into a block RAM's address register. Words past LEN are never expected;
// `past_end` tells the checker that the trace has been used up.
//
// Timing: data is valid in the same cycle as addr. Contents are set at
// elaboration from INIT (word i at index i).
module epp_trace_rom #(
  parameter int unsigned TRACE_W = example_pkg::EX_TRACE_W,
  parameter int unsigned META_W  = example_pkg::EX_META_W,
  parameter int unsigned DEPTH   = example_pkg::EX_MAX_TRACE,
  parameter int unsigned LEN     = int'(example_pkg::EX_GOLD.len),
  parameter int unsigned ADDR_W  = $clog2(DEPTH + 1),
  parameter logic [DEPTH-1:0][META_W+TRACE_W-1:0] INIT = example_pkg::EX_GOLD.ent
) (
  input  logic [ADDR_W-1:0]  addr,
  output logic [TRACE_W-1:0] path,
  output logic [META_W-1:0]  rep,
  output logic               past_end
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [META_W+TRACE_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = INIT[i];
  end

  logic [META_W+TRACE_W-1:0] word;

  always_comb begin
    past_end = (32'(addr) >= LEN);
    word     = (32'(addr) < DEPTH) ? mem[IDX_W'(addr)] : '0;
    {rep, path} = word;
  end

  initial begin
    assert (LEN <= DEPTH) else $error("epp_trace_rom: LEN %0d exceeds DEPTH %0d", LEN, DEPTH);
  end

endmodule
