// epp_debug_top: the running example with on-chip control flow checking.
//
// Two functional modules, each an FSM plus datapath as an HLS tool would
// emit them: example_accel (the example function) and init_accel (its callee
// init()), connected by a start/done call handshake. Next to each FSM sits
// its own epp_checker, which sees only that FSM's present_state and
// next_state and whose trace memory holds the golden EPP trace of a
// predefined input (the GOLD_* parameters). The golden traces are computed
// at elaboration by the software model in example_pkg, which runs the
// example function and numbers its paths with the same edge increments.
//
// When the accelerator is started with inputs whose control flow differs
// from the golden run, the checker of the scope where the control flow
// first diverges raises its fault bit and reports its scope identifier and
// the offset in its trace; the FSMs keep running unaltered. The caller's
// call state S3 is checked, so a wrong branch that leads into a call of
// init() is reported by the caller before the callee's checker can object.
//
// Ports: clock, active-low asynchronous reset, the example's start/inputs
// and done/result, the temp[] read port, and per checker (index 0 the
// example function, index 1 init()) the fault bit, 8-bit scope identifier
// and trace offset (zero-extended to 8 bits). Checker identifiers are
// CALLER_ID and CALLEE_ID.
module epp_debug_top
  import example_pkg::*;
#(
  parameter int unsigned CALLER_ID  = 1,
  parameter int unsigned CALLEE_ID  = 2,
  parameter bit          GOLD_IN1   = example_pkg::DEF_GOLD_IN1,
  parameter int signed   GOLD_A     = example_pkg::DEF_GOLD_A,
  parameter int signed   GOLD_INIT  = example_pkg::DEF_GOLD_INIT,
  parameter int signed   GOLD_CUR0  = example_pkg::DEF_GOLD_CUR0,
  parameter int signed   GOLD_ITER0 = example_pkg::DEF_GOLD_ITER0,
  parameter int signed   GOLD_COEFF = example_pkg::DEF_GOLD_COEFF
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        in1,
  input  logic signed [EX_DATA_W-1:0] a,
  input  logic signed [EX_DATA_W-1:0] init_value,
  input  logic signed [EX_DATA_W-1:0] cur0,
  input  logic signed [EX_DATA_W-1:0] iter0,
  input  logic signed [EX_DATA_W-1:0] coeff,
  output logic                        done,
  output logic signed [EX_DATA_W-1:0] result,
  input  logic [3:0]                  temp_raddr,
  output logic signed [EX_DATA_W-1:0] temp_rdata,
  output logic [1:0]                  chk_fault,
  output logic [1:0][7:0]             chk_scope,
  output logic [1:0][7:0]             chk_offset
);

  localparam ex_trace_t EX_TRACE = ex_golden(GOLD_IN1, GOLD_A, GOLD_INIT, GOLD_CUR0,
                                             GOLD_ITER0, GOLD_COEFF);
  localparam in_trace_t IN_TRACE = in_golden(GOLD_IN1 ? 0 : 1);

  localparam int unsigned EX_OFF_W = $clog2(EX_MAX_TRACE + 1);
  localparam int unsigned IN_OFF_W = $clog2(IN_MAX_TRACE + 1);

  // ---------------- functional modules ----------------
  logic                        init_start, init_done;
  logic signed [EX_DATA_W-1:0] init_ret;
  logic [EX_STATE_W-1:0]       ex_ps, ex_ns;
  logic [IN_STATE_W-1:0]       in_ps, in_ns;

  example_accel u_example (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (start),
    .in1           (in1),
    .a             (a),
    .cur0          (cur0),
    .iter0         (iter0),
    .coeff         (coeff),
    .done          (done),
    .result        (result),
    .init_start    (init_start),
    .init_done     (init_done),
    .init_ret      (init_ret),
    .temp_raddr    (temp_raddr),
    .temp_rdata    (temp_rdata),
    .present_state (ex_ps),
    .next_state    (ex_ns)
  );

  init_accel u_init (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (init_start),
    .init_value    (init_value),
    .done          (init_done),
    .ret           (init_ret),
    .present_state (in_ps),
    .next_state    (in_ns)
  );

  // ---------------- control flow checkers ----------------
  logic [EX_OFF_W-1:0] ex_off;
  logic [IN_OFF_W-1:0] in_off;

  epp_checker #(
    .CHECKER_ID   (CALLER_ID),
    .ID_W         (8),
    .STATE_W      (EX_STATE_W),
    .ENTRY_STATE  (S_ENTRY),
    .TRACE_W      (EX_TRACE_W),
    .META_W       (EX_META_W),
    .TRACE_DEPTH  (EX_MAX_TRACE),
    .TRACE_LEN    (int'(EX_TRACE.len)),
    .OFF_W        (EX_OFF_W),
    .TRACE_INIT   (EX_TRACE.ent),
    .N_EDGES      (EX_N_EDGES),
    .E_SRC        (EX_E_SRC),
    .E_DST        (EX_E_DST),
    .E_INC        (EX_E_INC),
    .E_FB         (EX_E_FB),
    .E_RST        (EX_E_RST),
    .FINAL_STATES (EX_FINAL),
    .CALL_STATES  (EX_CALL),
    .CALL_SPAN_M1 (EX_SPAN_M1)
  ) u_chk_example (
    .clk           (clk),
    .rst_n         (rst_n),
    .present_state (ex_ps),
    .next_state    (ex_ns),
    .fault_o       (chk_fault[0]),
    .scope_id_o    (chk_scope[0]),
    .offset_o      (ex_off)
  );

  epp_checker #(
    .CHECKER_ID   (CALLEE_ID),
    .ID_W         (8),
    .STATE_W      (IN_STATE_W),
    .ENTRY_STATE  (C_IDLE),
    .TRACE_W      (IN_TRACE_W),
    .META_W       (IN_META_W),
    .TRACE_DEPTH  (IN_MAX_TRACE),
    .TRACE_LEN    (int'(IN_TRACE.len)),
    .OFF_W        (IN_OFF_W),
    .TRACE_INIT   (IN_TRACE.ent),
    .N_EDGES      (IN_N_EDGES),
    .E_SRC        (IN_E_SRC),
    .E_DST        (IN_E_DST),
    .E_INC        (IN_E_INC),
    .E_FB         (IN_E_FB),
    .E_RST        (IN_E_RST),
    .FINAL_STATES (IN_FINAL),
    .CALL_STATES  (IN_CALL),
    .CALL_SPAN_M1 (IN_SPAN_M1)
  ) u_chk_init (
    .clk           (clk),
    .rst_n         (rst_n),
    .present_state (in_ps),
    .next_state    (in_ns),
    .fault_o       (chk_fault[1]),
    .scope_id_o    (chk_scope[1]),
    .offset_o      (in_off)
  );

  always_comb begin
    chk_offset[0] = 8'(ex_off);
    chk_offset[1] = 8'(in_off);
  end

endmodule
