// epp_checker: on-chip control flow checker for one HLS-generated FSM.
//
// The checker watches the FSM's state register only: its input
// (next_state) and output (present_state). Both are registered first, so
// every operation below runs one cycle behind the FSM; all checkers of a
// design share this delay, so the first mismatch reported is still the
// first one that happened. From the registered pair it
//   * looks up the EPP edge increment in the increments memory (addressed by
//     {present_state, next_state}) and adds it to the EPP counter;
//   * in a final state, compares the counter with the expected path
//     identifier read from the trace memory at cur_off;
//   * on a feedback edge, stores the closed path's identifier (counter plus
//     the weight of the auxiliary exit edge) and the expected identifier
//     (prev_trace), restarts the counter at the weight of the auxiliary
//     entry edge, and compares the two stored values in the next cycle;
//   * in a state that calls another function, checks that the running path
//     can still become the expected one, so a wrong branch is caught in the
//     caller before the callee runs. With partial sum P at state v and
//     expected identifier E this holds iff 0 <= E - P < NumPaths(v); the
//     per-state value NumPaths(v) - 1 is given in CALL_SPAN_M1. A final
//     state is the special case NumPaths = 1, i.e. equality.
// Every completed path (final state or feedback edge) consumes one
// occurrence of the current trace word: the word {rep, path} stands for
// rep+1 consecutive occurrences of `path` (EOPT compression), counted in
// rep_cnt, after which cur_off advances. A path completed after the last
// word is a mismatch too.
//
// Outputs (see epp_notifier): fault bit, the constant CHECKER_ID of this
// hardware scope, and the trace offset of the first mismatch. A mismatch is
// reported in the cycle after the FSM was in the offending state (two cycles
// for the delayed feedback-edge check) and then held until reset.
//
// Follows the described checker: registered inputs, trace memory at a
// registered cur_off, prev_trace, increments memory, counter restart on
// feedback edges, delayed check, priority of the delayed mismatch, one-bit
// checker state. This design's own choices: the span test for call states,
// the prev_off register that keeps the offset of a delayed check, the
// end-of-trace mismatch, and an active-low asynchronous reset. The
// entry state must be the FSM's reset state.
module epp_checker #(
  parameter int unsigned CHECKER_ID  = 0,
  parameter int unsigned ID_W        = 8,
  parameter int unsigned STATE_W     = example_pkg::EX_STATE_W,
  parameter logic [STATE_W-1:0] ENTRY_STATE = '0,
  parameter int unsigned TRACE_W     = example_pkg::EX_TRACE_W,
  parameter int unsigned META_W      = example_pkg::EX_META_W,
  parameter int unsigned TRACE_DEPTH = example_pkg::EX_MAX_TRACE,
  parameter int unsigned TRACE_LEN   = int'(example_pkg::EX_GOLD.len),
  parameter int unsigned OFF_W       = $clog2(TRACE_DEPTH + 1),
  parameter logic [TRACE_DEPTH-1:0][META_W+TRACE_W-1:0] TRACE_INIT = example_pkg::EX_GOLD.ent,
  parameter int unsigned N_EDGES     = example_pkg::EX_N_EDGES,
  parameter logic [N_EDGES-1:0][STATE_W-1:0] E_SRC = example_pkg::EX_E_SRC,
  parameter logic [N_EDGES-1:0][STATE_W-1:0] E_DST = example_pkg::EX_E_DST,
  parameter logic [N_EDGES-1:0][TRACE_W-1:0] E_INC = example_pkg::EX_E_INC,
  parameter logic [N_EDGES-1:0]              E_FB  = example_pkg::EX_E_FB,
  parameter logic [N_EDGES-1:0][TRACE_W-1:0] E_RST = example_pkg::EX_E_RST,
  parameter logic [2**STATE_W-1:0]              FINAL_STATES = example_pkg::EX_FINAL,
  parameter logic [2**STATE_W-1:0]              CALL_STATES  = example_pkg::EX_CALL,
  parameter logic [2**STATE_W-1:0][TRACE_W-1:0] CALL_SPAN_M1 = example_pkg::EX_SPAN_M1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [STATE_W-1:0] present_state,
  input  logic [STATE_W-1:0] next_state,
  output logic               fault_o,
  output logic [ID_W-1:0]    scope_id_o,
  output logic [OFF_W-1:0]   offset_o
);

  // ---------------- registered FSM view ----------------
  logic [STATE_W-1:0] ps_q, ns_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps_q <= ENTRY_STATE;
      ns_q <= ENTRY_STATE;
    end else begin
      ps_q <= present_state;
      ns_q <= next_state;
    end
  end

  // ---------------- memories ----------------
  logic [TRACE_W-1:0] inc, rst_val;
  logic               feedback;

  epp_incr_rom #(
    .STATE_W (STATE_W), .TRACE_W (TRACE_W), .N_EDGES (N_EDGES),
    .E_SRC (E_SRC), .E_DST (E_DST), .E_INC (E_INC), .E_FB (E_FB), .E_RST (E_RST)
  ) u_incr_mem (
    .present_state (ps_q),
    .next_state    (ns_q),
    .inc           (inc),
    .feedback      (feedback),
    .rst_val       (rst_val)
  );

  logic [OFF_W-1:0]   cur_off;
  logic [TRACE_W-1:0] exp_path;
  logic [META_W-1:0]  exp_rep;
  logic               past_end;

  epp_trace_rom #(
    .TRACE_W (TRACE_W), .META_W (META_W), .DEPTH (TRACE_DEPTH), .LEN (TRACE_LEN),
    .ADDR_W (OFF_W), .INIT (TRACE_INIT)
  ) u_trace_mem (
    .addr     (cur_off),
    .path     (exp_path),
    .rep      (exp_rep),
    .past_end (past_end)
  );

  // ---------------- checking datapath ----------------
  logic [TRACE_W-1:0] epp_cnt;     // running EPP counter
  logic [TRACE_W-1:0] fb_path;     // path closed by the last feedback edge
  logic [TRACE_W-1:0] prev_trace;  // its expected identifier
  logic               prev_end;    // it was beyond the end of the trace
  logic [OFF_W-1:0]   prev_off;    // its trace offset
  logic               dly_pend;    // a delayed check is due this cycle
  logic [META_W-1:0]  rep_cnt;     // occurrences of the current word seen - 1

  logic               is_final, is_call, path_done, halted;
  logic [TRACE_W-1:0] span_m1, diff;
  logic               cur_mis, dly_mis;

  always_comb begin
    is_final  = FINAL_STATES[ps_q];
    is_call   = CALL_STATES[ps_q];
    span_m1   = is_final ? '0 : CALL_SPAN_M1[ps_q];
    diff      = exp_path - epp_cnt;
    cur_mis   = !halted && (is_final || is_call) && (past_end || diff > span_m1);
    dly_mis   = !halted && dly_pend && (prev_end || fb_path != prev_trace);
    path_done = is_final || feedback;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      epp_cnt    <= '0;
      fb_path    <= '0;
      prev_trace <= '0;
      prev_end   <= 1'b0;
      prev_off   <= '0;
      dly_pend   <= 1'b0;
      cur_off    <= '0;
      rep_cnt    <= '0;
    end else if (!halted) begin
      dly_pend <= feedback;
      if (feedback) begin
        fb_path    <= epp_cnt + inc;
        prev_trace <= exp_path;
        prev_end   <= past_end;
        prev_off   <= cur_off;
        epp_cnt    <= rst_val;
      end else if (is_final) begin
        epp_cnt <= '0;
      end else begin
        epp_cnt <= epp_cnt + inc;
      end
      if (path_done && !past_end) begin
        if (rep_cnt == exp_rep) begin
          rep_cnt <= '0;
          cur_off <= cur_off + OFF_W'(1);
        end else begin
          rep_cnt <= rep_cnt + META_W'(1);
        end
      end
    end
  end

  // ---------------- notification ----------------
  epp_notifier #(
    .ID_W (ID_W), .CHECKER_ID (CHECKER_ID), .OFF_W (OFF_W)
  ) u_notifier (
    .clk      (clk),
    .rst_n    (rst_n),
    .cur_mis  (cur_mis),
    .cur_off  (cur_off),
    .dly_mis  (dly_mis),
    .dly_off  (prev_off),
    .fault    (fault_o),
    .scope_id (scope_id_o),
    .offset   (offset_o),
    .halted   (halted)
  );

  // A final state has no outgoing FSM edge other than the return to entry.
  assert property (@(posedge clk) disable iff (!rst_n) !(FINAL_STATES[ps_q] && feedback))
    else $error("epp_checker: feedback edge leaves a final state");

endmodule
