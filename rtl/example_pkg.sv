// example_pkg: types and constants for the running example, a small
// HLS-style function (a branch, a call to init(), and a while loop with an
// inner if/else) together with the EPP tables its control flow checker needs.
//
// The state graph follows the FSM path graph of the example: SEntry, S1, S2,
// S3, S4, S5, S6, S7A, S7B, S8A, S8B, S9, SExit, with edge increments 3
// (S1->S3), 1 (S5->S7A), 2 (S4->S9), the feedback edge S8B->S4 whose
// auxiliary entry edge has weight 6, and a weight of 0 on the auxiliary exit
// edge. PathMax is 8, so a path identifier takes 4 bits. One state is this
// design's own addition: S3W, the wait state in which the caller idles while
// init() runs (the handshake idle state the example does not draw). It lies
// inside BB3, carries weight 0 and changes no path identifier. States are
// binary encoded in depth-first order.
//
// The package also holds the golden-reference generator: a constant function
// that executes the example function in software, adds the same edge
// increments along the way, and emits the EOPT-compressed sequence of path
// identifiers (path id plus a repeat count of META_W bits). A design
// instantiates checkers whose trace memories are initialised with its result,
// which is what the host-side flow would produce for a predefined input.
package example_pkg;

  localparam int unsigned EX_DATA_W = 32;

  // ---------------- example function FSM ----------------
  localparam int unsigned EX_STATE_W = 4;
  typedef enum logic [EX_STATE_W-1:0] {
    S_ENTRY = 4'd0,
    S_1     = 4'd1,
    S_2     = 4'd2,
    S_3     = 4'd3,
    S_3W    = 4'd4,
    S_4     = 4'd5,
    S_5     = 4'd6,
    S_6     = 4'd7,
    S_7A    = 4'd8,
    S_7B    = 4'd9,
    S_8A    = 4'd10,
    S_8B    = 4'd11,
    S_9     = 4'd12,
    S_EXIT  = 4'd13
  } ex_state_e;

  localparam int unsigned EX_NSTATES  = 2 ** EX_STATE_W;
  localparam int unsigned EX_TRACE_W  = 4;   // ceil(log2(PathMax+1)), PathMax = 8
  localparam int unsigned EX_META_W   = 3;   // EOPT repeat bits (k)
  localparam int unsigned EX_MAX_TRACE = 16; // depth of the trace memory
  localparam int unsigned EX_N_EDGES  = 4;   // edges with a non-zero increment or feedback

  // Sparse edge list, entry i at index i (packed, entry 0 rightmost).
  localparam logic [EX_N_EDGES-1:0][EX_STATE_W-1:0] EX_E_SRC = {S_8B, S_5,  S_4, S_1};
  localparam logic [EX_N_EDGES-1:0][EX_STATE_W-1:0] EX_E_DST = {S_4,  S_7A, S_9, S_3};
  // For a normal edge: its increment. For a feedback edge: the weight of the
  // auxiliary edge from its source to SExit (added before the path is closed).
  localparam logic [EX_N_EDGES-1:0][EX_TRACE_W-1:0] EX_E_INC = {4'd0, 4'd1, 4'd2, 4'd3};
  localparam logic [EX_N_EDGES-1:0]                 EX_E_FB  = 4'b1000;
  // For a feedback edge: weight of the auxiliary edge SEntry -> its target.
  localparam logic [EX_N_EDGES-1:0][EX_TRACE_W-1:0] EX_E_RST = {4'd6, 4'd0, 4'd0, 4'd0};

  // Final states (path complete) and call states (running path checked).
  localparam logic [EX_NSTATES-1:0] EX_FINAL = EX_NSTATES'(1) << S_EXIT;
  localparam logic [EX_NSTATES-1:0] EX_CALL  = EX_NSTATES'(1) << S_3;
  // Number of path-graph paths from each call state to SExit, minus one:
  // a running path with partial sum P at state v is valid for expected id E
  // iff 0 <= E - P <= NumPaths(v) - 1. From S3: paths 3, 4, 5.
  localparam logic [EX_NSTATES-1:0][EX_TRACE_W-1:0] EX_SPAN_M1 =
    (EX_NSTATES*EX_TRACE_W)'(2) << (S_3 * EX_TRACE_W);

  // ---------------- init() callee FSM ----------------
  localparam int unsigned IN_STATE_W = 2;
  typedef enum logic [IN_STATE_W-1:0] {
    C_IDLE = 2'd0,
    C_LOAD = 2'd1,
    C_EXIT = 2'd2
  } init_state_e;

  localparam int unsigned IN_NSTATES  = 2 ** IN_STATE_W;
  localparam int unsigned IN_TRACE_W  = 1;  // single path, id 0
  localparam int unsigned IN_META_W   = 3;
  localparam int unsigned IN_MAX_TRACE = 4;
  localparam int unsigned IN_N_EDGES  = 1;
  localparam logic [IN_N_EDGES-1:0][IN_STATE_W-1:0] IN_E_SRC = C_IDLE;
  localparam logic [IN_N_EDGES-1:0][IN_STATE_W-1:0] IN_E_DST = C_LOAD;
  localparam logic [IN_N_EDGES-1:0][IN_TRACE_W-1:0] IN_E_INC = 1'b0;
  localparam logic [IN_N_EDGES-1:0]                 IN_E_FB  = 1'b0;
  localparam logic [IN_N_EDGES-1:0][IN_TRACE_W-1:0] IN_E_RST = 1'b0;
  localparam logic [IN_NSTATES-1:0] IN_FINAL = IN_NSTATES'(1) << C_EXIT;
  localparam logic [IN_NSTATES-1:0] IN_CALL  = '0;
  localparam logic [IN_NSTATES-1:0][IN_TRACE_W-1:0] IN_SPAN_M1 = '0;

  // ---------------- golden reference ----------------
  localparam int unsigned EX_ENTRY_W = EX_META_W + EX_TRACE_W;
  localparam int unsigned IN_ENTRY_W = IN_META_W + IN_TRACE_W;

  typedef struct packed {
    logic [7:0]                                  len;
    logic [EX_MAX_TRACE-1:0][EX_ENTRY_W-1:0]     ent;
  } ex_trace_t;

  typedef struct packed {
    logic [7:0]                                  len;
    logic [IN_MAX_TRACE-1:0][IN_ENTRY_W-1:0]     ent;
  } in_trace_t;

  // Maximum loop bound of the example function.
  localparam int signed LOOP_BOUND = 10;

  // Append a completed path to an EOPT trace: repeat the last entry if it
  // has the same id and its count is not saturated, else start a new entry.
  function automatic ex_trace_t ex_append(ex_trace_t t, logic [EX_TRACE_W-1:0] id);
    ex_trace_t r = t;
    logic [EX_TRACE_W-1:0] last_id;
    logic [EX_META_W-1:0]  last_rep;
    if (r.len != 0) begin
      {last_rep, last_id} = r.ent[r.len-1];
      if (last_id == id && last_rep != {EX_META_W{1'b1}}) begin
        r.ent[r.len-1] = {last_rep + EX_META_W'(1), id};
        return r;
      end
    end
    if (int'(r.len) < EX_MAX_TRACE) begin
      r.ent[r.len] = {EX_META_W'(0), id};
      r.len = r.len + 8'd1;
    end
    return r;
  endfunction

  // Software execution of the example function with EPP instrumentation.
  function automatic ex_trace_t ex_golden(bit in1, int signed a, int signed init_value,
                                          int signed cur0, int signed iter0,
                                          int signed coeff);
    ex_trace_t t = '0;
    int unsigned r;
    int signed target, current, iter;
    current = cur0;
    iter    = iter0;
    r = 0;                               // BBEntry -> BB1
    if (in1) target = a;                 // BB1 -> BB2 : 0
    else begin
      target = init_value;               // BB1 -> BB3 : 3
      r = r + 3;
    end
    while (target != current && iter < LOOP_BOUND) begin   // BB4 -> BB5 : 0
      iter = iter + 1;
      if (current < target) current = current * current;   // BB5 -> BB6 : 0
      else begin
        current = current * coeff;                             // BB5 -> BB7 : 1
        r = r + 1;
      end
      t = ex_append(t, EX_TRACE_W'(r));  // BB8 -> BBExit (aux) : 0, path closed
      r = 6;                             // BBEntry -> BB4 (aux) : 6
    end
    r = r + 2;                           // BB4 -> BB9 : 2
    t = ex_append(t, EX_TRACE_W'(r));    // BB9 -> BBExit
    return t;
  endfunction

  // Golden trace of init(): one path (id 0) per call.
  function automatic in_trace_t in_golden(int unsigned calls);
    in_trace_t t = '0;
    int unsigned left = calls;
    while (left != 0 && int'(t.len) < IN_MAX_TRACE) begin
      int unsigned n = (left > (2 ** IN_META_W)) ? (2 ** IN_META_W) : left;
      t.ent[t.len] = {IN_META_W'(n - 1), IN_TRACE_W'(0)};
      t.len  = t.len + 8'd1;
      left   = left - n;
    end
    return t;
  endfunction

  // Predefined input of the default configuration and its golden traces.
  localparam bit        DEF_GOLD_IN1   = 1'b0;
  localparam int signed DEF_GOLD_A     = 5;
  localparam int signed DEF_GOLD_INIT  = 100;
  localparam int signed DEF_GOLD_CUR0  = 2;
  localparam int signed DEF_GOLD_ITER0 = 0;
  localparam int signed DEF_GOLD_COEFF = 0;
  localparam ex_trace_t EX_GOLD = ex_golden(DEF_GOLD_IN1, DEF_GOLD_A, DEF_GOLD_INIT, DEF_GOLD_CUR0,
                                            DEF_GOLD_ITER0, DEF_GOLD_COEFF);

endpackage
