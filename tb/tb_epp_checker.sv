// tb_epp_checker: self-checking test of the control flow checker.
//
// The testbench plays the part of the checked FSM: it drives present_state
// and next_state of the example function's state graph, cycle by cycle,
// for runs described by the branch taken in S1 and the branch taken in
// each loop iteration. Path identifiers are taken from the example's table
// of valid paths (not from the checker's tables), and the expected trace
// is written out by hand in EOPT form.
//
// Instance u_chk uses the example's real configuration with the trace
//   3, 6, 7, 6, 6, 6, 8, 2  ->  {3}{6}{7}{6 x3}{8}{2}
// Scenarios (each after a reset): an exact match; a wrong path detected in
// the final state; a wrong path detected by the delayed check after the
// feedback edge; a wrong branch caught in the call state S3; a path beyond
// the end of the trace. Instance u_chk2 additionally treats the loop header
// S4 as a call state, so that a delayed mismatch and a current-state
// mismatch fall in the same cycle; the delayed one must win. For every
// mismatch the offset, the scope identifier and the cycle the fault rises
// (one cycle after the FSM state, two for the delayed check) are checked,
// and the report must hold afterwards. Instance u_chk3 holds the path
// sequence <0, 8> of the example's worked trace. Instance u_chk4 has a
// call scheduled in S2 and expects path 5; a run that wrongly branches to
// S2 must be reported there. Finally, random
// multi-run trajectories are checked against a predictor that walks the
// expanded expected trace.
module tb_epp_checker;
  import example_pkg::*;

  localparam int unsigned EW = EX_META_W + EX_TRACE_W;
  typedef logic [EX_MAX_TRACE-1:0][EW-1:0] trace_t;

  function automatic trace_t mk_trace1();
    trace_t t = '0;
    t[0] = {3'd0, 4'd3};
    t[1] = {3'd0, 4'd6};
    t[2] = {3'd0, 4'd7};
    t[3] = {3'd2, 4'd6};
    t[4] = {3'd0, 4'd8};
    t[5] = {3'd0, 4'd2};
    return t;
  endfunction

  function automatic trace_t mk_trace2();
    trace_t t = '0;
    t[0] = {3'd0, 4'd4};
    t[1] = {3'd0, 4'd3};
    return t;
  endfunction

  localparam logic [EX_NSTATES-1:0] CALL2 = EX_CALL | (EX_NSTATES'(1) << S_4);
  localparam logic [EX_NSTATES-1:0][EX_TRACE_W-1:0] SPAN2 =
    EX_SPAN_M1 | ((EX_NSTATES*EX_TRACE_W)'(2) << (S_4 * EX_TRACE_W));

  logic clk = 1'b0;
  logic rst_n;
  logic [EX_STATE_W-1:0] ps, ns;
  logic       f1, f2;
  logic [7:0] id1, id2;
  logic [4:0] off1, off2;

  always #5 clk = ~clk;

  epp_checker #(
    .CHECKER_ID (7), .TRACE_LEN (6), .TRACE_INIT (mk_trace1())
  ) u_chk (
    .clk (clk), .rst_n (rst_n), .present_state (ps), .next_state (ns),
    .fault_o (f1), .scope_id_o (id1), .offset_o (off1)
  );

  epp_checker #(
    .CHECKER_ID (9), .TRACE_LEN (2), .TRACE_INIT (mk_trace2()),
    .CALL_STATES (CALL2), .CALL_SPAN_M1 (SPAN2)
  ) u_chk2 (
    .clk (clk), .rst_n (rst_n), .present_state (ps), .next_state (ns),
    .fault_o (f2), .scope_id_o (id2), .offset_o (off2)
  );

  logic       f3;
  logic [7:0] id3;
  logic [4:0] off3;

  function automatic trace_t mk_trace3();
    trace_t t = '0;
    t[0] = {3'd0, 4'd0};
    t[1] = {3'd0, 4'd8};
    return t;
  endfunction

  epp_checker #(
    .CHECKER_ID (3), .TRACE_LEN (2), .TRACE_INIT (mk_trace3())
  ) u_chk3 (
    .clk (clk), .rst_n (rst_n), .present_state (ps), .next_state (ns),
    .fault_o (f3), .scope_id_o (id3), .offset_o (off3)
  );

  function automatic trace_t mk_trace4();
    trace_t t = '0;
    t[0] = {3'd0, 4'd5};
    return t;
  endfunction

  // Checker 4: a call scheduled in S2 (paths 0, 1, 2 pass through it), and
  // the expected path 5 (S1, S3, S4, S9).
  localparam logic [EX_NSTATES-1:0] CALL4 = EX_NSTATES'(1) << S_2;
  localparam logic [EX_NSTATES-1:0][EX_TRACE_W-1:0] SPAN4 =
    (EX_NSTATES*EX_TRACE_W)'(2) << (S_2 * EX_TRACE_W);
  logic       f4;
  logic [7:0] id4;
  logic [4:0] off4;

  epp_checker #(
    .CHECKER_ID (4), .TRACE_LEN (1), .TRACE_INIT (mk_trace4()),
    .CALL_STATES (CALL4), .CALL_SPAN_M1 (SPAN4)
  ) u_chk4 (
    .clk (clk), .rst_n (rst_n), .present_state (ps), .next_state (ns),
    .fault_o (f4), .scope_id_o (id4), .offset_o (off4)
  );

  int checks = 0;
  int failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- FSM trajectory builder ----------------
  ex_state_e seq[$];
  int exit_idx[$], fb_idx[$], call_idx[$], s2_idx[$];

  // Checking events in time order, for the generic predictor:
  // kind 0 = call state (partial sum 3), 1 = feedback edge, 2 = final state.
  typedef struct { int kind; int idx; int id; } ev_t;
  ev_t evs[$];

  function automatic void clear_seq();
    seq.delete(); exit_idx.delete(); fb_idx.delete(); call_idx.delete(); evs.delete();
    s2_idx.delete();
    seq.push_back(S_ENTRY); seq.push_back(S_ENTRY);
  endfunction

  // in1: branch in S1; mult[i]: iteration i takes the else branch (BB7).
  function automatic void add_run(bit in1, int n_iter, int unsigned mult);
    int base;
    base = in1 ? 0 : 3;                // path ids of the example's path table
    seq.push_back(S_1);
    if (in1) begin
      s2_idx.push_back(seq.size()); seq.push_back(S_2);
    end else begin
      evs.push_back('{0, seq.size(), 3});
      call_idx.push_back(seq.size()); seq.push_back(S_3);
      seq.push_back(S_3W); seq.push_back(S_3W); seq.push_back(S_3W);
    end
    for (int i = 0; i < n_iter; i++) begin
      seq.push_back(S_4); seq.push_back(S_5);
      if (mult[i]) begin seq.push_back(S_7A); seq.push_back(S_7B); end
      else         seq.push_back(S_6);
      seq.push_back(S_8A);
      evs.push_back('{1, seq.size(), (i == 0 ? base : 6) + (mult[i] ? 1 : 0)});
      fb_idx.push_back(seq.size()); seq.push_back(S_8B);
    end
    seq.push_back(S_4); seq.push_back(S_9);
    evs.push_back('{2, seq.size(), (n_iter == 0 ? base + 2 : 8)});
    exit_idx.push_back(seq.size()); seq.push_back(S_EXIT);
    seq.push_back(S_ENTRY); seq.push_back(S_ENTRY);
  endfunction

  bit both2;
  int rise4;

  // Drive the trajectory; return the first cycle index at which each
  // checker's fault output is high (-1 if never), and check that it holds.
  task automatic play(output int rise1, output int rise2,
                      output logic [4:0] o1, output logic [4:0] o2);
    rise1 = -1; rise2 = -1; o1 = '0; o2 = '0;
    rst_n = 1'b0;
    ps = S_ENTRY; ns = S_ENTRY;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < seq.size() + 4; i++) begin
      ps = (i < seq.size()) ? seq[i] : S_ENTRY;
      ns = (i + 1 < seq.size()) ? seq[i+1] : S_ENTRY;
      #1;
      if (f1 && rise1 < 0) begin rise1 = i; o1 = off1; end
      if (f4 && rise4 < 0) rise4 = i;
      if (f2 && rise2 < 0) begin
        rise2 = i; o2 = off2;
        both2 = u_chk2.cur_mis && u_chk2.dly_mis;
      end
      if (rise1 >= 0) check(f1 && off1 == o1, "checker 1 report not held");
      @(posedge clk); #1;
    end
  endtask

  int r1, r2;
  logic [4:0] o1, o2;

  task automatic expect_fault(input string name, input int rise, input int want_rise,
                              input logic [4:0] off, input logic [4:0] want_off);
    check(rise == want_rise, $sformatf("%s: fault at cycle %0d, expected %0d", name, rise, want_rise));
    check(off == want_off, $sformatf("%s: offset %0d, expected %0d", name, off, want_off));
  endtask

  initial begin
    rst_n = 1'b0;
    ps = S_ENTRY; ns = S_ENTRY;

    // 1. exact match: 3,6,7,6,6,6,8 then 2
    clear_seq();
    add_run(1'b0, 6, 6'b000100);
    add_run(1'b1, 0, 0);
    play(r1, r2, o1, o2);
    check(r1 < 0, "match: unexpected fault");
    check(u_chk.cur_off == 5'd6, $sformatf("match: trace consumed up to %0d, expected 6", u_chk.cur_off));
    check(id1 == 8'd7 && id2 == 8'd9, "scope identifiers");

    // 2. final-state mismatch: 3,6,7,6,6,8 -> path 8 where the third 6 is due
    clear_seq();
    add_run(1'b0, 5, 5'b00100);
    play(r1, r2, o1, o2);
    expect_fault("final", r1, exit_idx[0] + 1, o1, 5'd3);

    // 3. delayed mismatch on the feedback edge: 3,7 -> 7 where 6 is due
    clear_seq();
    add_run(1'b0, 6, 6'b000110);
    play(r1, r2, o1, o2);
    expect_fault("feedback", r1, fb_idx[1] + 2, o1, 5'd1);

    // 4. call-state mismatch: second run takes BB3 where path 2 is due
    clear_seq();
    add_run(1'b0, 6, 6'b000100);
    add_run(1'b0, 0, 0);
    play(r1, r2, o1, o2);
    expect_fault("call", r1, call_idx[1] + 1, o1, 5'd5);

    // 5. beyond the end of the trace
    clear_seq();
    add_run(1'b0, 6, 6'b000100);
    add_run(1'b1, 0, 0);
    add_run(1'b1, 0, 0);
    play(r1, r2, o1, o2);
    expect_fault("end of trace", r1, exit_idx[2] + 1, o1, 5'd6);

    // 6. delayed and current mismatch in the same cycle (checker 2):
    //    path 3 closes where 4 is due (offset 0), and in S4 the running
    //    path (6) cannot become the next expected one (3, offset 1).
    clear_seq();
    add_run(1'b0, 2, 2'b00);
    play(r1, r2, o1, o2);
    expect_fault("both", r2, fb_idx[0] + 2, o2, 5'd0);
    check(both2, "both: the two mismatches did not coincide");

    // 7. the worked example: BBEntry BB1 BB2 BB4 BB5 BB6 BB8 BB4 BB9 BBExit
    //    is the path sequence 0, 8; the software model must produce it and
    //    checker 3 (trace {0}{8}) must accept the FSM run.
    begin
      ex_trace_t g;
      g = ex_golden(1'b1, 4, 0, 2, 0, 1);
      check(g.len == 8'd2 && g.ent[0] == 7'h00 && g.ent[1] == 7'h08,
            "software model: worked example is not <0, 8>");
    end
    clear_seq();
    add_run(1'b1, 1, 1'b0);
    play(r1, r2, o1, o2);
    check(!f3 && u_chk3.cur_off == 5'd2, "worked example <0, 8> rejected");

    // 9. a call in S2 while path 5 is expected: the wrong branch S1 -> S2
    //    is reported by this checker in S2, before the call could start.
    clear_seq();
    add_run(1'b0, 0, 0);
    play(r1, r2, o1, o2);
    check(!f4, "call in S2: expected path 5 rejected");
    clear_seq();
    add_run(1'b1, 0, 0);
    rise4 = -1;
    play(r1, r2, o1, o2);
    check(rise4 == s2_idx[0] + 1 && off4 == 5'd0,
          $sformatf("call in S2: fault at %0d (expected %0d), offset %0d", rise4, s2_idx[0] + 1, off4));

    // 8. random runs against checker 1, outcome from the predictor below
    for (int n = 0; n < 60; n++) begin
      int p_rise;
      logic [4:0] p_off;
      clear_seq();
      if (n % 3 == 0) begin
        // the expected trajectory, sometimes cut short
        add_run(1'b0, 6, 6'b000100);
        if ($urandom_range(0, 1) == 1) add_run(1'b1, 0, 0);
      end else if (n % 3 == 1) begin
        // the expected trajectory with one change in the first run
        add_run(1'b0, 6 + int'($urandom_range(0, 2)) - 1,
                6'b000100 ^ (($urandom_range(0, 1) == 1) ? (1 << $urandom_range(0, 6)) : 0));
        add_run(1'($urandom), 0, 0);
      end else begin
        for (int r = 0; r < int'($urandom_range(1, 3)); r++)
          add_run(1'($urandom), int'($urandom_range(0, 7)), $urandom);
      end
      predict(p_rise, p_off);
      play(r1, r2, o1, o2);
      check(r1 == p_rise, $sformatf("random %0d: fault at %0d, predicted %0d", n, r1, p_rise));
      if (p_rise >= 0) check(o1 == p_off, $sformatf("random %0d: offset %0d, predicted %0d", n, o1, p_off));
      if (p_rise >= 0) n_rand_mis++;
      else n_rand_ok++;
    end
    check(n_rand_mis > 0 && n_rand_ok > 0, "random runs did not cover both outcomes");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_rand_mis = 0, n_rand_ok = 0;

  // Trace of checker 1, expanded: 3 6 7 6 6 6 8 2, with the word of each.
  int exp_ids [8]  = '{3, 6, 7, 6, 6, 6, 8, 2};
  int exp_word [8] = '{0, 1, 2, 3, 3, 3, 4, 5};

  // First mismatch of checker 1 for the events in evs: a call state needs
  // 0 <= expected - 3 <= 2, a closed path needs id == expected; past the
  // trace every check fails (offset 6). Returns -1 if none.
  task automatic predict(output int rise, output logic [4:0] off);
    int p = 0;
    rise = -1; off = '0;
    foreach (evs[e]) begin
      bit bad;
      if (p >= 8) bad = 1'b1;
      else if (evs[e].kind == 0) bad = !(exp_ids[p] >= 3 && exp_ids[p] <= 5);
      else bad = (evs[e].id != exp_ids[p]);
      if (bad) begin
        rise = evs[e].idx + (evs[e].kind == 1 ? 2 : 1);
        off  = (p >= 8) ? 5'd6 : 5'(exp_word[p]);
        return;
      end
      if (evs[e].kind != 0) p++;
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
