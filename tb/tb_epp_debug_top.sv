// tb_epp_debug_top: end-to-end test of the example accelerator with its
// two control flow checkers, at the default parameters (golden input
// in1=0, init()=100, current=2, iter=0, coeff=0, whose path sequence is
// 3, 6, 6, 7, 6, 6, 6, 6, 6, 6, 8).
//
// Runs:
//   1. the golden input: correct result, no fault, both traces consumed;
//   2. the same input again without reset: the caller's trace is used up,
//      so the caller reports in its call state S3, before init() runs and
//      before init()'s checker reports its own surplus call;
//   3. coeff=1: the fifth path is 7 where 6 is due, caught by the delayed
//      check after the feedback edge (offset 3, inside a repeated word);
//   4. in1=1: the first path is 0 where 3 is due, caught after the first
//      feedback edge (offset 0); init() is never called;
//   5. init() returns the initial current, the loop is skipped: path 5
//      where 3 is due, caught in the final state (offset 0).
// Each run's result is compared with a reference model. The cycle of each
// fault is checked against the FSM state that caused it (one cycle later,
// two for the delayed check). The checkers' mechanisms (final, call and
// delayed checks passing and failing, EOPT repeats, callee checks) are
// counted and each must occur at least once.
module tb_epp_debug_top;
  import example_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, in1 = 1'b0, done;
  logic signed [31:0] a = '0, init_value = '0, cur0 = '0, iter0 = '0, coeff = '0;
  logic signed [31:0] result, temp_rdata;
  logic [3:0] temp_raddr = '0;
  logic [1:0] chk_fault;
  logic [1:0][7:0] chk_scope, chk_offset;

  always #5 clk = ~clk;

  epp_debug_top dut (
    .clk (clk), .rst_n (rst_n), .start (start), .in1 (in1), .a (a),
    .init_value (init_value), .cur0 (cur0), .iter0 (iter0), .coeff (coeff),
    .done (done), .result (result), .temp_raddr (temp_raddr), .temp_rdata (temp_rdata),
    .chk_fault (chk_fault), .chk_scope (chk_scope), .chk_offset (chk_offset));

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- cycle bookkeeping ----------------
  int cyc = 0;
  ex_state_e st_hist [$];
  int rise [2];
  logic [7:0] rise_off [2];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    st_hist.push_back(ex_state_e'(dut.u_example.present_state));
    for (int c = 0; c < 2; c++)
      if (rst_n && chk_fault[c] && rise[c] < 0) begin
        rise[c]     = cyc;
        rise_off[c] = chk_offset[c];
      end
  end

  // ---------------- mechanism counters ----------------
  int n_final_pass, n_call_pass, n_dly_pass, n_final_mis, n_call_mis, n_dly_mis;
  int n_repeat, n_callee_pass;
  always @(posedge clk) if (rst_n) begin
    if (!dut.u_chk_example.u_notifier.halted) begin
      if (dut.u_chk_example.is_final && !dut.u_chk_example.cur_mis) n_final_pass++;
      if (dut.u_chk_example.is_final &&  dut.u_chk_example.cur_mis) n_final_mis++;
      if (dut.u_chk_example.is_call  && !dut.u_chk_example.cur_mis) n_call_pass++;
      if (dut.u_chk_example.is_call  &&  dut.u_chk_example.cur_mis) n_call_mis++;
      if (dut.u_chk_example.dly_pend && !dut.u_chk_example.dly_mis) n_dly_pass++;
      if (dut.u_chk_example.dly_mis) n_dly_mis++;
      if (dut.u_chk_example.path_done && !dut.u_chk_example.past_end &&
          dut.u_chk_example.rep_cnt != dut.u_chk_example.exp_rep) n_repeat++;
    end
    if (!dut.u_chk_init.u_notifier.halted && dut.u_chk_init.is_final &&
        !dut.u_chk_init.cur_mis) n_callee_pass++;
  end

  // ---------------- runs ----------------
  task automatic do_reset();
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    rise[0] = -1; rise[1] = -1;
    @(posedge clk); #1;
  endtask

  task automatic run(input bit i_in1, input int i_a, input int i_init, input int i_cur0,
                     input int i_iter0, input int i_coeff);
    int target, cur, it, n;
    cur = i_cur0; it = i_iter0;
    target = i_in1 ? i_a : i_init;
    while (target != cur && it < 10) begin
      it++;
      cur = (cur < target) ? cur * cur : cur * i_coeff;
    end
    in1 = i_in1; a = i_a; init_value = i_init; cur0 = i_cur0; iter0 = i_iter0; coeff = i_coeff;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    n = 0;
    while (!done && n < 1000) begin @(posedge clk); #1; n++; end
    check(done && result == cur, $sformatf("result %0d, expected %0d", result, cur));
    repeat (4) @(posedge clk); #1;
  endtask

  // state of the example FSM `back` cycles before cycle c
  function automatic ex_state_e st_at(int c);
    return (c >= 0 && c < st_hist.size()) ? st_hist[c] : S_ENTRY;
  endfunction

  task automatic expect_caller(input string name, input logic [7:0] off,
                               input ex_state_e cause, input int lat);
    check(rise[0] >= 0, $sformatf("%s: caller fault missing", name));
    check(rise_off[0] == off, $sformatf("%s: offset %0d, expected %0d", name, rise_off[0], off));
    check(chk_scope[0] == 8'd1, $sformatf("%s: scope id", name));
    check(st_at(rise[0] - lat) == cause,
          $sformatf("%s: FSM %0d cycles before the fault was %s, expected %s",
                    name, lat, st_at(rise[0] - lat).name(), cause.name()));
  endtask

  initial begin
    rise[0] = -1; rise[1] = -1;
    n_final_pass = 0; n_call_pass = 0; n_dly_pass = 0; n_final_mis = 0;
    n_call_mis = 0; n_dly_mis = 0; n_repeat = 0; n_callee_pass = 0;

    // 1. golden run
    do_reset();
    run(1'b0, 5, 100, 2, 0, 0);
    check(chk_fault == 2'b00, "golden: fault raised");
    check(dut.u_chk_example.cur_off == 5'd5, "golden: caller trace not consumed");
    check(dut.u_chk_init.cur_off == 3'd1, "golden: callee trace not consumed");
    for (int k = 1; k <= 10; k++) begin
      temp_raddr = 4'(k); #1;
      check(temp_rdata == ((k <= 3) ? (k == 1 ? 4 : (k == 2 ? 16 : 256)) : 0),
            $sformatf("golden: temp[%0d] = %0d", k, temp_rdata));
    end

    // 2. second run without reset: caller first, in its call state
    run(1'b0, 5, 100, 2, 0, 0);
    expect_caller("repeat", 8'd5, S_3, 1);
    check(rise[1] > rise[0], "repeat: callee must report after the caller");
    check(chk_offset[1] == 8'd1 && chk_scope[1] == 8'd2, "repeat: callee report");

    // 3. coeff = 1
    do_reset();
    run(1'b0, 5, 100, 2, 0, 1);
    expect_caller("coeff", 8'd3, S_8B, 2);
    check(!chk_fault[1], "coeff: callee fault");

    // 4. in1 = 1
    do_reset();
    run(1'b1, 100, 100, 2, 0, 0);
    expect_caller("in1", 8'd0, S_8B, 2);
    check(!chk_fault[1], "in1: callee fault");

    // 5. loop skipped
    do_reset();
    run(1'b0, 5, 2, 2, 0, 0);
    expect_caller("skip", 8'd0, S_EXIT, 1);
    check(!chk_fault[1], "skip: callee fault");

    $display("mechanisms: final pass %0d, call pass %0d, delayed pass %0d, EOPT repeats %0d, callee pass %0d, final mismatch %0d, call mismatch %0d, delayed mismatch %0d",
             n_final_pass, n_call_pass, n_dly_pass, n_repeat, n_callee_pass,
             n_final_mis, n_call_mis, n_dly_mis);
    check(n_final_pass > 0, "final-state check never passed");
    check(n_call_pass > 0, "call-state check never passed");
    check(n_dly_pass > 0, "delayed feedback check never passed");
    check(n_repeat > 0, "EOPT repeat never used");
    check(n_callee_pass > 0, "callee check never passed");
    check(n_final_mis > 0, "final-state mismatch never happened");
    check(n_call_mis > 0, "call-state mismatch never happened");
    check(n_dly_mis > 0, "delayed mismatch never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
