// tb_example_accel: checks the example function's FSM and datapath.
//
// A responder stands in for init(): it raises init_done with a chosen
// return value D cycles after the call. For each input set, the returned
// value, every temp[] word written, the done pulse and the number of
// cycles from start to done are compared with a reference model of the
// source code written here. The expected latency follows the state
// schedule: 5 cycles, plus D when init() is called, plus 5 per loop
// iteration through BB6 and 6 per iteration through BB7 (two-cycle
// multiply). next_state must always equal the following present_state.
module tb_example_accel;
  import example_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, in1 = 1'b0;
  logic signed [31:0] a = '0, cur0 = '0, iter0 = '0, coeff = '0;
  logic done, init_start, init_done;
  logic signed [31:0] result, init_ret, temp_rdata;
  logic [3:0] temp_raddr = '0;
  logic [EX_STATE_W-1:0] ps, ns, ns_prev;

  always #5 clk = ~clk;

  example_accel dut (
    .clk (clk), .rst_n (rst_n), .start (start), .in1 (in1), .a (a), .cur0 (cur0),
    .iter0 (iter0), .coeff (coeff), .done (done), .result (result),
    .init_start (init_start), .init_done (init_done), .init_ret (init_ret),
    .temp_raddr (temp_raddr), .temp_rdata (temp_rdata),
    .present_state (ps), .next_state (ns));

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // init() responder
  int d_wait = 2;
  logic signed [31:0] init_val = '0;
  int cnt_wait = -1;
  always_ff @(posedge clk) begin
    if (init_start) cnt_wait <= d_wait - 1;
    else if (cnt_wait > 0) cnt_wait <= cnt_wait - 1;
    else cnt_wait <= -1;
  end
  assign init_done = (cnt_wait == 0);
  assign init_ret  = init_val;

  // next_state / present_state consistency
  bit mon_on = 1'b0;
  always @(posedge clk) begin
    if (mon_on) check(ps == ns_prev, "present_state differs from previous next_state");
    ns_prev <= ns;
    mon_on  <= rst_n;
  end

  task automatic run(input bit i_in1, input int i_a, input int i_init, input int i_cur0,
                     input int i_iter0, input int i_coeff, input int d);
    int target, cur, it, exp_cycles, cyc;
    int temp_m [16];
    bit written [16];
    for (int k = 0; k < 16; k++) written[k] = 0;
    // reference model
    cur = i_cur0; it = i_iter0;
    target = i_in1 ? i_a : i_init;
    exp_cycles = 5 + (i_in1 ? 0 : d);
    while (target != cur && it < 10) begin
      it++;
      if (cur < target) begin cur = cur * cur; exp_cycles += 5; end
      else begin cur = cur * i_coeff; exp_cycles += 6; end
      temp_m[it & 15] = cur; written[it & 15] = 1;
    end
    // drive
    d_wait = d; init_val = i_init;
    in1 = i_in1; a = i_a; cur0 = i_cur0; iter0 = i_iter0; coeff = i_coeff;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 500) begin
      @(posedge clk); #1;
      cyc++;
    end
    check(done, "done never came");
    check(cyc == exp_cycles, $sformatf("latency %0d, expected %0d", cyc, exp_cycles));
    check(result == cur, $sformatf("result %0d, expected %0d", result, cur));
    @(posedge clk); #1;
    check(!done, "done longer than one cycle");
    for (int k = 0; k < 16; k++) if (written[k]) begin
      temp_raddr = 4'(k); #1;
      check(temp_rdata == temp_m[k], $sformatf("temp[%0d] = %0d, expected %0d", k, temp_rdata, temp_m[k]));
    end
    repeat (2) @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    run(1'b0, 5, 100, 2, 0, 0, 2);
    run(1'b1, 100, 0, 2, 0, 1, 2);
    run(1'b1, -5, 0, 3, 0, -2, 1);
    run(1'b0, 0, 2, 2, 0, 3, 3);
    run(1'b1, 7, 0, 7, 0, 3, 1);
    run(1'b0, 0, 50, 9, 4, 2, 1);
    for (int r = 0; r < 20; r++)
      run(1'($urandom), int'($urandom_range(0, 300)) - 100, int'($urandom_range(0, 300)) - 100,
          int'($urandom_range(0, 20)) - 5, int'($urandom_range(0, 9)),
          int'($urandom_range(0, 6)) - 3, int'($urandom_range(1, 4)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
