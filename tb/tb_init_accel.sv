// tb_init_accel: checks the init() callee. After each start pulse, done must
// come exactly two cycles later, for one cycle, with ret equal to the
// init_value present in the load state (the global is read when init() runs); the state outputs must walk idle, load, exit, idle,
// and next_state must equal the following present_state.
module tb_init_accel;
  import example_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  logic signed [31:0] init_value = '0, ret;
  logic [IN_STATE_W-1:0] ps, ns;

  always #5 clk = ~clk;

  init_accel dut (.clk (clk), .rst_n (rst_n), .start (start), .init_value (init_value),
                  .done (done), .ret (ret), .present_state (ps), .next_state (ns));

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < 8; r++) begin
      logic signed [31:0] v;
      logic [IN_STATE_W-1:0] nsv;
      v = $urandom;
      repeat (r % 3) begin
        @(posedge clk); #1;
        check(!done && ps == C_IDLE, "idle without start");
      end
      init_value = ~v; start = 1'b1; #1;
      check(ps == C_IDLE && ns == C_LOAD, "idle -> load");
      @(posedge clk); #1;
      start = 1'b0; init_value = v;
      check(!done && ps == C_LOAD && ns == C_EXIT, "load");
      @(posedge clk); #1;
      init_value = ~v; #1;
      check(done && ret == v && ps == C_EXIT && ns == C_IDLE, "done with ret");
      nsv = ns;
      @(posedge clk); #1;
      check(!done && ps == nsv, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
