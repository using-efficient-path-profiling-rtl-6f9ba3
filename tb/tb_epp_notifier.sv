// tb_epp_notifier: checks the notifier. Before any mismatch the fault bit is
// low; a current-state mismatch reports its offset in the same cycle; the
// report is then held while later mismatches are ignored; when a delayed
// and a current mismatch coincide, the delayed offset is reported; reset
// clears the report. The scope identifier is always CHECKER_ID.
module tb_epp_notifier;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       cur_mis = 1'b0, dly_mis = 1'b0;
  logic [4:0] cur_off = '0, dly_off = '0;
  logic       fault, halted;
  logic [7:0] scope_id;
  logic [4:0] offset;

  always #5 clk = ~clk;

  epp_notifier #(.ID_W (8), .CHECKER_ID (42), .OFF_W (5)) dut (
    .clk (clk), .rst_n (rst_n), .cur_mis (cur_mis), .cur_off (cur_off),
    .dly_mis (dly_mis), .dly_off (dly_off), .fault (fault), .scope_id (scope_id),
    .offset (offset), .halted (halted));

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    cur_off = 5'd3; dly_off = 5'd9;
    @(posedge clk); #1;
    check(!fault && !halted, "idle fault");
    check(scope_id == 8'd42, "scope id");
    // current mismatch
    cur_mis = 1'b1; #1;
    check(fault && offset == 5'd3, "current mismatch not reported at once");
    @(posedge clk); #1;
    cur_mis = 1'b0; cur_off = 5'd11;
    check(halted && fault && offset == 5'd3, "report not held");
    dly_mis = 1'b1; #1;
    check(fault && offset == 5'd3, "later mismatch overwrote the first");
    @(posedge clk); #1;
    dly_mis = 1'b0;
    // reset, then both at once
    rst_n = 1'b0; #1;
    check(!fault && !halted, "reset did not clear");
    @(posedge clk); #1 rst_n = 1'b1;
    cur_off = 5'd4; dly_off = 5'd2; cur_mis = 1'b1; dly_mis = 1'b1; #1;
    check(fault && offset == 5'd2, "delayed mismatch must win");
    @(posedge clk); #1;
    cur_mis = 1'b0; dly_mis = 1'b0;
    check(halted && offset == 5'd2, "delayed report not held");
    // reset, delayed alone
    rst_n = 1'b0; @(posedge clk); #1 rst_n = 1'b1;
    cur_off = 5'd7; dly_off = 5'd6; dly_mis = 1'b1; #1;
    check(fault && offset == 5'd6, "delayed mismatch alone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
