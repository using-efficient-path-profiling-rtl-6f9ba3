// tb_epp_trace_rom: checks the trace memory. An 8-word memory with 5 valid
// words is filled from the formula word(i) = (37*i + 5) mod 128; every
// address, including those past the valid words and past the memory, must
// return the right {rep, path} split and end-of-trace flag. A second,
// one-word memory with no valid word must flag the end of trace at once.
module tb_epp_trace_rom;

  localparam int unsigned TW = 4, MW = 3, DEPTH = 8, LEN = 5;

  function automatic logic [DEPTH-1:0][MW+TW-1:0] mk_init();
    logic [DEPTH-1:0][MW+TW-1:0] t;
    for (int i = 0; i < DEPTH; i++) t[i] = 7'((37 * i + 5) % 128);
    return t;
  endfunction

  logic [3:0]    addr;
  logic [TW-1:0] path;
  logic [MW-1:0] rep;
  logic          past_end;
  logic [0:0]    addr0;
  logic [TW-1:0] path0;
  logic [MW-1:0] rep0;
  logic          past_end0;

  epp_trace_rom #(.TRACE_W (TW), .META_W (MW), .DEPTH (DEPTH), .LEN (LEN), .ADDR_W (4),
                  .INIT (mk_init())) dut (
    .addr (addr), .path (path), .rep (rep), .past_end (past_end));

  epp_trace_rom #(.TRACE_W (TW), .META_W (MW), .DEPTH (1), .LEN (0), .ADDR_W (1),
                  .INIT ('0)) dut0 (
    .addr (addr0), .path (path0), .rep (rep0), .past_end (past_end0));

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 10; i++) begin
      int w;
      addr = 4'(i);
      #1;
      w = (i < DEPTH) ? (37 * i + 5) % 128 : 0;
      checks++;
      if (path != TW'(w) || rep != MW'(w >> TW) || past_end != (i >= LEN)) begin
        failures++;
        $display("FAIL: addr %0d path %0d rep %0d end %0b", i, path, rep, past_end);
      end
    end
    addr0 = 1'b0;
    #1;
    checks++;
    if (!past_end0) begin
      failures++;
      $display("FAIL: empty trace not flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
