// tb_epp_incr_rom: checks the increments memory of the example function.
// All 256 {present_state, next_state} pairs are read; the expected words
// come from the edge weights of the example's FSM path graph, written out
// here: S1->S3 adds 3, S4->S9 adds 2, S5->S7A adds 1, S8B->S4 is the
// feedback edge (exit-edge weight 0, restart at 6); all else is 0.
module tb_epp_incr_rom;
  import example_pkg::*;

  logic [EX_STATE_W-1:0] ps, ns;
  logic [EX_TRACE_W-1:0] inc, rst_val;
  logic                  fb;

  epp_incr_rom dut (.present_state (ps), .next_state (ns), .inc (inc),
                    .feedback (fb), .rst_val (rst_val));

  int checks = 0, failures = 0;

  initial begin
    for (int p = 0; p < 16; p++) begin
      for (int n = 0; n < 16; n++) begin
        int wi, wr;
        bit wf;
        ps = 4'(p); ns = 4'(n);
        #1;
        wi = 0; wr = 0; wf = 0;
        if (p == 1  && n == 3)  wi = 3;   // S1  -> S3
        if (p == 5  && n == 12) wi = 2;   // S4  -> S9
        if (p == 6  && n == 8)  wi = 1;   // S5  -> S7A
        if (p == 11 && n == 5) begin      // S8B -> S4
          wf = 1; wr = 6;
        end
        checks++;
        if (inc != 4'(wi) || rst_val != 4'(wr) || fb != wf) begin
          failures++;
          $display("FAIL: %0d->%0d inc %0d rst %0d fb %0b", p, n, inc, rst_val, fb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
