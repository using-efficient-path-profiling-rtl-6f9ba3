// example_accel: FSM and datapath of the running example function.
//
//   BB1  cond = a > 0; if (in1)
//   BB2    target = a;
//        else
//   BB3    target = init();
//   BB4  while (target != current && iter < 10) {
//   BB5    iter++; if (current < target)
//   BB6      current = current * current;      (pow(current, 2))
//        else
//   BB7      current *= coeff;
//   BB8    temp[iter] = current; }
//   BB9  return current;
//
// Every basic block maps onto a consecutive run of FSM states: SEntry, S1,
// S2, S3 (+ S3W), S4, S5, S6, S7A-S7B, S8A-S8B, S9, SExit, the state graph
// of the example's FSM path graph; S8B -> S4 is the loop's feedback edge.
// The state register's input (next_state) and output (present_state) are
// brought out for the control flow checker; nothing in the FSM depends on
// the checker.
//
// Interface: `start` is sampled in SEntry (the idle state), which latches
// in1, a, cur0 (initial current), iter0 (initial iter) and coeff. init() is
// a separate functional module: S3 pulses `init_start`, S3W waits until
// `init_done` and takes `init_ret`. SExit pulses `done` with `result`
// (the returned current) valid and returns to SEntry. temp[] is a 16-word
// memory indexed by iter[3:0], readable through temp_raddr/temp_rdata
// (combinational read).
//
// What comes from the example: the source, the basic blocks, the FSM
// states and edges. This design's own: the operation schedule inside the
// states (two-cycle multiply in S7A/S7B, address then write in S8A/S8B),
// the caller wait state S3W, the start/done handshake, 32-bit signed
// integers with wrap-around, and dropping `cond`, which nothing reads.
module example_accel
  import example_pkg::*;
#(
  parameter int unsigned DATA_W = example_pkg::EX_DATA_W,
  parameter int signed   BOUND  = example_pkg::LOOP_BOUND
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     in1,
  input  logic signed [DATA_W-1:0] a,
  input  logic signed [DATA_W-1:0] cur0,
  input  logic signed [DATA_W-1:0] iter0,
  input  logic signed [DATA_W-1:0] coeff,
  output logic                     done,
  output logic signed [DATA_W-1:0] result,
  // call of init()
  output logic                     init_start,
  input  logic                     init_done,
  input  logic signed [DATA_W-1:0] init_ret,
  // temp[] read port
  input  logic [3:0]               temp_raddr,
  output logic signed [DATA_W-1:0] temp_rdata,
  // state register, for the checker
  output logic [EX_STATE_W-1:0]    present_state,
  output logic [EX_STATE_W-1:0]    next_state
);

  ex_state_e state_q, state_d;

  logic                     in1_q;
  logic signed [DATA_W-1:0] a_q, coeff_q, target_q, cur_q, iter_q, prod_q, result_q;
  logic [3:0]               waddr_q;
  logic signed [DATA_W-1:0] temp_mem [16];

  logic loop_cond, less;

  always_comb begin
    loop_cond = (target_q != cur_q) && (iter_q < DATA_W'(BOUND));
    less      = (cur_q < target_q);
    state_d   = state_q;
    unique case (state_q)
      S_ENTRY: if (start) state_d = S_1;
      S_1:     state_d = in1_q ? S_2 : S_3;
      S_2:     state_d = S_4;
      S_3:     state_d = S_3W;
      S_3W:    if (init_done) state_d = S_4;
      S_4:     state_d = loop_cond ? S_5 : S_9;
      S_5:     state_d = less ? S_6 : S_7A;
      S_6:     state_d = S_8A;
      S_7A:    state_d = S_7B;
      S_7B:    state_d = S_8A;
      S_8A:    state_d = S_8B;
      S_8B:    state_d = S_4;
      S_9:     state_d = S_EXIT;
      S_EXIT:  state_d = S_ENTRY;
      default: state_d = S_ENTRY;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= S_ENTRY;
    else        state_q <= state_d;
  end

  // Datapath registers, written according to the present state.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in1_q    <= 1'b0;
      a_q      <= '0;
      coeff_q  <= '0;
      target_q <= '0;
      cur_q    <= '0;
      iter_q   <= '0;
      prod_q   <= '0;
      result_q <= '0;
      waddr_q  <= '0;
    end else begin
      unique case (state_q)
        S_ENTRY: if (start) begin
          in1_q   <= in1;
          a_q     <= a;
          cur_q   <= cur0;
          iter_q  <= iter0;
          coeff_q <= coeff;
        end
        S_2:  target_q <= a_q;
        S_3W: if (init_done) target_q <= init_ret;
        S_5:  iter_q   <= iter_q + DATA_W'(1);
        S_6:  cur_q    <= cur_q * cur_q;
        S_7A: prod_q   <= cur_q * coeff_q;
        S_7B: cur_q    <= prod_q;
        S_8A: waddr_q  <= iter_q[3:0];
        S_9:  result_q <= cur_q;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state_q == S_8B) temp_mem[waddr_q] <= cur_q;
  end

  always_comb begin
    done          = (state_q == S_EXIT);
    result        = result_q;
    init_start    = (state_q == S_3);
    temp_rdata    = temp_mem[temp_raddr];
    present_state = state_q;
    next_state    = state_d;
  end

endmodule
