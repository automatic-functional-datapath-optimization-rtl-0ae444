// fame5_b: the FAME5 form of target module B: one host module that runs
// THREADS independent copies of B by multithreading.
//
// The state (the per-copy counter sent) and every port are replicated per
// thread; B's combinational logic (fame_ex_pkg) exists once and works on the
// thread chosen by a thread scheduler. Per thread m:
//   io_ready[m] = its input FAME Register is not host empty and its output
//                 FAME Queue offers it a token (not host full)
//   selected[m] = the scheduler's thread id equals m
//   fire[m]     = io_ready[m] & selected[m]
// Thread m's state updates and token transfers happen only when fire[m] is
// high, so each copy sees exactly the target behaviour of a lone B.
//
// Ports of thread m: reg_* connect to the deq side of its A->B FAME Register,
// q_* to the enq side of its B->A FAME Queue.
//
// Replication, IO-ready, thread-selected and per-thread fire follow the
// source. The scheduler is the round-robin counter of thread_sched in fixed
// mode (one step per host cycle), this design's choice.
module fame5_b
  import fame_ex_pkg::*;
#(
  parameter int unsigned THREADS = 4,
  localparam int unsigned TW     = (THREADS > 1) ? $clog2(THREADS) : 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [THREADS-1:0] reg_deq_valid,
  output logic [THREADS-1:0] reg_deq_ready,
  input  fword_t             reg_data       [THREADS],
  input  logic [THREADS-1:0] q_enq_host_ready,
  output logic [THREADS-1:0] q_enq_fire,
  input  logic [THREADS-1:0] q_enq_tgt_ready,
  output logic [THREADS-1:0] q_enq_tgt_valid,
  output fword_t             q_enq_data     [THREADS],
  output fword_t             sent           [THREADS]
);

  fword_t             sent_q [THREADS];
  logic [TW-1:0]      sel;
  logic               sel_valid;
  logic [THREADS-1:0] io_ready, selected, fire;
  fword_t             r_sel;
  logic               v_sel;
  fword_t             d_sel;

  thread_sched #(.THREADS(THREADS), .DYNAMIC(1'b0)) u_sched (
    .clk, .rst, .eligible('1), .stall(1'b0), .sel, .sel_valid
  );

  // One copy of B's combinational logic, fed by the selected thread.
  assign r_sel = reg_data[sel];
  assign v_sel = b_enq_valid(r_sel);
  assign d_sel = b_enq_data(r_sel, sent_q[sel]);

  for (genvar m = 0; m < THREADS; m++) begin : g_thr
    assign io_ready[m]        = reg_deq_valid[m] && q_enq_host_ready[m];
    assign selected[m]        = sel_valid && (sel == TW'(m));
    assign fire[m]            = io_ready[m] && selected[m];
    assign reg_deq_ready[m]   = fire[m];
    assign q_enq_fire[m]      = fire[m];
    assign q_enq_tgt_valid[m] = v_sel;
    assign q_enq_data[m]      = d_sel;
    assign sent[m]            = sent_q[m];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int m = 0; m < int'(THREADS); m++) sent_q[m] <= '0;
    end else if (fire[sel] && v_sel && q_enq_tgt_ready[sel]) begin
      sent_q[sel] <= sent_q[sel] + 1'b1;
    end
  end

endmodule
