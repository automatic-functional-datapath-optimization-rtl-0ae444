// thread_sched: chooses which thread issues its next-state update into stage
// 0 of a multithreaded pipeline.
//
// Fixed interleave (DYNAMIC = 0): a counter steps through the threads in
// order, one step per cycle in which the issue slot is not stalled. A thread
// that may not run (eligible low) leaves its slot empty. With at least as many
// threads as pipeline stages no two updates of one thread are ever in flight.
//
// Dynamic interleave (DYNAMIC = 1): the next thread is the first eligible one
// after the last chosen thread (round robin). A thread is made ineligible while
// its long-latency unit is busy, so the slot goes to another thread.
//
// The selection is a register, the pipeline register in front of stage 0:
// sel and sel_valid change only on cycles where stall is low. Reset selects
// thread 0 in fixed mode and no thread in dynamic mode.
//
// The two policies and the counter of the fixed one follow the source. The
// source leaves the dynamic scheduler to the user; round robin over eligible
// threads is this design's own choice.
module thread_sched #(
  parameter int unsigned THREADS = 2,
  parameter bit          DYNAMIC = 1'b1,
  localparam int unsigned TW     = (THREADS > 1) ? $clog2(THREADS) : 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [THREADS-1:0] eligible,
  input  logic               stall,
  output logic [TW-1:0]      sel,
  output logic               sel_valid
);

  logic [TW-1:0] next_sel;
  logic          next_found;

  always_comb begin
    next_sel   = sel;
    next_found = 1'b0;
    if (DYNAMIC) begin
      for (int d = int'(THREADS); d >= 1; d--) begin
        int unsigned cand;
        cand = (int'(sel) + d) % THREADS;
        if (eligible[cand]) begin
          next_sel   = TW'(cand);
          next_found = 1'b1;
        end
      end
    end else begin
      next_sel   = (int'(sel) == int'(THREADS) - 1) ? '0 : sel + 1'b1;
      next_found = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sel       <= DYNAMIC ? TW'(THREADS - 1) : '0;  // dynamic: thread 0 is tried first
      sel_valid <= ~DYNAMIC;
    end else if (!stall) begin
      sel       <= next_sel;
      sel_valid <= next_found;
    end
  end

  // In fixed mode the slot is empty when the thread in it may not run.
  // The caller qualifies sel_valid with eligible[sel] for that purpose.

endmodule
