// tgt_queue: a plain target-machine FIFO queue with a target clock enable.
//
// enq_valid/enq_ready and deq_valid/deq_ready are ordinary target handshakes;
// an entry moves when both signals of a side are high in a cycle where en is
// high. en low freezes the queue, which is how a FAME wrapper holds the target
// clock. enq_ready = not full and deq_valid = not empty depend only on the
// stored state, never on the other side's signals in the same cycle.
// Reset empties it. Used as the state of a FAME Queue and as the target-side
// reference queue of the FAME example; its depth is this design's choice.
module tgt_queue #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         enq_valid,
  output logic         enq_ready,
  input  logic [W-1:0] enq_data,
  output logic         deq_valid,
  input  logic         deq_ready,
  output logic [W-1:0] deq_data
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem_q [DEPTH];
  logic [AW-1:0] head_q, tail_q;
  logic [AW:0]   count_q;
  logic          do_enq, do_deq;

  assign enq_ready = (count_q != (AW+1)'(DEPTH));
  assign deq_valid = (count_q != '0);
  assign deq_data  = mem_q[head_q];
  assign do_enq    = en && enq_valid && enq_ready;
  assign do_deq    = en && deq_valid && deq_ready;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (int'(p) == int'(DEPTH) - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else begin
      if (do_enq) begin
        mem_q[tail_q] <= enq_data;
        tail_q        <= incr(tail_q);
      end
      if (do_deq) head_q <= incr(head_q);
      count_q <= count_q + (AW+1)'(do_enq) - (AW+1)'(do_deq);
    end
  end

endmodule
