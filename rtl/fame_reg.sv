// fame_reg: a FAME Register, the host-side stand-in for one target register
// that crosses a partition boundary.
//
// It is a FIFO of tokens; each token is the value of the target register in
// one target clock cycle, older cycles nearer the head. The producer module
// host-enqueues (enq_valid & enq_ready) the value it writes into the register
// in its target cycle t, which is the register's value in cycle t+1. The
// consumer host-dequeues (deq_valid & deq_ready) the register's value for its
// own current target cycle. Reset leaves exactly one token, INIT, the target
// register's reset value, so the consumer can run target cycle 0 at once and
// the two sides may drift up to DEPTH target cycles apart.
//
// enq_ready = not host full, deq_valid = not host empty; deq_data is the head
// token (combinational). Tokens and the one-token reset follow the source; the
// depth is this design's choice.
module fame_reg #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 4,
  parameter logic [W-1:0] INIT = '0
) (
  input  logic         clk,
  input  logic         rst,
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
  assign do_enq    = enq_valid && enq_ready;
  assign do_deq    = deq_valid && deq_ready;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (int'(p) == int'(DEPTH) - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      mem_q[0] <= INIT;
      head_q   <= '0;
      tail_q   <= (DEPTH > 1) ? AW'(1) : '0;
      count_q  <= (AW+1)'(1);
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
