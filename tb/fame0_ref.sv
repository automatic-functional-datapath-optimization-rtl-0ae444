// fame0_ref: the unpartitioned target design of the FAME example, for use as
// a reference: A writes an ordinary register that B reads, B produces into an
// ordinary queue that A consumes, and both run one target cycle per clock.
module fame0_ref
  import fame_ex_pkg::*;
#(
  parameter int unsigned Q_DEPTH = 2
) (
  input  logic   clk,
  input  logic   rst,
  output fword_t a_acc,
  output fword_t b_sent
);

  fword_t a_rv, r_q, q_enq_data, q_deq_data;
  logic   q_enq_valid, q_enq_ready, q_deq_valid, q_deq_ready;

  tgt_a u_a (.clk, .rst, .en(1'b1), .reg_out(a_rv), .deq_valid(q_deq_valid),
             .deq_data(q_deq_data), .deq_ready(q_deq_ready), .acc(a_acc), .cnt());
  tgt_b u_b (.clk, .rst, .en(1'b1), .reg_in(r_q), .enq_valid(q_enq_valid),
             .enq_data(q_enq_data), .enq_ready(q_enq_ready), .sent(b_sent));
  tgt_queue #(.W(FW), .DEPTH(Q_DEPTH)) u_q (.clk, .rst, .en(1'b1),
             .enq_valid(q_enq_valid), .enq_ready(q_enq_ready), .enq_data(q_enq_data),
             .deq_valid(q_deq_valid), .deq_ready(q_deq_ready), .deq_data(q_deq_data));

  always_ff @(posedge clk) begin
    if (rst) r_q <= '0;
    else     r_q <= a_rv;
  end

endmodule
