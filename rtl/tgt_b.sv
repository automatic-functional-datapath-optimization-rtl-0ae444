// tgt_b: target module B of the FAME example (behaviour in fame_ex_pkg).
//
// en is the target clock enable (tied high in the target design, the
// fire-target-clock signal in its FAME1 form). It reads the A->B register and
// produces into the B->A queue; sent counts the entries the queue accepted.
module tgt_b
  import fame_ex_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   en,
  input  fword_t reg_in,      // current value of the A->B register
  output logic   enq_valid,   // B->A queue
  output fword_t enq_data,
  input  logic   enq_ready,
  output fword_t sent
);

  fword_t sent_q;

  assign enq_valid = b_enq_valid(reg_in);
  assign enq_data  = b_enq_data(reg_in, sent_q);
  assign sent      = sent_q;

  always_ff @(posedge clk) begin
    if (rst)                                  sent_q <= '0;
    else if (en && enq_valid && enq_ready)    sent_q <= sent_q + 1'b1;
  end

endmodule
