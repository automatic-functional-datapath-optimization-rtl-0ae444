// tgt_a: target module A of the FAME example (behaviour in fame_ex_pkg).
//
// en is the target clock enable: in the unpartitioned target design it is
// tied high; in the FAME1 form it is the fire-target-clock signal, so every
// state update of A happens exactly once per target cycle. Outputs are
// combinational functions of the state and of the queue head.
module tgt_a
  import fame_ex_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   en,
  output fword_t reg_out,     // value written into the A->B register
  input  logic   deq_valid,   // B->A queue
  input  fword_t deq_data,
  output logic   deq_ready,
  output fword_t acc,
  output fword_t cnt
);

  fword_t cnt_q, acc_q;

  assign reg_out   = a_reg_out(cnt_q, acc_q);
  assign deq_ready = a_deq_ready(cnt_q);
  assign acc       = acc_q;
  assign cnt       = cnt_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q <= '0;
      acc_q <= '0;
    end else if (en) begin
      cnt_q <= cnt_q + 1'b1;
      if (deq_valid && deq_ready) acc_q <= acc_q + deq_data;
    end
  end

endmodule
