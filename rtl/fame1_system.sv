// fame1_system: the FAME1 form of a two-module target design. In the target
// design A writes a register that B reads, and B produces into a queue that A
// consumes. Partitioned for host (FPGA) execution, the register becomes a
// FAME Register (fame_reg) and the queue a FAME Queue (fame_queue), and each
// module gets a wrapper that fires its target clock:
//
//   fire_a = host_en_a & (A->B FAME Register not host full)
//                      & (B->A FAME Queue offers A a token)
//   fire_b = host_en_b & (A->B FAME Register not host empty)
//                      & (B->A FAME Queue offers B a token)
//
// A firing module updates its state (its state write enables are masked with
// fire), host-dequeues its input tokens and host-enqueues its output tokens.
// host_en_a/host_en_b stand for anything else on the host that may delay a
// module (they let a test give each side its own, random, host timing);
// whatever they do, the target-cycle behaviour of A and B is that of the
// target design. a_cycles/b_cycles count the target cycles each side has run.
//
// The wrapper structure and fire rule follow the source; the modules A and B,
// the register token depth and the queue depth are this design's choices.
module fame1_system
  import fame_ex_pkg::*;
#(
  parameter int unsigned REG_DEPTH = 2,
  parameter int unsigned Q_DEPTH   = 2
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   host_en_a,
  input  logic   host_en_b,
  output logic   fire_a,
  output logic   fire_b,
  output fword_t a_acc,
  output fword_t b_sent,
  output logic [31:0] a_cycles,
  output logic [31:0] b_cycles
);

  fword_t a_rv, r_data, q_enq_data, q_deq_data;
  logic   r_enq_ready, r_deq_valid;
  logic   q_enq_host_ready, q_deq_host_valid;
  logic   q_enq_tgt_ready, q_enq_tgt_valid, q_deq_tgt_valid, q_deq_tgt_ready;

  assign fire_a = host_en_a && r_enq_ready && q_deq_host_valid;
  assign fire_b = host_en_b && r_deq_valid && q_enq_host_ready;

  tgt_a u_a (
    .clk, .rst, .en(fire_a), .reg_out(a_rv),
    .deq_valid(q_deq_tgt_valid), .deq_data(q_deq_data), .deq_ready(q_deq_tgt_ready),
    .acc(a_acc), .cnt()
  );

  tgt_b u_b (
    .clk, .rst, .en(fire_b), .reg_in(r_data),
    .enq_valid(q_enq_tgt_valid), .enq_data(q_enq_data), .enq_ready(q_enq_tgt_ready),
    .sent(b_sent)
  );

  fame_reg #(.W(FW), .DEPTH(REG_DEPTH)) u_reg (
    .clk, .rst,
    .enq_valid(fire_a), .enq_ready(r_enq_ready), .enq_data(a_rv),
    .deq_valid(r_deq_valid), .deq_ready(fire_b), .deq_data(r_data)
  );

  fame_queue #(.W(FW), .DEPTH(Q_DEPTH)) u_q (
    .clk, .rst,
    .enq_host_ready(q_enq_host_ready), .enq_fire(fire_b),
    .enq_tgt_ready(q_enq_tgt_ready), .enq_tgt_valid(q_enq_tgt_valid), .enq_data(q_enq_data),
    .deq_host_valid(q_deq_host_valid), .deq_fire(fire_a),
    .deq_tgt_valid(q_deq_tgt_valid), .deq_data(q_deq_data), .deq_tgt_ready(q_deq_tgt_ready)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      a_cycles <= '0;
      b_cycles <= '0;
    end else begin
      if (fire_a) a_cycles <= a_cycles + 1;
      if (fire_b) b_cycles <= b_cycles + 1;
    end
  end

endmodule
