// fame5_system: THREADS copies of the two-module FAME example in which the
// THREADS copies of B are emulated by one multithreaded FAME5 module
// (fame5_b) while each copy of A keeps its own FAME1 wrapper. Copy m has its
// own A->B FAME Register and B->A FAME Queue; its target-cycle behaviour is
// that of a lone copy of the target design, whatever the host timing.
//
// host_en_a[m] may delay copy m's A (stands for other host activity).
// Outputs: per copy, A's accumulator, B's sent counter and the target cycles
// run by A and by B. Fire rule and token exchange as in fame1_system; the use of the
// FAME5 form for B only is this design's choice of example.
module fame5_system
  import fame_ex_pkg::*;
#(
  parameter int unsigned THREADS   = 4,
  parameter int unsigned REG_DEPTH = 2,
  parameter int unsigned Q_DEPTH   = 2
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [THREADS-1:0] host_en_a,
  output fword_t             a_acc    [THREADS],
  output fword_t             b_sent   [THREADS],
  output logic [31:0]        a_cycles [THREADS],
  output logic [31:0]        b_cycles [THREADS]
);

  logic [THREADS-1:0] fire_a, r_enq_ready, r_deq_valid, r_deq_ready;
  logic [THREADS-1:0] q_enq_host_ready, q_enq_fire, q_enq_tgt_ready, q_enq_tgt_valid;
  logic [THREADS-1:0] q_deq_host_valid, q_deq_tgt_valid, q_deq_tgt_ready;
  fword_t             a_rv [THREADS], r_data [THREADS], q_enq_data [THREADS];
  fword_t             q_deq_data [THREADS];

  fame5_b #(.THREADS(THREADS)) u_b5 (
    .clk, .rst,
    .reg_deq_valid(r_deq_valid), .reg_deq_ready(r_deq_ready), .reg_data(r_data),
    .q_enq_host_ready, .q_enq_fire, .q_enq_tgt_ready, .q_enq_tgt_valid, .q_enq_data,
    .sent(b_sent)
  );

  for (genvar m = 0; m < THREADS; m++) begin : g_copy
    assign fire_a[m] = host_en_a[m] && r_enq_ready[m] && q_deq_host_valid[m];

    tgt_a u_a (
      .clk, .rst, .en(fire_a[m]), .reg_out(a_rv[m]),
      .deq_valid(q_deq_tgt_valid[m]), .deq_data(q_deq_data[m]),
      .deq_ready(q_deq_tgt_ready[m]), .acc(a_acc[m]), .cnt()
    );

    fame_reg #(.W(FW), .DEPTH(REG_DEPTH)) u_reg (
      .clk, .rst,
      .enq_valid(fire_a[m]), .enq_ready(r_enq_ready[m]), .enq_data(a_rv[m]),
      .deq_valid(r_deq_valid[m]), .deq_ready(r_deq_ready[m]), .deq_data(r_data[m])
    );

    fame_queue #(.W(FW), .DEPTH(Q_DEPTH)) u_q (
      .clk, .rst,
      .enq_host_ready(q_enq_host_ready[m]), .enq_fire(q_enq_fire[m]),
      .enq_tgt_ready(q_enq_tgt_ready[m]), .enq_tgt_valid(q_enq_tgt_valid[m]),
      .enq_data(q_enq_data[m]),
      .deq_host_valid(q_deq_host_valid[m]), .deq_fire(fire_a[m]),
      .deq_tgt_valid(q_deq_tgt_valid[m]), .deq_data(q_deq_data[m]),
      .deq_tgt_ready(q_deq_tgt_ready[m])
    );

    always_ff @(posedge clk) begin
      if (rst) begin
        a_cycles[m] <= '0;
        b_cycles[m] <= '0;
      end else begin
        if (fire_a[m])      a_cycles[m] <= a_cycles[m] + 1;
        if (r_deq_ready[m]) b_cycles[m] <= b_cycles[m] + 1;  // thread m of B fired
      end
    end
  end

endmodule
