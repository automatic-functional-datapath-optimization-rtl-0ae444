// fame_queue: a FAME Queue, the host-side stand-in for one target queue that
// crosses a partition boundary.
//
// It holds the target queue's state for one target cycle t (a tgt_queue whose
// clock enable is the step signal). Each side exchanges one host token per
// target cycle with it:
//   producer side: while enq_host_ready is high the producer may fire; it then
//     sees enq_tgt_ready (queue not full in cycle t) and hands over its target
//     enq_tgt_valid/enq_data for cycle t.
//   consumer side: while deq_host_valid is high the consumer may fire; it then
//     sees deq_tgt_valid/deq_data (head of the queue in cycle t) and hands over
//     its target deq_tgt_ready for cycle t.
// A side that fires first has its target signals captured. When both sides
// have fired for cycle t (in the same host cycle or in different ones) the
// queue steps to t+1 and both sides may fire again. Reset leaves the queue
// empty at target cycle 0 with one token offered to each side.
//
// Token exchange, host ready/valid and the one-token reset follow the source.
// Allowing the two sides to be at most one target cycle apart at the queue
// (tokens are not buffered beyond that) is this design's simplification.
module fame_queue #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 2
) (
  input  logic         clk,
  input  logic         rst,
  // producer side
  output logic         enq_host_ready,
  input  logic         enq_fire,
  output logic         enq_tgt_ready,
  input  logic         enq_tgt_valid,
  input  logic [W-1:0] enq_data,
  // consumer side
  output logic         deq_host_valid,
  input  logic         deq_fire,
  output logic         deq_tgt_valid,
  output logic [W-1:0] deq_data,
  input  logic         deq_tgt_ready
);

  logic         enq_done_q, deq_done_q;
  logic         enq_v_q, deq_r_q;
  logic [W-1:0] enq_d_q;
  logic         step, enq_now, deq_now;
  logic         step_enq_v, step_deq_r;
  logic [W-1:0] step_enq_d;

  assign enq_host_ready = !enq_done_q;
  assign deq_host_valid = !deq_done_q;
  assign enq_now        = enq_fire && enq_host_ready;
  assign deq_now        = deq_fire && deq_host_valid;
  assign step           = (enq_done_q || enq_now) && (deq_done_q || deq_now);

  assign step_enq_v = enq_done_q ? enq_v_q : enq_tgt_valid;
  assign step_enq_d = enq_done_q ? enq_d_q : enq_data;
  assign step_deq_r = deq_done_q ? deq_r_q : deq_tgt_ready;

  tgt_queue #(.W(W), .DEPTH(DEPTH)) u_q (
    .clk, .rst, .en(step),
    .enq_valid(step_enq_v), .enq_ready(enq_tgt_ready), .enq_data(step_enq_d),
    .deq_valid(deq_tgt_valid), .deq_ready(step_deq_r), .deq_data
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      enq_done_q <= 1'b0;
      deq_done_q <= 1'b0;
      enq_v_q    <= 1'b0;
      deq_r_q    <= 1'b0;
      enq_d_q    <= '0;
    end else if (step) begin
      enq_done_q <= 1'b0;
      deq_done_q <= 1'b0;
    end else begin
      if (enq_now) begin
        enq_done_q <= 1'b1;
        enq_v_q    <= enq_tgt_valid;
        enq_d_q    <= enq_data;
      end
      if (deq_now) begin
        deq_done_q <= 1'b1;
        deq_r_q    <= deq_tgt_ready;
      end
    end
  end

endmodule
