// spec_seq: a multithreaded three-stage pipelined sequencer whose PC-like
// register read port is resolved by speculation, showing the speculation
// control logic.
//
// The unpipelined datapath is one register pc and a jump table. Every update
// reads pc, looks up tbl[pc] and writes pc back with the jump target
// tbl[pc][AW-1:0] when the jump bit tbl[pc][AW] is set, or with pc + 1
// otherwise. It also sends the old pc value out on a ready/valid output port.
// Pipelined over three stages:
//   S0  read pc (the speculated read port), update the speculative clone
//   S1  jump table read
//   S2  next-pc computation, pc write, output port
// The pc read in S0 and the write in S2 form a read-after-write hazard on
// every update of the same thread.
//
// Threads: pc, its clone and the output port exist once per thread; the
// jump table and the logic exist once. A round-robin scheduler (dynamic
// interleave, every thread always eligible) picks the thread of S0, and the
// thread number travels down the pipe. Thread t starts at t * 2**AW / THREADS.
//
// With SPEC = 0 the hazard is interlocked: S0 holds while S1 or S2 holds an
// update of its thread. A single thread then gets one token every three
// cycles.
// With SPEC = 1 the read port is speculated. Each thread has a speculative
// clone pc_spec, updated by its own datapath logic: pc_spec <= read value + 1
// (predict no jump). The read port returns the thread's pc_spec, except in
// the first S0 cycle of that thread after one of its mis-speculations, when it
// returns pc. The value read is carried down the pipeline next to the
// update. When S2 fires, its write data is compared with the value that the
// next younger update of the same thread read:
//   * the update in S1, if it belongs to that thread;
//   * else the update in S0, if it belongs to that thread;
//   * else the value that thread's next read will return.
// On a mismatch, the stages from S0 up to S1 that hold that thread's updates
// are killed, and the thread's next read uses pc. For one thread, a taken
// jump whose target is not pc + 1 costs two bubbles; every other update
// issues back to back.
//
// Following the source:
//   * the clone register and the read mux that picks the clone except right
//     after a mis-speculation;
//   * detection by pipelining the speculated value to the write stage;
//   * the kill of the stages from the read stage up to, but not including,
//     the write stage;
//   * per-thread clones, and detection only between values of the same
//     thread.
// The output port sits in the write stage itself, which the source's rule
// leaves unnamed. This design's own choices:
//   * the jump-table datapath and the prediction rule;
//   * the comparison against S0 or the clone when S1 holds a bubble or
//     another thread;
//   * killing only the mis-speculated thread's updates.
//
// Interface: tbl_we/tbl_waddr/tbl_wdata write the jump table (at any time;
// the table is not reset). out_valid/out_ready/out_data are the per-thread
// output ports; out_valid is high only in a cycle where the transfer happens.
// mispredict pulses with each detected mis-speculation. Reset is synchronous,
// active high, and sets each pc and its clone to the thread's start address.
module spec_seq #(
  parameter int unsigned AW      = 8,  // pc width, jump table has 2**AW entries
  parameter int unsigned THREADS = 2,
  parameter bit          SPEC    = 1'b1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               tbl_we,
  input  logic [AW-1:0]      tbl_waddr,
  input  logic [AW:0]        tbl_wdata,   // {jump, target}
  output logic [THREADS-1:0] out_valid,
  input  logic [THREADS-1:0] out_ready,
  output logic [AW-1:0]      out_data [THREADS],
  output logic               mispredict
);

  localparam int unsigned STAGES = 3;
  localparam int unsigned TW     = (THREADS > 1) ? $clog2(THREADS) : 1;

  logic [STAGES-1:0] hold, kill, was_valid, valid, stall, advance, fire;
  logic              issue_stall;
  logic [TW-1:0]     t0, t1_q, t2_q;
  logic              sel_valid;

  thread_sched #(.THREADS(THREADS), .DYNAMIC(1'b1)) u_sched (
    .clk, .rst, .eligible({THREADS{1'b1}}), .stall(issue_stall),
    .sel(t0), .sel_valid
  );

  pipe_ctrl #(.STAGES(STAGES)) u_ctrl (
    .clk, .rst,
    .issue_valid(sel_valid),
    .hold, .kill, .was_valid, .valid, .stall, .advance, .fire, .issue_stall
  );

  // Architectural state and the speculative clones, one per thread.
  logic [AW-1:0] pc_q [THREADS], pc_spec_q [THREADS];
  logic [THREADS-1:0] sync_q;          // next read of the thread uses pc
  logic [AW:0]   tbl [2**AW];

  // What a read of thread t returns.
  function automatic logic [AW-1:0] read_pc(input logic [TW-1:0] t);
    return (SPEC && !sync_q[t]) ? pc_spec_q[t] : pc_q[t];
  endfunction

  // S0
  logic [AW-1:0] rd0;
  logic          haz0;
  assign rd0  = read_pc(t0);
  assign haz0 = !SPEC && ((was_valid[1] && t1_q == t0) || (was_valid[2] && t2_q == t0));

  // S1 and S2 pipeline registers
  logic [AW-1:0] pc1_q, pc2_q;
  logic [AW:0]   jt2_q;

  // S2
  logic [AW-1:0] next2;
  logic          out_busy2;
  assign next2     = jt2_q[AW] ? jt2_q[AW-1:0] : pc2_q + AW'(1);
  assign out_busy2 = was_valid[2] && !out_ready[t2_q];
  always_comb
    for (int t = 0; t < int'(THREADS); t++) begin
      out_valid[t] = fire[2] && t2_q == TW'(t);
      out_data[t]  = pc2_q;
    end

  // Mis-speculation: the write data against the value read by the next
  // younger update of the same thread.
  logic          same1, same0;
  logic [AW-1:0] younger_rd;
  assign same1      = was_valid[1] && t1_q == t2_q;
  assign same0      = was_valid[0] && t0 == t2_q;
  assign younger_rd = same1 ? pc1_q : same0 ? rd0 : read_pc(t2_q);
  assign mispredict = SPEC && fire[2] && (next2 != younger_rd);

  assign hold = {out_busy2, 1'b0, haz0};
  assign kill = {1'b0, mispredict && t1_q == t2_q, mispredict && t0 == t2_q};

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < int'(THREADS); t++) begin
        pc_q[t]      <= AW'((t * 2**AW) / THREADS);
        pc_spec_q[t] <= AW'((t * 2**AW) / THREADS);
      end
      sync_q <= '1;
    end else begin
      if (fire[2]) pc_q[t2_q] <= next2;
      if (fire[0]) begin
        pc_spec_q[t0] <= rd0 + AW'(1);
        sync_q[t0]    <= 1'b0;
      end
      if (mispredict) sync_q[t2_q] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (tbl_we) tbl[tbl_waddr] <= tbl_wdata;
    if (advance[0]) begin
      pc1_q <= rd0;
      t1_q  <= t0;
    end
    if (advance[1]) begin
      pc2_q <= pc1_q;
      t2_q  <= t1_q;
      jt2_q <= tbl[pc1_q];
    end
  end

  // The interlocked variant never mis-speculates; an output transfer needs
  // the consumer to be ready.
  always_ff @(posedge clk)
    if (!rst) assert ((SPEC || !mispredict) && ((out_valid & ~out_ready) == '0))
      else $error("spec_seq: control rule broken");

endmodule
