// mt_risc: a multithreaded, three-stage, in-order RISC core, structured the
// way an automatic pipelining and multithreading transformation lays out a
// single-cycle base core: the architectural state, the ready/valid ports and
// the instruction cache interface are replicated once per thread, the
// combinational logic exists once, and generated control logic keeps every
// thread functionally equal to its own copy of the unpipelined core.
//
// Stage placement (this design's own; it follows the source's default of
// putting the architectural read ports in the first stage and the data
// writes and outputs in the last):
//   S0  PC read and write ports, instruction cache request (variable latency
//       unit), decode, register-file read ports, branch resolution, halt flag
//   S1  ALU, input port
//   S2  data memory read and write ports, register-file write port, output
//       port
// Inputs are placed before outputs and every read port before (or with) its
// write port, as the pipeline legality rules require. The PC is read and
// written in S0, so the PC itself never has a hazard and a thread may issue
// on consecutive cycles.
//
// Control (pipe_ctrl): a stage that is blocked keeps its contents and sends a
// bubble on; the stage in front of it stalls.
//   S0 blocked: a register read while an update of the same thread in S1 or
//               S2 writes that register (dynamic interleave only). With
//               RF_HAZ = HAZ_BYPASS the write data is muxed into the read
//               port instead, from S2, or from S1 when it is known there (not
//               a load); only a load in S1 still blocks. In fixed interleave
//               S0 is also blocked while the ICache reports resp_pending.
//   S0 killed:  dynamic interleave - the ICache reports resp_pending; the
//               update is dropped and the scheduler moves to another thread.
//   S1 blocked: IN executed while the thread's input port has no token.
//   S2 blocked: OUT executed while the thread's output port is not ready.
// Fixed interleave (DYNAMIC = 0) needs THREADS >= 3 and generates no hazard
// logic: two updates of one thread are never in flight together.
//
// Handshakes: in_ready[t] and out_valid[t] are high only in the cycle the
// instruction commits, and only for the thread it belongs to; a token moves
// when ready and valid are both high. imem_* writes the shared program memory
// behind all instruction caches. Reset (synchronous, active high) clears the
// PCs, the register files and the halt flags; the data memories are not reset.
// The instruction set is defined in afdo_pkg and is this design's own.
module mt_risc
  import afdo_pkg::*;
#(
  parameter int unsigned THREADS   = 2,
  parameter bit          DYNAMIC   = 1'b1,
  parameter haz_mode_e   RF_HAZ    = HAZ_INTERLOCK,
  parameter int unsigned MISS_LAT  = 4,
  parameter int unsigned MISS_BITS = 2,
  localparam int unsigned TW       = (THREADS > 1) ? $clog2(THREADS) : 1
) (
  input  logic               clk,
  input  logic               rst,
  // program memory load port
  input  logic               imem_we,
  input  pc_t                imem_waddr,
  input  inst_t              imem_wdata,
  // per-thread input ports
  input  logic [THREADS-1:0] in_valid,
  output logic [THREADS-1:0] in_ready,
  input  word_t              in_data  [THREADS],
  // per-thread output ports
  output logic [THREADS-1:0] out_valid,
  input  logic [THREADS-1:0] out_ready,
  output word_t              out_data [THREADS],
  // per-thread status
  output logic [THREADS-1:0] halted
);

  localparam int unsigned STAGES = 3;

  // ---------------------------------------------------------------- state
  pc_t   pc_q     [THREADS];
  logic  [THREADS-1:0] halted_q;
  word_t rf_q     [THREADS][NREG];
  word_t dmem_q   [THREADS][2**DAW];
  inst_t imem_q   [2**PCW];

  assign halted = halted_q;

  always_ff @(posedge clk) begin
    if (imem_we) imem_q[imem_waddr] <= imem_wdata;
  end

  // -------------------------------------------------------------- control
  logic [STAGES-1:0] hold, kill, was_valid, valid, stall, advance, fire;
  logic              issue_stall;
  logic [TW-1:0]     sel;
  logic              sel_valid;
  logic [THREADS-1:0] eligible;

  logic [THREADS-1:0] ic_busy, ic_pending, ic_req;
  inst_t              ic_data [THREADS];
  pc_t                ic_maddr [THREADS];

  for (genvar t = 0; t < THREADS; t++) begin : g_elig
    assign eligible[t] = !halted_q[t] && (!DYNAMIC || !ic_busy[t]);
  end

  thread_sched #(.THREADS(THREADS), .DYNAMIC(DYNAMIC)) u_sched (
    .clk, .rst, .eligible, .stall(issue_stall), .sel, .sel_valid
  );

  pipe_ctrl #(.STAGES(STAGES)) u_ctrl (
    .clk, .rst,
    .issue_valid(sel_valid && !halted_q[sel]),
    .hold, .kill, .was_valid, .valid, .stall, .advance, .fire, .issue_stall
  );

  // ------------------------------------------------------------------ S0
  logic [TW-1:0] t0, t1_q, t2_q;
  pc_t           pc0, npc0;
  inst_t         inst0;
  dec_t          d0, d1_q, d2_q;
  logic          pend0;
  word_t         rfa, rfb, srca, srcb, res1, wdata2;
  logic          h1a, h1b, h2a, h2b, avail1, haz_a, haz_b, haz_stall;

  assign t0  = sel;
  assign pc0 = pc_q[t0];

  for (genvar t = 0; t < THREADS; t++) begin : g_icache
    // The request is qualified with the stage's contents and its thread, but
    // not with the cache's own resp_pending, which would feed back on itself.
    assign ic_req[t] = was_valid[0] && (t0 == TW'(t));
    icache_vlu #(
      .MISS_LAT(MISS_LAT), .MISS_BITS(MISS_BITS),
      .SEED(16'hACE1 ^ (16'h1F35 * 16'(t + 1)))
    ) u_ic (
      .clk, .rst,
      .req_valid(ic_req[t]), .req_addr(pc0),
      .resp_data(ic_data[t]), .resp_pending(ic_pending[t]), .busy(ic_busy[t]),
      .mem_addr(ic_maddr[t]), .mem_rdata(imem_q[ic_maddr[t]])
    );
  end

  assign pend0 = ic_pending[t0];
  assign inst0 = ic_data[t0];
  assign d0    = decode(inst0);
  assign rfa   = (d0.rs == '0) ? '0 : rf_q[t0][d0.rs];
  assign rfb   = (d0.rb == '0) ? '0 : rf_q[t0][d0.rb];

  // Register-file read-after-write hazards against S1 and S2 (same thread,
  // write enabled, same register). Generated for dynamic interleave only.
  assign h1a = DYNAMIC && was_valid[1] && (t1_q == t0) && d1_q.rf_we && d0.rd_a && (d1_q.rd == d0.rs);
  assign h1b = DYNAMIC && was_valid[1] && (t1_q == t0) && d1_q.rf_we && d0.rd_b && (d1_q.rd == d0.rb);
  assign h2a = DYNAMIC && was_valid[2] && (t2_q == t0) && d2_q.rf_we && d0.rd_a && (d2_q.rd == d0.rs);
  assign h2b = DYNAMIC && was_valid[2] && (t2_q == t0) && d2_q.rf_we && d0.rd_b && (d2_q.rd == d0.rb);
  assign haz_a = h1a || h2a;
  assign haz_b = h1b || h2b;
  assign avail1 = !d1_q.is_lw;   // S1 write data is known unless it is a load

  always_comb begin
    srca = rfa;
    srcb = rfb;
    if (RF_HAZ == HAZ_BYPASS) begin
      if (h1a && avail1) srca = res1; else if (h2a) srca = wdata2;
      if (h1b && avail1) srcb = res1; else if (h2b) srcb = wdata2;
      haz_stall = ((h1a || h1b) && !avail1);
    end else begin
      haz_stall = haz_a || haz_b;
    end
  end

  assign hold[0] = haz_stall || (!DYNAMIC && pend0);
  assign kill[0] = DYNAMIC && pend0;

  // Branch resolution and next PC.
  always_comb begin
    pc_t seq;
    seq  = pc0 + 1'b1;
    npc0 = seq;
    unique case (d0.op)
      OP_BEQ:  if (srca == srcb) npc0 = seq + pc_t'(d0.imm);
      OP_BNE:  if (srca != srcb) npc0 = seq + pc_t'(d0.imm);
      OP_JAL:  npc0 = seq + pc_t'(d0.imm);
      OP_HALT: npc0 = pc0;
      default: ;
    endcase
  end

  // PC and halt flag write ports.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < int'(THREADS); t++) pc_q[t] <= '0;
      halted_q <= '0;
    end else if (fire[0]) begin
      pc_q[t0] <= npc0;
      if (d0.is_halt) halted_q[t0] <= 1'b1;
    end
  end

  word_t opa1_q, opb1_q, link1_q;

  always_ff @(posedge clk) begin
    if (advance[0]) begin
      t1_q    <= t0;
      d1_q    <= d0;
      opa1_q  <= srca;
      opb1_q  <= srcb;
      link1_q <= word_t'(pc0 + 1'b1);
    end
  end

  // ------------------------------------------------------------------ S1
  logic in_busy1;

  assign in_busy1 = d1_q.is_in && !in_valid[t1_q];
  assign hold[1]  = in_busy1;
  assign kill[1]  = 1'b0;

  for (genvar t = 0; t < THREADS; t++) begin : g_in
    assign in_ready[t] = fire[1] && d1_q.is_in && (t1_q == TW'(t));
  end

  always_comb begin
    res1 = '0;
    unique case (d1_q.op)
      OP_ADD:  res1 = opa1_q + opb1_q;
      OP_SUB:  res1 = opa1_q - opb1_q;
      OP_AND:  res1 = opa1_q & opb1_q;
      OP_OR:   res1 = opa1_q | opb1_q;
      OP_XOR:  res1 = opa1_q ^ opb1_q;
      OP_SLT:  res1 = word_t'($signed(opa1_q) < $signed(opb1_q));
      OP_ADDI, OP_LW, OP_SW: res1 = opa1_q + d1_q.imm;
      OP_LUI:  res1 = d1_q.imm;
      OP_JAL:  res1 = link1_q;
      OP_IN:   res1 = in_data[t1_q];
      default: ;
    endcase
  end

  word_t res2_q, sdata2_q;

  always_ff @(posedge clk) begin
    if (advance[1]) begin
      t2_q     <= t1_q;
      d2_q     <= d1_q;
      res2_q   <= res1;
      sdata2_q <= opb1_q;
    end
  end

  // ------------------------------------------------------------------ S2
  logic [DAW-1:0] daddr2;
  logic           out_busy2;

  assign daddr2    = res2_q[DAW-1:0];
  assign wdata2    = d2_q.is_lw ? dmem_q[t2_q][daddr2] : res2_q;
  assign out_busy2 = d2_q.is_out && !out_ready[t2_q];
  assign hold[2]   = out_busy2;
  assign kill[2]   = 1'b0;

  for (genvar t = 0; t < THREADS; t++) begin : g_out
    assign out_valid[t] = fire[2] && d2_q.is_out && (t2_q == TW'(t));
    assign out_data[t]  = sdata2_q;
  end

  always_ff @(posedge clk) begin
    if (fire[2] && d2_q.is_sw) dmem_q[t2_q][daddr2] <= sdata2_q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < int'(THREADS); t++)
        for (int r = 0; r < int'(NREG); r++) rf_q[t][r] <= '0;
    end else if (fire[2] && d2_q.rf_we) begin
      rf_q[t2_q][d2_q.rd] <= wdata2;
    end
  end

  // ----------------------------------------------------------- checks
  if (!DYNAMIC && THREADS < STAGES) begin : g_bad_cfg
    $error("mt_risc: fixed interleave needs THREADS >= 3");
  end

  // Ports move tokens only for the thread whose update commits.
  a_in_onehot:  assert property (@(posedge clk) disable iff (rst) $onehot0(in_ready));
  a_out_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(out_valid));

endmodule
