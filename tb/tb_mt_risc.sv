// tb_mt_risc: self-checking test of the example RISC core in three
// configurations run side by side:
//   d0 - defaults: 2 threads, dynamic interleave, interlocked register file
//   d1 - 2 threads, dynamic interleave, bypassed register file
//   d2 - 3 threads, fixed interleave
// Each runs the arithmetic kernel of tb_risc_pkg on every thread against the
// reference model. The test also counts the control events of the default
// core (register interlocks, instruction-cache kills, busy input and output
// ports) and fails if one never happened, checks that the bypassed core
// interlocks only behind a load and needs fewer cycles, and that a cache
// miss keeps a thread out of the pipeline for the 4-cycle miss latency.
module tb_mt_risc;
  import afdo_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- d0
  logic rst0, iwe0, done0; pc_t iwa0; inst_t iwd0;
  logic [1:0] inv0, inr0, outv0, outr0, hlt0;
  word_t ind0 [2], outd0 [2];
  int c0, f0; longint cyc0;

  mt_risc dut0 (.clk, .rst(rst0), .imem_we(iwe0), .imem_waddr(iwa0), .imem_wdata(iwd0),
    .in_valid(inv0), .in_ready(inr0), .in_data(ind0), .out_valid(outv0), .out_ready(outr0),
    .out_data(outd0), .halted(hlt0));
  risc_drv #(.THREADS(2), .NIN(5), .SEED(11)) drv0 (.clk, .rst(rst0), .imem_we(iwe0),
    .imem_waddr(iwa0), .imem_wdata(iwd0), .in_valid(inv0), .in_ready(inr0), .in_data(ind0),
    .out_valid(outv0), .out_ready(outr0), .out_data(outd0), .halted(hlt0), .done(done0),
    .checks(c0), .failures(f0), .run_cycles(cyc0));

  // ---------------------------------------------------------------- d1
  logic rst1, iwe1, done1; pc_t iwa1; inst_t iwd1;
  logic [1:0] inv1, inr1, outv1, outr1, hlt1;
  word_t ind1 [2], outd1 [2];
  int c1, f1; longint cyc1;

  mt_risc #(.RF_HAZ(HAZ_BYPASS)) dut1 (.clk, .rst(rst1), .imem_we(iwe1), .imem_waddr(iwa1),
    .imem_wdata(iwd1), .in_valid(inv1), .in_ready(inr1), .in_data(ind1), .out_valid(outv1),
    .out_ready(outr1), .out_data(outd1), .halted(hlt1));
  risc_drv #(.THREADS(2), .NIN(5), .SEED(11), .VALID_PCT(100), .READY_PCT(100)) drv1 (.clk, .rst(rst1), .imem_we(iwe1),
    .imem_waddr(iwa1), .imem_wdata(iwd1), .in_valid(inv1), .in_ready(inr1), .in_data(ind1),
    .out_valid(outv1), .out_ready(outr1), .out_data(outd1), .halted(hlt1), .done(done1),
    .checks(c1), .failures(f1), .run_cycles(cyc1));

  // d1b: same as d1 but interlocked, for the cycle comparison
  logic rst3, iwe3, done3; pc_t iwa3; inst_t iwd3;
  logic [1:0] inv3, inr3, outv3, outr3, hlt3;
  word_t ind3 [2], outd3 [2];
  int c3, f3; longint cyc3;

  mt_risc #(.RF_HAZ(HAZ_INTERLOCK)) dut3 (.clk, .rst(rst3), .imem_we(iwe3), .imem_waddr(iwa3),
    .imem_wdata(iwd3), .in_valid(inv3), .in_ready(inr3), .in_data(ind3), .out_valid(outv3),
    .out_ready(outr3), .out_data(outd3), .halted(hlt3));
  risc_drv #(.THREADS(2), .NIN(5), .SEED(11), .VALID_PCT(100), .READY_PCT(100)) drv3 (.clk, .rst(rst3), .imem_we(iwe3),
    .imem_waddr(iwa3), .imem_wdata(iwd3), .in_valid(inv3), .in_ready(inr3), .in_data(ind3),
    .out_valid(outv3), .out_ready(outr3), .out_data(outd3), .halted(hlt3), .done(done3),
    .checks(c3), .failures(f3), .run_cycles(cyc3));

  // ---------------------------------------------------------------- d2
  logic rst2, iwe2, done2; pc_t iwa2; inst_t iwd2;
  logic [2:0] inv2, inr2, outv2, outr2, hlt2;
  word_t ind2 [3], outd2 [3];
  int c2, f2; longint cyc2;

  mt_risc #(.THREADS(3), .DYNAMIC(1'b0)) dut2 (.clk, .rst(rst2), .imem_we(iwe2),
    .imem_waddr(iwa2), .imem_wdata(iwd2), .in_valid(inv2), .in_ready(inr2), .in_data(ind2),
    .out_valid(outv2), .out_ready(outr2), .out_data(outd2), .halted(hlt2));
  risc_drv #(.THREADS(3), .NIN(4), .SEED(23)) drv2 (.clk, .rst(rst2), .imem_we(iwe2),
    .imem_waddr(iwa2), .imem_wdata(iwd2), .in_valid(inv2), .in_ready(inr2), .in_data(ind2),
    .out_valid(outv2), .out_ready(outr2), .out_data(outd2), .halted(hlt2), .done(done2),
    .checks(c2), .failures(f2), .run_cycles(cyc2));

  // ------------------------------------------------------- event counts
  int n_rf_il = 0, n_rf_s1 = 0, n_kill = 0, n_in_busy = 0, n_out_busy = 0;
  int n_bypass = 0, n_byp_interlock = 0, n_fixed_pend = 0;
  int miss_start [2];
  int n_miss_gap = 0, bad_miss_gap = 0;

  initial begin miss_start[0] = -1; miss_start[1] = -1; end

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst0) begin
      if (dut0.was_valid[0] && dut0.haz_stall && !dut0.kill[0]) n_rf_il++;
      if (dut0.was_valid[0] && (dut0.h1a || dut0.h1b)) n_rf_s1++;
      if (dut0.was_valid[0] && dut0.kill[0]) n_kill++;
      if (dut0.was_valid[1] && dut0.in_busy1) n_in_busy++;
      if (dut0.was_valid[2] && dut0.out_busy2) n_out_busy++;
      // A thread whose fetch missed must not fire S0 again within MISS_LAT cycles.
      for (int t = 0; t < 2; t++) begin
        if (dut0.ic_req[t] && dut0.ic_pending[t] && !dut0.ic_busy[t]) miss_start[t] = cyc;
        if (dut0.fire[0] && dut0.t0 == t && miss_start[t] >= 0) begin
          n_miss_gap++;
          if (cyc - miss_start[t] < 4) bad_miss_gap++;
          miss_start[t] = -1;
        end
      end
    end
    if (!rst1) begin
      if (dut1.was_valid[0] && dut1.haz_stall && !dut1.d1_q.is_lw) n_byp_interlock++;
      if (dut1.fire[0] && (dut1.haz_a || dut1.haz_b)) n_bypass++;
    end
    if (!rst2 && dut2.was_valid[0] && dut2.hold[0]) n_fixed_pend++;
  end

  task automatic expect_event(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL: %s never happened", what); end
    else $display("%s: %0d", what, n);
  endtask

  initial begin
    wait (done0 && done1 && done2 && done3);
    repeat (2) @(posedge clk);
    checks   += c0 + c1 + c2 + c3;
    failures += f0 + f1 + f2 + f3;
    expect_event("register interlock", n_rf_il);
    expect_event("register hazard against S1", n_rf_s1);
    expect_event("ICache miss kill (dynamic)", n_kill);
    expect_event("input port busy", n_in_busy);
    expect_event("output port busy", n_out_busy);
    expect_event("register bypass", n_bypass);
    expect_event("ICache miss stall (fixed)", n_fixed_pend);
    expect_event("ICache miss refetch", n_miss_gap);
    checks++;
    if (n_byp_interlock != 0) begin failures++; $display("FAIL: bypassed core interlocked %0d times on a non-load", n_byp_interlock); end
    checks++;
    if (bad_miss_gap != 0) begin failures++; $display("FAIL: %0d refetches before the miss latency", bad_miss_gap); end
    checks++;
    if (!(cyc1 < cyc3)) begin failures++; $display("FAIL: bypass %0d cycles, interlock %0d cycles", cyc1, cyc3); end
    $display("cycles: default %0d, bypass %0d, interlock %0d, fixed(3 threads) %0d", cyc0, cyc1, cyc3, cyc2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
