// tb_afdo_top: end-to-end test of the whole design at its default parameters.
//
// The RISC core (2 threads, dynamic interleave, interlocked registers, 4-cycle
// instruction cache misses) runs the arithmetic kernel of tb_risc_pkg on both
// threads with random input and output port timing, checked token by token
// against the instruction-level reference model. At the same time the FAME1
// example and the four copies of the FAME5 example run with random host
// enables and are checked, target cycle by target cycle, against the
// unpartitioned target design. Every mechanism is counted and must occur at
// least once: register interlock, instruction cache kill and refetch, busy
// input and output ports, a FAME Register holding two tokens and running
// empty, waits at a FAME Queue, and a FAME5 thread selected without tokens.
// The two threads of the speculation example walk a random jump table,
// loaded during reset, with randomly ready consumers. Each token is checked
// against a walk of the table in the testbench from the thread's start
// address, and so is the mis-speculation pulse. Both a
// mis-speculation and a busy output must occur.
module tb_afdo_top;
  import afdo_pkg::*;
  import fame_ex_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, imem_we, done;
  pc_t imem_waddr; inst_t imem_wdata;
  logic [1:0] in_valid, in_ready, out_valid, out_ready, halted;
  word_t in_data [2], out_data [2];
  int c_core, f_core; longint cyc_core;

  logic f1_host_en_a, f1_host_en_b, f1_fire_a, f1_fire_b;
  fword_t f1_a_acc, f1_b_sent;
  logic [31:0] f1_a_cycles, f1_b_cycles;
  logic [3:0] f5_host_en_a;
  fword_t f5_a_acc [4], f5_b_sent [4];
  logic [31:0] f5_a_cycles [4], f5_b_cycles [4];
  fword_t r_acc, r_sent;
  logic sp_tbl_we, sp_mispredict;
  logic [1:0] sp_out_valid, sp_out_ready;
  logic [7:0] sp_tbl_waddr, sp_out_data [2];
  logic [8:0] sp_tbl_wdata;
  logic [8:0] sp_table [256];
  logic [7:0] sp_pc [2] = '{8'd0, 8'd128};
  int n_sp = 0, n_sp_mis = 0, n_sp_busy = 0;

  afdo_top dut (.*);

  risc_drv #(.THREADS(2), .NIN(6), .SEED(5)) drv (.clk, .rst, .imem_we, .imem_waddr,
    .imem_wdata, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data,
    .halted, .done, .checks(c_core), .failures(f_core), .run_cycles(cyc_core));

  fame0_ref u_ref (.clk, .rst, .a_acc(r_acc), .b_sent(r_sent));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // ------------------------------------------------------------ counters
  int n_interlock = 0, n_kill = 0, n_in_busy = 0, n_out_busy = 0, n_refetch = 0;
  int n_reg2 = 0, n_reg_empty = 0, n_qwait = 0, n_f5_wait = 0;
  bit missed [2];
  fword_t ref_acc [int], ref_sent [int];
  int ref_cyc;

  always @(posedge clk) begin
    if (rst) begin
      ref_cyc = 0; missed[0] = 0; missed[1] = 0;
    end else begin
      ref_acc[ref_cyc]  = r_acc;
      ref_sent[ref_cyc] = r_sent;
      ref_cyc++;
      if (dut.u_core.was_valid[0] && dut.u_core.haz_stall && !dut.u_core.kill[0]) n_interlock++;
      if (dut.u_core.was_valid[0] && dut.u_core.kill[0]) begin
        n_kill++;
        missed[dut.u_core.t0] = 1;
      end
      if (dut.u_core.fire[0] && missed[dut.u_core.t0]) begin
        n_refetch++;
        missed[dut.u_core.t0] = 0;
      end
      if (dut.u_core.was_valid[1] && dut.u_core.in_busy1) n_in_busy++;
      if (dut.u_core.was_valid[2] && dut.u_core.out_busy2) n_out_busy++;
      if (dut.u_fame1.u_reg.count_q == 2) n_reg2++;
      if (f1_host_en_b && !dut.u_fame1.r_deq_valid) n_reg_empty++;
      if (f1_host_en_a && !dut.u_fame1.q_deq_host_valid) n_qwait++;
      if (dut.u_fame5.u_b5.sel_valid && !dut.u_fame5.u_b5.io_ready[dut.u_fame5.u_b5.sel]) n_f5_wait++;
    end
  end

  // Speculation example: table load, consumer and token check.
  initial begin
    for (int a = 0; a < 256; a++)
      sp_table[a] = {($urandom_range(0, 3) == 0), 8'($urandom)};
    sp_tbl_we = 1'b0; sp_tbl_waddr = '0; sp_tbl_wdata = '0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      sp_tbl_we = 1'b1; sp_tbl_waddr = 8'(a); sp_tbl_wdata = sp_table[a];
    end
    @(negedge clk);
    sp_tbl_we = 1'b0;
    check(rst, "jump table loaded during reset");
  end

  always @(negedge clk) sp_out_ready <= {($urandom_range(0, 3) != 0), ($urandom_range(0, 3) != 0)};

  always @(posedge clk) if (!rst) begin
    if (dut.u_spec.was_valid[2] && !sp_out_ready[dut.u_spec.t2_q]) n_sp_busy++;
    for (int t = 0; t < 2; t++)
      if (sp_out_valid[t]) begin
        logic [7:0] nxt;
        nxt = sp_table[sp_pc[t]][8] ? sp_table[sp_pc[t]][7:0] : sp_pc[t] + 8'd1;
        check(sp_out_data[t] == sp_pc[t], "speculation example token");
        check(sp_mispredict == (nxt != sp_pc[t] + 8'd1), "speculation example mispredict");
        if (sp_mispredict) n_sp_mis++;
        n_sp++;
        sp_pc[t] = nxt;
      end
    if (sp_out_valid == '0) check(!sp_mispredict, "mispredict without a token");
  end

  always @(negedge clk) if (!rst) begin
    if (ref_acc.exists(int'(f1_a_cycles))) check(f1_a_acc == ref_acc[int'(f1_a_cycles)], "FAME1 A");
    if (ref_sent.exists(int'(f1_b_cycles))) check(f1_b_sent == ref_sent[int'(f1_b_cycles)], "FAME1 B");
    for (int m = 0; m < 4; m++) begin
      if (ref_acc.exists(int'(f5_a_cycles[m]))) check(f5_a_acc[m] == ref_acc[int'(f5_a_cycles[m])], "FAME5 A");
      if (ref_sent.exists(int'(f5_b_cycles[m]))) check(f5_b_sent[m] == ref_sent[int'(f5_b_cycles[m])], "FAME5 B");
    end
  end

  always @(negedge clk) begin
    f1_host_en_a <= ($urandom_range(9) < ((($time / 2000) % 2 == 0) ? 9 : 4));
    f1_host_en_b <= ($urandom_range(9) < ((($time / 2000) % 2 == 0) ? 4 : 9));
    for (int m = 0; m < 4; m++) f5_host_en_a[m] <= ($urandom_range(9) < 3 + 2 * m);
  end

  task automatic expect_event(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL: %s never happened", what); end
    else $display("%s: %0d", what, n);
  endtask

  initial begin
    wait (done);
    repeat (2) @(posedge clk);
    checks += c_core;
    failures += f_core;
    expect_event("register interlock", n_interlock);
    expect_event("ICache miss kill", n_kill);
    expect_event("refetch after a miss", n_refetch);
    expect_event("input port busy", n_in_busy);
    expect_event("output port busy", n_out_busy);
    expect_event("FAME Register holding two tokens", n_reg2);
    expect_event("FAME Register host empty", n_reg_empty);
    expect_event("FAME Queue wait", n_qwait);
    expect_event("FAME5 thread selected without tokens", n_f5_wait);
    expect_event("mis-speculation kill", n_sp_mis);
    expect_event("speculation example output busy", n_sp_busy);
    check(n_sp > 100, "speculation example progress");
    check(f1_a_cycles > 100 && f5_a_cycles[0] > 100, "FAME progress");
    $display("core: %0d cycles; FAME1 target cycles %0d/%0d; speculation example %0d tokens",
             cyc_core, f1_a_cycles, f1_b_cycles, n_sp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
