// tb_fame5: self-checking test of the FAME5 example (fame5_system with its
// multithreaded B, fame5_b), four copies of the target design.
// The unpartitioned target design (fame0_ref) is the reference; all copies
// start from the same reset, so each must follow its trace in target time.
// Every copy's A gets its own random host enable. After every target cycle of
// copy m, A's accumulator and B's sent counter must equal the reference after
// the same number of target cycles. The test requires that every thread of B
// fired, that a selected thread of B once could not fire because its input
// FAME Register was empty, and that the copies drifted apart in host time.
module tb_fame5;
  import fame_ex_pkg::*;

  localparam int N = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;
  logic [N-1:0] host_en_a;
  fword_t a_acc [N], b_sent [N];
  logic [31:0] a_cycles [N], b_cycles [N];
  fword_t r_acc, r_sent;
  int checks = 0, failures = 0, n_sel_not_ready = 0;
  fword_t ref_acc [int], ref_sent [int];
  int ref_cyc;

  fame5_system #(.THREADS(N)) dut (.*);
  fame0_ref u_ref (.clk, .rst, .a_acc(r_acc), .b_sent(r_sent));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  always @(posedge clk) begin
    if (rst) ref_cyc = 0;
    else begin
      ref_acc[ref_cyc]  = r_acc;
      ref_sent[ref_cyc] = r_sent;
      ref_cyc++;
      if (dut.u_b5.sel_valid && !dut.u_b5.io_ready[dut.u_b5.sel]) n_sel_not_ready++;
    end
  end

  always @(negedge clk) if (!rst) begin
    for (int m = 0; m < N; m++) begin
      if (ref_acc.exists(int'(a_cycles[m])))
        check(a_acc[m] == ref_acc[int'(a_cycles[m])], $sformatf("copy %0d A at target cycle %0d", m, a_cycles[m]));
      if (ref_sent.exists(int'(b_cycles[m])))
        check(b_sent[m] == ref_sent[int'(b_cycles[m])], $sformatf("copy %0d B at target cycle %0d", m, b_cycles[m]));
    end
  end

  initial begin
    int mn, mx;
    rst = 1'b1; host_en_a = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (4000) begin
      @(negedge clk);
      for (int m = 0; m < N; m++) host_en_a[m] = ($urandom_range(9) < 3 + 2 * m);
    end
    mn = a_cycles[0]; mx = a_cycles[0];
    for (int m = 0; m < N; m++) begin
      check(b_cycles[m] > 100, $sformatf("thread %0d of B ran", m));
      if (a_cycles[m] < mn) mn = a_cycles[m];
      if (a_cycles[m] > mx) mx = a_cycles[m];
    end
    check(mx > mn + 10, "copies drifted apart");
    check(n_sel_not_ready > 0, "selected thread without tokens");
    $display("target cycles per copy: %0d %0d %0d %0d", a_cycles[0], a_cycles[1], a_cycles[2], a_cycles[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
