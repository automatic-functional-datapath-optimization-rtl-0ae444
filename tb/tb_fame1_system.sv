// tb_fame1_system: self-checking test of the FAME1-partitioned example.
// The unpartitioned target design (fame0_ref) runs alongside and its state
// after every target cycle is recorded. The FAME1 system runs with random host
// enables for A and B; after every target cycle of A (B) its accumulator
// (sent counter) must equal the reference after the same number of target
// cycles. The test also requires that A once ran a target cycle ahead of B
// (two tokens in the FAME Register), that B was held by an empty one, and that each side once waited for the other at the FAME Queue.
module tb_fame1_system;
  import fame_ex_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, host_en_a, host_en_b, fire_a, fire_b;
  fword_t a_acc, b_sent, r_acc, r_sent;
  logic [31:0] a_cycles, b_cycles;
  int checks = 0, failures = 0;
  int n_reg_full = 0, n_reg_empty = 0, n_q_wait_a = 0, n_q_wait_b = 0;
  fword_t ref_acc [int], ref_sent [int];
  int ref_cyc;

  fame1_system dut (.*);
  fame0_ref    u_ref (.clk, .rst, .a_acc(r_acc), .b_sent(r_sent));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  always @(posedge clk) begin
    if (rst) ref_cyc = 0;
    else begin
      ref_acc[ref_cyc]  = r_acc;   // state at the start of target cycle ref_cyc
      ref_sent[ref_cyc] = r_sent;
      ref_cyc++;
      if (dut.u_reg.count_q >= 2) n_reg_full++;
      if (host_en_b && !dut.r_deq_valid) n_reg_empty++;
      if (host_en_a && !dut.q_deq_host_valid) n_q_wait_a++;
      if (host_en_b && !dut.q_enq_host_ready) n_q_wait_b++;
    end
  end

  // compare the state at the start of each target cycle
  always @(negedge clk) if (!rst) begin
    if (ref_acc.exists(int'(a_cycles))) check(a_acc == ref_acc[int'(a_cycles)], $sformatf("A state at target cycle %0d", a_cycles));
    if (ref_sent.exists(int'(b_cycles))) check(b_sent == ref_sent[int'(b_cycles)], $sformatf("B state at target cycle %0d", b_cycles));
  end

  initial begin
    rst = 1'b1; host_en_a = 0; host_en_b = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (4000) begin
      @(negedge clk);
      // phases where one side is much slower than the other
      case (($time / 3000) % 3)
        0: begin host_en_a = ($urandom_range(9) < 9); host_en_b = ($urandom_range(9) < 3); end
        1: begin host_en_a = ($urandom_range(9) < 3); host_en_b = ($urandom_range(9) < 9); end
        default: begin host_en_a = ($urandom_range(9) < 6); host_en_b = ($urandom_range(9) < 6); end
      endcase
    end
    check(a_cycles > 1000 && b_cycles > 1000, "progress");
    check(n_reg_full > 0, "A ran ahead of B: two tokens in the FAME Register");
    check(n_reg_empty > 0, "B held by an empty FAME Register");
    check(n_q_wait_a > 0 && n_q_wait_b > 0, "both sides waited at the FAME Queue");
    $display("target cycles A %0d B %0d; reg two tokens %0d empty %0d; queue waits A %0d B %0d",
             a_cycles, b_cycles, n_reg_full, n_reg_empty, n_q_wait_a, n_q_wait_b);
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
