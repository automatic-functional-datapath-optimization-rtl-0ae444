// tb_thread_sched: self-checking test of the thread scheduler.
// Fixed interleave (3 threads): the selection steps 0,1,2,0,... once per
// cycle without stall and holds under stall. Dynamic interleave (4 threads):
// after every cycle without stall the selection is the next eligible thread
// after the previous one (round robin), no thread is selected when none is
// eligible, and the selection holds under stall.
module tb_thread_sched;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // fixed
  logic [2:0] el_f;
  logic       st_f, sv_f;
  logic [1:0] sel_f;
  thread_sched #(.THREADS(3), .DYNAMIC(1'b0)) dut_f (.clk, .rst, .eligible(el_f), .stall(st_f), .sel(sel_f), .sel_valid(sv_f));

  // dynamic
  logic [3:0] el_d;
  logic       st_d, sv_d;
  logic [1:0] sel_d;
  thread_sched #(.THREADS(4), .DYNAMIC(1'b1)) dut_d (.clk, .rst, .eligible(el_d), .stall(st_d), .sel(sel_d), .sel_valid(sv_d));

  int exp_f, exp_d, last_d;
  bit exp_vd;

  initial begin
    rst = 1'b1; el_f = '1; st_f = 1; el_d = '0; st_d = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    exp_f = 0; last_d = 3; exp_vd = 0; exp_d = 3;
    check(sel_f == 0 && sv_f, "fixed reset");
    check(!sv_d, "dynamic reset");
    repeat (2000) begin
      // new stimulus
      @(negedge clk);
      st_f = ($urandom_range(3) == 0);
      st_d = ($urandom_range(4) == 0);
      el_d = 4'($urandom_range(15)) & (($urandom_range(9) == 0) ? 4'h0 : 4'hF);
      // expected next values
      if (!st_f) exp_f = (exp_f + 1) % 3;
      if (!st_d) begin
        bit found;
        found = 0;
        for (int d = 1; d <= 4 && !found; d++)
          if (el_d[(exp_d + d) % 4]) begin exp_d = (exp_d + d) % 4; found = 1; end
        exp_vd = found;
      end
      @(posedge clk);
      #1;
      check(sel_f == 2'(exp_f) && sv_f, $sformatf("fixed sel %0d expected %0d", sel_f, exp_f));
      check(sv_d == exp_vd && (!exp_vd || sel_d == 2'(exp_d)),
            $sformatf("dynamic sel %0d/%0b expected %0d/%0b", sel_d, sv_d, exp_d, exp_vd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
