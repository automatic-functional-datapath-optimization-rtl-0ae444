// tb_fame_reg: self-checking test of the FAME Register token FIFO.
// After reset it must hold exactly one token, the reset value; afterwards a
// model queue predicts every head token, host full after DEPTH tokens and host
// empty when drained, under random host enqueues and dequeues.
module tb_fame_reg;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, enq_valid, enq_ready, deq_valid, deq_ready;
  logic [15:0] enq_data, deq_data;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [15:0] model[$];

  fame_reg #(.W(16), .DEPTH(4), .INIT(16'hBEEF)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    rst = 1'b1; enq_valid = 0; deq_ready = 0; enq_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    model.push_back(16'hBEEF);
    repeat (3000) begin
      // bias phases towards filling and draining
      int bias;
      bias = (($time / 2000) % 2 == 0) ? 7 : 3;
      enq_valid = ($urandom_range(9) < bias);
      deq_ready = ($urandom_range(9) < 10 - bias);
      enq_data  = 16'($urandom);
      #1;
      check(enq_ready == (model.size() < 4), "host full flag");
      check(deq_valid == (model.size() > 0), "host empty flag");
      if (deq_valid) check(deq_data == model[0], "head token");
      if (model.size() == 4) n_full++;
      if (model.size() == 0) n_empty++;
      @(posedge clk);
      if (deq_valid && deq_ready) void'(model.pop_front());
      if (enq_valid && enq_ready) model.push_back(enq_data);
      @(negedge clk);
    end
    check(n_full > 0 && n_empty > 0, "full and empty both reached");
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
