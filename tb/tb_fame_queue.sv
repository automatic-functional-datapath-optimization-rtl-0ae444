// tb_fame_queue: self-checking test of the FAME Queue.
// Producer and consumer sides fire at random host times with random target
// enqueue-valid, data and dequeue-ready values. A model queue, stepped once
// per target cycle after both sides have handed over their token, predicts
// what each side must see when it fires: enq_tgt_ready = not full,
// deq_tgt_valid = not empty, deq_data = head. A side that has fired for the
// current target cycle must not be offered another token until the other side
// has fired too.
module tb_fame_queue;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;
  logic enq_host_ready, enq_fire, enq_tgt_ready, enq_tgt_valid;
  logic deq_host_valid, deq_fire, deq_tgt_valid, deq_tgt_ready;
  logic [15:0] enq_data, deq_data;
  int checks = 0, failures = 0, steps = 0, n_full = 0, n_wait_p = 0, n_wait_c = 0;
  logic [15:0] model[$];
  bit p_done, c_done, p_v, c_r;
  logic [15:0] p_d;

  fame_queue #(.W(16), .DEPTH(2)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    rst = 1'b1; enq_fire = 0; deq_fire = 0; enq_tgt_valid = 0; deq_tgt_ready = 0; enq_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    p_done = 0; c_done = 0;
    repeat (3000) begin
      enq_fire      = ($urandom_range(9) < 5);
      deq_fire      = ($urandom_range(9) < 5);
      enq_tgt_valid = ($urandom_range(9) < 7);
      deq_tgt_ready = ($urandom_range(9) < 4);
      enq_data      = 16'($urandom);
      #1;
      check(enq_host_ready == !p_done, "producer offered a token twice in one target cycle");
      check(deq_host_valid == !c_done, "consumer offered a token twice in one target cycle");
      if (p_done && enq_fire) n_wait_p++;
      if (c_done && deq_fire) n_wait_c++;
      if (enq_fire && enq_host_ready) begin
        check(enq_tgt_ready == (model.size() < 2), "enq_tgt_ready");
        p_done = 1; p_v = enq_tgt_valid; p_d = enq_data;
        if (model.size() == 2) n_full++;
      end
      if (deq_fire && deq_host_valid) begin
        check(deq_tgt_valid == (model.size() > 0), "deq_tgt_valid");
        if (model.size() > 0) check(deq_data == model[0], "deq_data");
        c_done = 1; c_r = deq_tgt_ready;
      end
      @(posedge clk);
      if (p_done && c_done) begin
        bit full, empty;
        full = (model.size() == 2);
        empty = (model.size() == 0);
        if (c_r && !empty) void'(model.pop_front());
        if (p_v && !full) model.push_back(p_d);
        p_done = 0; c_done = 0; steps++;
      end
      @(negedge clk);
    end
    check(steps > 500 && n_full > 0 && n_wait_p > 0 && n_wait_c > 0, "coverage");
    $display("target cycles %0d, full %0d", steps, n_full);
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
