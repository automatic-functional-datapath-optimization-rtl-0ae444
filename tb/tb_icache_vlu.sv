// tb_icache_vlu: self-checking test of the instruction cache timing model.
// A backing memory holds addr*3+1. Random requests check that a response
// that is not pending carries the memory word, that an address that missed
// stays pending for exactly the 4-cycle miss latency when re-requested every
// cycle and hits afterwards, that busy covers the fill, and that misses occur
// at roughly the configured rate (1 in 4).
module tb_icache_vlu;
  import afdo_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, req_valid, resp_pending, busy;
  pc_t req_addr, mem_addr;
  inst_t resp_data, mem_rdata;
  int checks = 0, failures = 0;
  int misses = 0, reqs = 0;

  icache_vlu dut (.*);
  assign mem_rdata = inst_t'(mem_addr) * 3 + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    rst = 1'b1; req_valid = 0; req_addr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (400) begin
      int wait_cyc;
      @(negedge clk);
      req_valid = 1'b1;
      req_addr = pc_t'($urandom_range(255));
      #1;
      reqs++;
      if (!resp_pending) begin
        check(resp_data == inst_t'(req_addr) * 3 + 1, "hit data");
      end else begin
        misses++;
        check(!busy, "miss while idle");
        // repeat the same request every cycle until it hits
        wait_cyc = 0;
        while (resp_pending && wait_cyc < 20) begin
          @(negedge clk); #1;
          wait_cyc++;
          if (resp_pending) check(busy, "busy during fill");
        end
        check(wait_cyc == 4, $sformatf("miss latency %0d cycles, expected 4", wait_cyc));
        check(resp_data == inst_t'(req_addr) * 3 + 1, "data after fill");
      end
      // sometimes idle a cycle
      if ($urandom_range(3) == 0) begin @(negedge clk); req_valid = 1'b0; end
    end
    check(misses > reqs / 8 && misses < reqs / 2, $sformatf("miss rate %0d of %0d", misses, reqs));
    $display("misses %0d of %0d requests", misses, reqs);
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
