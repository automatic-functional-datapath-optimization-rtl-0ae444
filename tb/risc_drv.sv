// risc_drv: stimulus and checker for one example RISC core.
//
// Holds the core in reset while it writes the test program into the program
// memory, then gives every thread NIN random values of n (1..12) followed by
// 0 on its input port, with random gaps in in_valid, and accepts outputs with
// a random out_ready. Every output token is compared with the reference model
// of tb_risc_pkg; at the end every thread must have halted after producing
// exactly the reference output sequence. done rises when all threads have
// halted; checks/failures count the comparisons.
module risc_drv
  import afdo_pkg::*;
  import tb_risc_pkg::*;
#(
  parameter int unsigned THREADS = 2,
  parameter int unsigned NIN     = 4,
  parameter int unsigned SEED    = 1,
  parameter int unsigned VALID_PCT = 70,
  parameter int unsigned READY_PCT = 70
) (
  input  logic               clk,
  output logic               rst,
  output logic               imem_we,
  output pc_t                imem_waddr,
  output inst_t              imem_wdata,
  output logic [THREADS-1:0] in_valid,
  input  logic [THREADS-1:0] in_ready,
  output word_t              in_data  [THREADS],
  input  logic [THREADS-1:0] out_valid,
  output logic [THREADS-1:0] out_ready,
  input  word_t              out_data [THREADS],
  input  logic [THREADS-1:0] halted,
  output logic               done,
  output int                 checks,
  output int                 failures,
  output longint             run_cycles
);

  word_t ins  [THREADS][$];
  word_t exp_q[THREADS][$];
  int    got  [THREADS];
  int    nexp [THREADS];
  int    seed_sink;

  initial begin
    seed_sink = $urandom(SEED);
    checks = 0; failures = 0; done = 1'b0; run_cycles = 0;
    for (int t = 0; t < int'(THREADS); t++) begin
      word_t tmp[$];
      for (int k = 0; k < int'(NIN); k++) ins[t].push_back(word_t'(1 + $urandom_range(11)));
      ins[t].push_back('0);
      tmp = ins[t];
      ref_run(tmp, exp_q[t]);
      nexp[t] = exp_q[t].size();
      got[t] = 0;
    end
    rst = 1'b1; imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0;
    in_valid = '0; out_ready = '0;
    foreach (in_data[t]) in_data[t] = '0;
    for (int a = 0; a < 2**PCW; a++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = pc_t'(a); imem_wdata = prog(a);
    end
    @(negedge clk);
    imem_we = 1'b0;
    @(negedge clk);
    rst = 1'b0;
  end

  // Drive the ports on the falling edge, sample them on the rising edge.
  always @(negedge clk) if (!rst) begin
    for (int t = 0; t < int'(THREADS); t++) begin
      in_valid[t]  <= (ins[t].size() > 0) && ($urandom_range(99) < VALID_PCT);
      in_data[t]   <= (ins[t].size() > 0) ? ins[t][0] : '0;
      out_ready[t] <= ($urandom_range(99) < READY_PCT);
    end
  end

  always @(posedge clk) if (!rst && !done) begin
    run_cycles <= run_cycles + 1;
    for (int t = 0; t < int'(THREADS); t++) begin
      if (in_valid[t] && in_ready[t]) void'(ins[t].pop_front());
      if (out_valid[t] && out_ready[t]) begin
        checks++;
        if (exp_q[t].size() == 0) begin
          failures++;
          $display("thread %0d: unexpected output %h", t, out_data[t]);
        end else begin
          if (out_data[t] !== exp_q[t][0]) begin
            failures++;
            $display("thread %0d output %0d: got %h expected %h", t, got[t], out_data[t], exp_q[t][0]);
          end
          void'(exp_q[t].pop_front());
        end
        got[t]++;
      end
    end
    if (&halted) begin
      done <= 1'b1;
      for (int t = 0; t < int'(THREADS); t++) begin
        checks++;
        if (got[t] != nexp[t]) begin
          failures++;
          $display("thread %0d: %0d outputs, expected %0d", t, got[t], nexp[t]);
        end
      end
    end
  end

endmodule
