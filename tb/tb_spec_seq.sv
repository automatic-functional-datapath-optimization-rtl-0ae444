// tb_spec_seq: self-checking testbench for spec_seq.
//
// Four copies run the same random jump table:
//   u_s1  one thread, speculated pc read port (SPEC = 1)
//   u_i1  one thread, interlocked (SPEC = 0)
//   u_s2  two threads, speculated
//   u_i2  two threads, interlocked
// Reference sequences are computed by walking the table in the testbench from
// each thread's start address (0, and 128 for the second thread). For each
// output token the testbench checks:
//   * the pc value against the reference of its thread;
//   * for a speculating copy, that mispredict pulses exactly when the
//     reference's next pc is not pc + 1;
//   * for an interlocked copy, that mispredict never pulses.
// In the first phase every consumer is always ready. The testbench then
// checks the cycle counts from the first to the N1-th token:
//   * (N1-1) + 2 * (mis-speculations) for u_s1;
//   * 3 * (N1-1) for u_i1;
//   * for the two-thread copies, that speculation needs fewer cycles.
// In the second phase the consumers are ready at random, and the tokens are
// checked for order and value only.
module tb_spec_seq;

  localparam int unsigned AW    = 8;
  localparam int unsigned N1    = 400;   // tokens per thread, always-ready phase
  localparam int unsigned NTOT  = 1000;  // tokens per thread in all
  localparam int unsigned NDUT  = 4;
  localparam int unsigned NTH [NDUT] = '{1, 1, 2, 2};
  localparam bit          SP  [NDUT] = '{1'b1, 1'b0, 1'b1, 1'b0};

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          tbl_we;
  logic [AW-1:0] tbl_waddr;
  logic [AW:0]   tbl_wdata;
  logic [AW:0]   table_m [2**AW];
  logic [AW-1:0] seq [2][NTOT+1];

  logic [1:0]    out_valid [NDUT], out_ready [NDUT];
  logic [AW-1:0] out_data [NDUT][2];
  logic          mispredict [NDUT];

  spec_seq #(.AW(AW), .THREADS(1), .SPEC(1'b1)) u_s1 (
    .clk, .rst, .tbl_we, .tbl_waddr, .tbl_wdata,
    .out_valid(out_valid[0][0]), .out_ready(out_ready[0][0]),
    .out_data(out_data[0][0:0]), .mispredict(mispredict[0])
  );
  spec_seq #(.AW(AW), .THREADS(1), .SPEC(1'b0)) u_i1 (
    .clk, .rst, .tbl_we, .tbl_waddr, .tbl_wdata,
    .out_valid(out_valid[1][0]), .out_ready(out_ready[1][0]),
    .out_data(out_data[1][0:0]), .mispredict(mispredict[1])
  );
  spec_seq #(.AW(AW), .THREADS(2), .SPEC(1'b1)) u_s2 (
    .clk, .rst, .tbl_we, .tbl_waddr, .tbl_wdata,
    .out_valid(out_valid[2]), .out_ready(out_ready[2]),
    .out_data(out_data[2]), .mispredict(mispredict[2])
  );
  spec_seq #(.AW(AW), .THREADS(2), .SPEC(1'b0)) u_i2 (
    .clk, .rst, .tbl_we, .tbl_waddr, .tbl_wdata,
    .out_valid(out_valid[3]), .out_ready(out_ready[3]),
    .out_data(out_data[3]), .mispredict(mispredict[3])
  );
  assign out_valid[0][1] = 1'b0;
  assign out_valid[1][1] = 1'b0;
  assign out_data[0][1]  = '0;
  assign out_data[1][1]  = '0;

  int  cnt [NDUT][2];
  int  cyc = 0;
  int  first_cyc [NDUT], n1_cyc [NDUT];
  int  n_mis = 0;          // reference mis-speculations among tokens 0..N1-2
  bit  phase2 = 1'b0;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endfunction

  function automatic bit reached(int n);
    for (int d = 0; d < int'(NDUT); d++)
      for (int t = 0; t < int'(NTH[d]); t++)
        if (cnt[d][t] < n) return 1'b0;
    return 1'b1;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      for (int d = 0; d < int'(NDUT); d++) begin
        bit any;
        any = 1'b0;
        for (int t = 0; t < int'(NTH[d]); t++) begin
          if (out_valid[d][t]) begin
            any = 1'b1;
            if (cnt[d][t] < int'(NTOT)) begin
              check(out_data[d][t] == seq[t][cnt[d][t]],
                    $sformatf("copy %0d thread %0d token %0d: pc %0d, expected %0d",
                              d, t, cnt[d][t], out_data[d][t], seq[t][cnt[d][t]]));
              check(mispredict[d] == (SP[d] && seq[t][cnt[d][t]+1] != seq[t][cnt[d][t]] + AW'(1)),
                    $sformatf("copy %0d thread %0d token %0d: mispredict %0b",
                              d, t, cnt[d][t], mispredict[d]));
            end
            if (t == 0 && cnt[d][t] == 0)            first_cyc[d] <= cyc;
            if (t == 0 && cnt[d][t] == int'(N1) - 1) n1_cyc[d]    <= cyc;
            cnt[d][t] <= cnt[d][t] + 1;
          end
        end
        if (!any) check(!mispredict[d], $sformatf("copy %0d: mispredict without a token", d));
      end
    end
  end

  // Consumers.
  always @(posedge clk)
    for (int d = 0; d < int'(NDUT); d++)
      out_ready[d] <= phase2 ? 2'($urandom) : 2'b11;

  initial begin
    int pc;
    for (int d = 0; d < int'(NDUT); d++) cnt[d] = '{0, 0};
    // Table: a jump in about one entry of four; a few jumps go to pc + 1.
    for (int a = 0; a < 2**AW; a++) begin
      logic [AW-1:0] tgt;
      tgt = AW'($urandom);
      if ($urandom_range(0, 7) == 0) tgt = AW'(a + 1);
      table_m[a] = {($urandom_range(0, 3) == 0), tgt};
    end
    for (int t = 0; t < 2; t++) begin
      pc = t * 2**AW / 2;
      for (int k = 0; k <= int'(NTOT); k++) begin
        seq[t][k] = AW'(pc);
        pc = table_m[pc][AW] ? int'(table_m[pc][AW-1:0]) : int'(AW'(pc + 1));
      end
    end
    for (int k = 0; k < int'(N1) - 1; k++)
      if (seq[0][k+1] != seq[0][k] + AW'(1)) n_mis++;

    // Load the table during reset.
    tbl_we = 1'b0; tbl_waddr = '0; tbl_wdata = '0;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      tbl_we = 1'b1; tbl_waddr = AW'(a); tbl_wdata = table_m[a];
    end
    @(negedge clk);
    tbl_we = 1'b0;
    rst = 1'b0;

    while (!reached(int'(N1))) @(posedge clk);
    @(negedge clk);
    check(n1_cyc[0] - first_cyc[0] == int'(N1) - 1 + 2 * n_mis,
          $sformatf("one thread, speculating: %0d cycles for %0d tokens, expected %0d",
                    n1_cyc[0] - first_cyc[0], N1, int'(N1) - 1 + 2 * n_mis));
    check(n1_cyc[1] - first_cyc[1] == 3 * (int'(N1) - 1),
          $sformatf("one thread, interlocked: %0d cycles for %0d tokens", n1_cyc[1] - first_cyc[1], N1));
    check(n1_cyc[2] - first_cyc[2] < n1_cyc[3] - first_cyc[3],
          "two threads: speculation is faster than interlock");
    check(n_mis > 0 && n_mis < int'(N1) / 2, "table gives a usable number of mis-speculations");
    $display("cycles for %0d tokens of thread 0: one thread %0d speculating, %0d interlocked; two threads %0d speculating, %0d interlocked; %0d mis-speculations",
             N1, n1_cyc[0] - first_cyc[0], n1_cyc[1] - first_cyc[1],
             n1_cyc[2] - first_cyc[2], n1_cyc[3] - first_cyc[3], n_mis);

    phase2 = 1'b1;
    while (!reached(int'(NTOT))) @(posedge clk);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog: timeout, tokens %0d %0d %0d %0d %0d %0d", cnt[0][0], cnt[1][0], cnt[2][0], cnt[2][1], cnt[3][0], cnt[3][1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
