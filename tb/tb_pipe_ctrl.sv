// tb_pipe_ctrl: self-checking test of the interlock controller.
//
// A shadow data pipeline carries a sequence number for every issued update,
// loaded with the controller's advance signals as a user pipeline would be.
// Random holds and kills are applied. The test checks that updates leave the
// last stage in issue order, each exactly once unless killed, that a held or
// killed stage never fires, that a stage behind a blocked stage keeps its
// contents, and that without holds an update needs exactly STAGES-1 cycles
// from issue to the last stage. Run for 3 and 5 stages.
module tb_pipe_ctrl;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;
  int checks = 0, failures = 0;
  int phase = 0;   // 0: random holds and kills, 1: none

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  for (genvar g = 0; g < 2; g++) begin : g_p
    localparam int S = (g == 0) ? 3 : 5;
    logic         issue_valid, issue_stall;
    logic [S-1:0] hold, kill, was_valid, valid, stall, advance, fire;
    int           id [S];
    int           next_id, next_retire;
    int           issue_cyc [int];
    int           cyc;
    int           lat_t0 = 0;  // updates issued after this cycle are timed
    bit           killed [int];

    pipe_ctrl #(.STAGES(S)) dut (.*);

    // stimulus on the falling edge
    always @(negedge clk) begin
      issue_valid <= ($urandom_range(9) < 8);
      for (int k = 0; k < S; k++) begin
        hold[k] <= (phase == 0) && ($urandom_range(9) < 2);
        kill[k] <= (phase == 0) && ($urandom_range(19) < 1);
      end
    end

    always @(posedge clk) begin
      if (rst) begin
        next_id = 0; next_retire = 0; cyc = 0;
        for (int k = 0; k < S; k++) id[k] = -1;
      end else begin
        int id0;
        cyc++;
        id0 = next_id;
        if (!issue_valid) id0 = -1;
        if (!issue_cyc.exists(id0) && id0 >= 0) issue_cyc[id0] = cyc;
        if (phase == 1 && lat_t0 == 0) lat_t0 = cyc + 10;
        // rules on this cycle's signals
        for (int k = 0; k < S; k++) begin
          int cur;
          cur = (k == 0) ? id0 : id[k];
          if (was_valid[k] && (hold[k] || kill[k])) check(!fire[k], "held stage fired");
          if (was_valid[k] && kill[k] && cur >= 0 && !(k == 0 && issue_stall)) killed[cur] = 1'b1;
        end
        if (fire[S-1]) begin
          // skip over updates that were killed on the way
          while (killed.exists(next_retire)) next_retire++;
          check(id[S-1] == next_retire, $sformatf("out of order: got %0d expected %0d", id[S-1], next_retire));
          if (phase == 1 && issue_cyc.exists(id[S-1]) && issue_cyc[id[S-1]] > lat_t0)
            check(cyc - issue_cyc[id[S-1]] == S - 1, $sformatf("latency S=%0d id=%0d %0d", S, id[S-1], cyc - issue_cyc[id[S-1]]));
          next_retire = id[S-1] + 1;
        end
        // shadow pipeline registers
        for (int k = S - 1; k >= 1; k--) begin
          if (advance[k-1]) id[k] = valid[k-1] ? ((k - 1 == 0) ? id0 : id[k-1]) : -1;
          else check(!(was_valid[k] && !kill[k]) || id[k] >= 0, "stalled stage lost its update");
        end
        // the issue source moves on when stage 0 is not stalled
        if (issue_valid && (!issue_stall)) next_id++;
      end
    end
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (3000) @(posedge clk);
    phase = 1;
    repeat (10) @(posedge clk);
    repeat (500) @(posedge clk);
    check(g_p[0].next_retire > 1000 && g_p[1].next_retire > 1000, "too few updates retired");
    $display("retired: %0d (3 stages), %0d (5 stages)", g_p[0].next_retire, g_p[1].next_retire);
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
