// pipe_ctrl: interlocking control for an in-order pipeline of STAGES stages.
//
// Every stage k holds at most one next-state update. was_valid[k] says that
// stage k holds one; for stage 0 it is the issue request (issue_valid), for
// later stages it is a register loaded with valid[k-1] whenever stage k-1
// advances. A stage is valid (may act this cycle) when it holds an update, is
// not blocked (hold: a read-after-write hazard on one of its read ports, a busy
// ready/valid port or a busy variable latency unit) and is not killed.
//
//   valid[k] = was_valid[k] & ~hold[k] & ~kill[k]
//   stall[k] = stall[k+1] | (was_valid[k+1] & hold[k+1] & ~kill[k+1]),
//              stall[STAGES-1] = 0
//   fire[k]  = valid[k] & ~stall[k]   (side effects of stage k commit)
//   issue_stall = stall[0] | (was_valid[0] & hold[0] & ~kill[0])
//
// A blocked stage keeps its contents (the stage in front of it stalls) and
// sends a bubble to the next stage. A killed stage drops its contents. The
// caller loads its own pipeline data registers between stage k and k+1 when
// advance[k] = ~stall[k]. The caller must mask state write enables, ready/valid
// handshakes and variable latency requests of stage k with fire[k].
//
// The equations follow the generated interlock logic of the source
// (valid, was-valid and stall signals, kill signals fed into the valid gate).
// Masking with "not stall" as well as with valid follows its figure of a
// three-stage pipeline. Dropping the contents of a killed stage that is also
// stalled is this design's choice; stage 0 has no register of its own, so an
// update killed there while stage 0 is stalled stays with the issue source.
module pipe_ctrl #(
  parameter int unsigned STAGES = 3
) (
  input  logic              clk,
  input  logic              rst,          // synchronous, active high
  input  logic              issue_valid,  // stage 0 holds an update this cycle
  input  logic [STAGES-1:0] hold,         // stage k blocked this cycle
  input  logic [STAGES-1:0] kill,         // stage k contents dropped
  output logic [STAGES-1:0] was_valid,    // stage k holds an update
  output logic [STAGES-1:0] valid,
  output logic [STAGES-1:0] stall,
  output logic [STAGES-1:0] advance,      // load pipeline register k -> k+1
  output logic [STAGES-1:0] fire,
  output logic              issue_stall   // the issue source must hold its update
);

  logic [STAGES-1:0] wv_q;   // bit 0 unused, stage 0 is fed by issue_valid
  logic [STAGES-1:0] blocked;

  always_comb begin
    was_valid    = wv_q;
    was_valid[0] = issue_valid;
    blocked      = was_valid & hold & ~kill;
    valid        = was_valid & ~hold & ~kill;
    stall[STAGES-1] = 1'b0;
    for (int k = int'(STAGES) - 2; k >= 0; k--)
      stall[k] = stall[k+1] | blocked[k+1];
    advance     = ~stall;
    fire        = valid & ~stall;
    issue_stall = stall[0] | blocked[0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wv_q <= '0;
    end else begin
      for (int k = 1; k < int'(STAGES); k++) begin
        if (!stall[k-1])   wv_q[k] <= valid[k-1];
        else if (kill[k])  wv_q[k] <= 1'b0;
      end
      wv_q[0] <= 1'b0;
    end
  end

  // A stage that fires never stalls and a stalled stage never loses its
  // contents unless it is killed.
  a_fire_not_stalled: assert property (@(posedge clk) disable iff (rst)
    (fire & stall) == '0);

endmodule
