// afdo_top: the two example designs side by side, each with its own ports.
//
//  * u_core - mt_risc: a THREADS-way multithreaded, three-stage, in-order
//    RISC core with interlocked (or bypassed) hazards, dynamic or fixed
//    thread interleaving and per-thread instruction caches that miss
//    pseudo-randomly and answer through a variable latency interface.
//  * u_fame1 - fame1_system: a two-module target design partitioned into
//    FAME1 wrappers that talk through a FAME Register and a FAME Queue.
//  * u_fame5 - fame5_system: FAME5_THREADS copies of the same target design
//    whose B modules are emulated by one multithreaded FAME5 module.
//  * u_spec - spec_seq: a SPEC_THREADS-way multithreaded three-stage
//    pipelined sequencer whose register read port is speculated, with
//    mis-speculation kills.
//
// The four share only clock and reset (synchronous, active high). Defaults:
// two threads with dynamic interleave on three stages, the configuration the
// source found best in throughput per area; four-thread FAME5 example.
module afdo_top
  import afdo_pkg::*;
  import fame_ex_pkg::*;
#(
  parameter int unsigned THREADS       = 2,
  parameter bit          DYNAMIC       = 1'b1,
  parameter haz_mode_e   RF_HAZ        = HAZ_INTERLOCK,
  parameter int unsigned MISS_LAT      = 4,
  parameter int unsigned FAME5_THREADS = 4,
  parameter int unsigned SPEC_AW       = 8,
  parameter int unsigned SPEC_THREADS  = 2
) (
  input  logic               clk,
  input  logic               rst,
  // RISC core
  input  logic               imem_we,
  input  pc_t                imem_waddr,
  input  inst_t              imem_wdata,
  input  logic [THREADS-1:0] in_valid,
  output logic [THREADS-1:0] in_ready,
  input  word_t              in_data  [THREADS],
  output logic [THREADS-1:0] out_valid,
  input  logic [THREADS-1:0] out_ready,
  output word_t              out_data [THREADS],
  output logic [THREADS-1:0] halted,
  // FAME1 example
  input  logic               f1_host_en_a,
  input  logic               f1_host_en_b,
  output logic               f1_fire_a,
  output logic               f1_fire_b,
  output fword_t             f1_a_acc,
  output fword_t             f1_b_sent,
  output logic [31:0]        f1_a_cycles,
  output logic [31:0]        f1_b_cycles,
  // FAME5 example
  input  logic [FAME5_THREADS-1:0] f5_host_en_a,
  output fword_t             f5_a_acc    [FAME5_THREADS],
  output fword_t             f5_b_sent   [FAME5_THREADS],
  output logic [31:0]        f5_a_cycles [FAME5_THREADS],
  output logic [31:0]        f5_b_cycles [FAME5_THREADS],
  // speculation example
  input  logic               sp_tbl_we,
  input  logic [SPEC_AW-1:0] sp_tbl_waddr,
  input  logic [SPEC_AW:0]   sp_tbl_wdata,
  output logic [SPEC_THREADS-1:0] sp_out_valid,
  input  logic [SPEC_THREADS-1:0] sp_out_ready,
  output logic [SPEC_AW-1:0] sp_out_data [SPEC_THREADS],
  output logic               sp_mispredict
);

  mt_risc #(
    .THREADS(THREADS), .DYNAMIC(DYNAMIC), .RF_HAZ(RF_HAZ), .MISS_LAT(MISS_LAT)
  ) u_core (
    .clk, .rst, .imem_we, .imem_waddr, .imem_wdata,
    .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data, .halted
  );

  fame1_system u_fame1 (
    .clk, .rst, .host_en_a(f1_host_en_a), .host_en_b(f1_host_en_b),
    .fire_a(f1_fire_a), .fire_b(f1_fire_b), .a_acc(f1_a_acc), .b_sent(f1_b_sent),
    .a_cycles(f1_a_cycles), .b_cycles(f1_b_cycles)
  );

  fame5_system #(.THREADS(FAME5_THREADS)) u_fame5 (
    .clk, .rst, .host_en_a(f5_host_en_a),
    .a_acc(f5_a_acc), .b_sent(f5_b_sent), .a_cycles(f5_a_cycles),
    .b_cycles(f5_b_cycles)
  );

  spec_seq #(.AW(SPEC_AW), .THREADS(SPEC_THREADS)) u_spec (
    .clk, .rst, .tbl_we(sp_tbl_we), .tbl_waddr(sp_tbl_waddr),
    .tbl_wdata(sp_tbl_wdata), .out_valid(sp_out_valid), .out_ready(sp_out_ready),
    .out_data(sp_out_data), .mispredict(sp_mispredict)
  );

endmodule
