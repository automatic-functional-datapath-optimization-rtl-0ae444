// icache_vlu: a private instruction cache timing model for one thread, seen
// through a variable latency unit interface.
//
// Interface (per thread): req_valid/req_addr in; resp_data and resp_pending
// out. The core treats the unit as combinational logic: resp_data is valid in
// the same cycle unless resp_pending is high, and then the request has to be
// repeated later. The instruction words themselves come from a shared backing
// memory through mem_addr/mem_rdata (combinational read).
//
// Hit or miss is decided pseudo-randomly by a 16-bit Fibonacci LFSR
// (x^16 + x^14 + x^13 + x^11 + 1) that steps on every request that is not
// answered by a pending fill: a request misses when the low MISS_BITS bits of
// the LFSR are all zero. A miss starts a fill that lasts MISS_LAT cycles: a
// request for the same address made MISS_LAT cycles after the miss, or later,
// hits. During the fill resp_pending is high for any request and busy is high.
// After the fill, the filled address hits until the next miss.
//
// The 4-cycle miss latency and LFSR-driven misses follow the source. The
// LFSR polynomial, the miss rate (1 in 2^MISS_BITS) and the rule that the
// last filled address always hits are this design's choices.
module icache_vlu
  import afdo_pkg::*;
#(
  parameter int unsigned MISS_LAT  = 4,
  parameter int unsigned MISS_BITS = 2,
  parameter logic [15:0] SEED      = 16'hACE1
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  req_valid,
  input  pc_t   req_addr,
  output inst_t resp_data,
  output logic  resp_pending,
  output logic  busy,           // a fill is in progress
  output pc_t   mem_addr,
  input  inst_t mem_rdata
);

  localparam int unsigned CW = $clog2(MISS_LAT + 1);

  logic [15:0]   lfsr_q;
  logic [CW-1:0] fill_cnt_q;
  pc_t           fill_addr_q;
  logic          filled_q;
  logic          hit_filled;
  logic          rand_miss;

  assign busy       = (fill_cnt_q != '0);
  assign hit_filled = filled_q && (fill_addr_q == req_addr);
  assign rand_miss  = (lfsr_q[MISS_BITS-1:0] == '0);

  assign resp_pending = busy || (!hit_filled && rand_miss);
  assign mem_addr     = req_addr;
  assign resp_data    = mem_rdata;

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr_q      <= SEED;
      fill_cnt_q  <= '0;
      fill_addr_q <= '0;
      filled_q    <= 1'b0;
    end else begin
      if (busy) fill_cnt_q <= fill_cnt_q - 1'b1;
      if (req_valid && !busy && !hit_filled) begin
        lfsr_q <= {lfsr_q[14:0], lfsr_q[15] ^ lfsr_q[13] ^ lfsr_q[12] ^ lfsr_q[10]};
        if (rand_miss) begin
          fill_cnt_q  <= CW'(MISS_LAT - 1);
          fill_addr_q <= req_addr;
          filled_q    <= 1'b1;
        end
      end
    end
  end

endmodule
