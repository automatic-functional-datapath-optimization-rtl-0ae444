// afdo_pkg: shared widths, the instruction encoding of the example RISC core
// and the hazard-resolution choice for its register-file read ports.
//
// The example core is a small 16-bit load/store machine. Its instruction set
// is this design's own: the source only calls it "a classic RISC machine".
// Instruction word (16 bits):
//   [15:12] opcode   [11:9] rd   [8:6] rs   [5:3] rt   (R type)
//   [15:12] opcode   [11:9] rd   [8:6] rs   [5:0] imm6 (I type, signed)
//   [15:12] opcode   [11:9] rd   [8:0] imm9            (LUI uses imm9[7:0], JAL imm9 signed)
package afdo_pkg;

  localparam int unsigned XLEN = 16;  // data word
  localparam int unsigned ILEN = 16;  // instruction word
  localparam int unsigned PCW  = 8;   // instruction address bits (256 words)
  localparam int unsigned DAW  = 8;   // data address bits per thread (256 words)
  localparam int unsigned NREG = 8;   // architectural registers, r0 reads as zero

  typedef logic [XLEN-1:0] word_t;
  typedef logic [ILEN-1:0] inst_t;
  typedef logic [PCW-1:0]  pc_t;
  typedef logic [2:0]      reg_idx_t;

  typedef enum logic [3:0] {
    OP_ADD  = 4'h0,  // rd = rs + rt
    OP_SUB  = 4'h1,  // rd = rs - rt
    OP_AND  = 4'h2,  // rd = rs & rt
    OP_OR   = 4'h3,  // rd = rs | rt
    OP_XOR  = 4'h4,  // rd = rs ^ rt
    OP_SLT  = 4'h5,  // rd = (signed rs < signed rt)
    OP_ADDI = 4'h6,  // rd = rs + imm6
    OP_LW   = 4'h7,  // rd = dmem[rs + imm6]
    OP_SW   = 4'h8,  // dmem[rs + imm6] = rd
    OP_BEQ  = 4'h9,  // if (rd == rs) pc = pc + 1 + imm6
    OP_BNE  = 4'hA,  // if (rd != rs) pc = pc + 1 + imm6
    OP_LUI  = 4'hB,  // rd = imm9[7:0] << 8
    OP_JAL  = 4'hC,  // rd = pc + 1; pc = pc + 1 + imm9
    OP_IN   = 4'hD,  // rd = next token of the thread's input port
    OP_OUT  = 4'hE,  // send rd on the thread's output port
    OP_HALT = 4'hF   // stop the thread
  } opcode_e;

  // How a read port resolves read-after-write hazards (interlock is the default).
  typedef enum logic {
    HAZ_INTERLOCK = 1'b0,
    HAZ_BYPASS    = 1'b1
  } haz_mode_e;

  // Decoded instruction, carried down the pipeline.
  typedef struct packed {
    opcode_e  op;
    reg_idx_t rd;
    reg_idx_t rs;
    reg_idx_t rt;
    word_t    imm;      // sign- or zero-extended immediate
    logic     rd_a;     // read port A (rs) used
    logic     rd_b;     // read port B used
    reg_idx_t rb;       // register read through port B (rt or rd)
    logic     rf_we;    // writes rd
    logic     is_in;
    logic     is_out;
    logic     is_lw;
    logic     is_sw;
    logic     is_halt;
  } dec_t;

  function automatic dec_t decode(inst_t i);
    dec_t d;
    d.op     = opcode_e'(i[15:12]);
    d.rd     = i[11:9];
    d.rs     = i[8:6];
    d.rt     = i[5:3];
    d.imm    = {{(XLEN-6){i[5]}}, i[5:0]};
    d.rd_a   = 1'b0;
    d.rd_b   = 1'b0;
    d.rb     = i[5:3];
    d.rf_we  = 1'b0;
    d.is_in  = 1'b0;
    d.is_out = 1'b0;
    d.is_lw  = 1'b0;
    d.is_sw  = 1'b0;
    d.is_halt = 1'b0;
    unique case (d.op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT: begin
        d.rd_a = 1'b1; d.rd_b = 1'b1; d.rf_we = 1'b1;
      end
      OP_ADDI: begin d.rd_a = 1'b1; d.rf_we = 1'b1; end
      OP_LW:   begin d.rd_a = 1'b1; d.rf_we = 1'b1; d.is_lw = 1'b1; end
      OP_SW:   begin d.rd_a = 1'b1; d.rd_b = 1'b1; d.rb = i[11:9]; d.is_sw = 1'b1; end
      OP_BEQ, OP_BNE: begin d.rd_a = 1'b1; d.rd_b = 1'b1; d.rb = i[11:9]; end
      OP_LUI:  begin d.rf_we = 1'b1; d.imm = {i[7:0], 8'h00}; end
      OP_JAL:  begin d.rf_we = 1'b1; d.imm = {{(XLEN-9){i[8]}}, i[8:0]}; end
      OP_IN:   begin d.rf_we = 1'b1; d.is_in = 1'b1; end
      OP_OUT:  begin d.rd_b = 1'b1; d.rb = i[11:9]; d.is_out = 1'b1; end
      OP_HALT: begin d.is_halt = 1'b1; end
    endcase
    if (d.rd == '0) d.rf_we = 1'b0;  // r0 is never written
    return d;
  endfunction

endpackage
