// tb_risc_pkg: test program and instruction-level reference model for the
// example RISC core.
//
// The program is an arithmetic kernel run by every thread: read n from the
// input port; stop when n is 0; otherwise build the running sums 1..i into
// data memory, reload the sum for n, mix it with a few ALU operations and send
// three results on the output port, then repeat. ref_run() executes the same
// program one instruction at a time on a private copy of the architectural
// state, independent of the pipeline, and returns the output sequence.
package tb_risc_pkg;
  import afdo_pkg::*;

  localparam int PROG_LEN = 19;

  function automatic inst_t enc_r(opcode_e op, int rd, int rs, int rt);
    return {op, 3'(rd), 3'(rs), 3'(rt), 3'b000};
  endfunction
  function automatic inst_t enc_i(opcode_e op, int rd, int rs, int imm);
    return {op, 3'(rd), 3'(rs), 6'(imm)};
  endfunction
  function automatic inst_t enc_j(opcode_e op, int rd, int imm);
    return {op, 3'(rd), 9'(imm)};
  endfunction

  function automatic inst_t prog(int a);
    case (a)
      0:  return enc_i(OP_IN,   1, 0, 0);        // r1 = n
      1:  return enc_i(OP_BEQ,  1, 0, 18 - 2);   // n == 0 -> halt at 18
      2:  return enc_i(OP_ADDI, 2, 0, 0);        // sum = 0
      3:  return enc_i(OP_ADDI, 3, 0, 0);        // i = 0
      4:  return enc_i(OP_ADDI, 3, 3, 1);        // i++
      5:  return enc_r(OP_ADD,  2, 2, 3);        // sum += i
      6:  return enc_i(OP_SW,   2, 3, 0);        // dmem[i] = sum
      7:  return enc_i(OP_BNE,  3, 1, 4 - 8);    // loop while i != n
      8:  return enc_i(OP_LW,   4, 1, 0);        // r4 = dmem[n]
      9:  return enc_j(OP_LUI,  5, 9'h05A);      // r5 = 0x5A00
      10: return enc_r(OP_XOR,  5, 5, 4);        // r5 ^= r4
      11: return enc_r(OP_SUB,  6, 5, 1);        // r6 = r5 - n
      12: return enc_r(OP_SLT,  7, 1, 4);        // r7 = n < sum
      13: return enc_r(OP_OR,   6, 6, 7);
      14: return enc_i(OP_OUT,  4, 0, 0);
      15: return enc_i(OP_OUT,  6, 0, 0);
      16: return enc_r(OP_AND,  7, 6, 4);
      17: return enc_j(OP_JAL,  7, 0 - 18 + 0);  // back to 0 (r7 = 18)
      18: return enc_i(OP_HALT, 0, 0, 0);
      default: return enc_i(OP_HALT, 0, 0, 0);
    endcase
  endfunction

  // Instruction-level model: runs the program on the inputs, returns outputs.
  function automatic void ref_run(input word_t ins[$], output word_t outs[$]);
    word_t rf [NREG];
    word_t dm [int];
    int    pc, steps;
    word_t a, b;
    inst_t i;
    dec_t  d;
    outs = {};
    foreach (rf[r]) rf[r] = '0;
    pc = 0;
    steps = 0;
    while (steps < 100000) begin
      int npc;
      word_t res;
      steps++;
      i = prog(pc);
      d = decode(i);
      a = rf[d.rs];
      b = rf[d.rb];
      npc = (pc + 1) % (2**PCW);
      res = '0;
      case (d.op)
        OP_ADD:  res = a + b;
        OP_SUB:  res = a - b;
        OP_AND:  res = a & b;
        OP_OR:   res = a | b;
        OP_XOR:  res = a ^ b;
        OP_SLT:  res = ($signed(a) < $signed(b)) ? 1 : 0;
        OP_ADDI: res = a + d.imm;
        OP_LW:   res = dm.exists(int'(8'(a + d.imm))) ? dm[int'(8'(a + d.imm))] : '0;
        OP_SW:   dm[int'(8'(a + d.imm))] = b;
        OP_BEQ:  if (a == b) npc = (pc + 1 + int'($signed(d.imm))) % (2**PCW);
        OP_BNE:  if (a != b) npc = (pc + 1 + int'($signed(d.imm))) % (2**PCW);
        OP_LUI:  res = d.imm;
        OP_JAL:  begin res = word_t'(pc + 1); npc = (pc + 1 + int'($signed(d.imm)) + 256) % (2**PCW); end
        OP_IN:   begin res = ins.pop_front(); end
        OP_OUT:  outs.push_back(b);
        OP_HALT: return;
        default: ;
      endcase
      if (d.rf_we) rf[d.rd] = res;
      pc = npc;
    end
  endfunction

endpackage
