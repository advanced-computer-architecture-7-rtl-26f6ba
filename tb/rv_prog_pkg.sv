// rv_prog_pkg: test program, assembler helpers and instruction-set model for
// the tests of the six-stage pipeline.
//
// build() assembles the test program into prog. iss() executes it one
// instruction at a time up to the final self-loop and records the executed
// PCs (t_pc), whether each writes a register (t_dst) and the value (t_val),
// the final registers (m_reg) and data memory (m_mem), the number of control
// transfers (n_redirect_exp) and the number of instructions that read the
// result of the load right before them (n_loaduse_exp).
package rv_prog_pkg;
  // assembler
  logic [31:0] prog [$];

  function automatic logic [31:0] r_t(int f7, int rs2, int rs1, int f3, int rd, int op);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'(op)};
  endfunction
  function automatic logic [31:0] i_t(int imm, int rs1, int f3, int rd, int op);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), 7'(op)};
  endfunction
  function automatic logic [31:0] s_t(int imm, int rs2, int rs1, int f3);
    logic [11:0] m;
    m = 12'(imm);
    return {m[11:5], 5'(rs2), 5'(rs1), 3'(f3), m[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_t(int off, int rs2, int rs1, int f3);
    logic [12:0] m;
    m = 13'(off);
    return {m[12], m[10:5], 5'(rs2), 5'(rs1), 3'(f3), m[4:1], m[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] j_t(int off, int rd);
    logic [20:0] m;
    m = 21'(off);
    return {m[20], m[10:1], m[11], m[19:12], 5'(rd), 7'b1101111};
  endfunction

  function automatic int here(); return prog.size() * 4; endfunction
  task automatic emit(input logic [31:0] w); prog.push_back(w); endtask

  task automatic build();
    int l1, l2, jal_f, jal_end, f, fin;
    emit(i_t(10, 0, 0, 1, 7'h13));           // addi x1, x0, 10
    emit(i_t(3, 0, 0, 2, 7'h13));            // addi x2, x0, 3
    emit(i_t(-5, 0, 0, 4, 7'h13));           // addi x4, x0, -5
    emit(r_t(32, 2, 1, 0, 5, 7'h33));        // sub  x5, x1, x2
    emit(r_t(0, 4, 5, 0, 9, 7'h33));         // add  x9, x5, x4
    emit(r_t(0, 2, 5, 6, 5, 7'h33));         // or   x5, x5, x2
    emit(r_t(0, 1, 9, 7, 2, 7'h33));         // and  x2, x9, x1
    emit(i_t(12'h200, 0, 0, 10, 7'h13));     // addi x10, x0, 0x200
    emit(i_t(0, 0, 0, 11, 7'h13));           // addi x11, x0, 0
    emit(i_t(40, 0, 0, 12, 7'h13));          // addi x12, x0, 40
    l1 = here();
    emit(i_t(2, 11, 1, 13, 7'h13));          // slli x13, x11, 2
    emit(r_t(0, 13, 10, 0, 14, 7'h33));      // add  x14, x10, x13
    emit(r_t(0, 11, 11, 0, 15, 7'h33));      // add  x15, x11, x11
    emit(r_t(0, 11, 15, 0, 15, 7'h33));      // add  x15, x15, x11
    emit(s_t(0, 15, 14, 2));                 // sw   x15, 0(x14)
    emit(i_t(1, 11, 0, 11, 7'h13));          // addi x11, x11, 1
    emit(b_t(l1 - here(), 12, 11, 4));       // blt  x11, x12, l1
    emit(i_t(0, 0, 0, 11, 7'h13));           // addi x11, x0, 0
    emit(i_t(0, 0, 0, 16, 7'h13));           // addi x16, x0, 0
    l2 = here();
    emit(i_t(2, 11, 1, 13, 7'h13));          // slli x13, x11, 2
    emit(r_t(0, 13, 10, 0, 14, 7'h33));      // add  x14, x10, x13
    emit(i_t(0, 14, 2, 17, 7'h03));          // lw   x17, 0(x14)
    emit(r_t(0, 17, 16, 0, 16, 7'h33));      // add  x16, x16, x17  (load-use)
    emit(i_t(1, 11, 0, 11, 7'h13));          // addi x11, x11, 1
    emit(b_t(l2 - here(), 12, 11, 1));       // bne  x11, x12, l2
    emit(s_t(256, 16, 10, 2));               // sw   x16, 256(x10)
    emit({20'h12345, 5'd18, 7'h37});         // lui  x18, 0x12345
    emit({20'h00001, 5'd19, 7'h17});         // auipc x19, 1
    jal_f = prog.size(); emit('0);           // jal  x20, f
    emit(i_t(7, 0, 0, 21, 7'h13));           // addi x21, x0, 7
    emit(i_t(256, 10, 2, 25, 7'h03));        // lw   x25, 256(x10)
    emit(r_t(0, 25, 21, 2, 26, 7'h33));      // slt  x26, x21, x25
    jal_end = prog.size(); emit('0);         // jal  x0, fin
    f = here();
    emit(i_t(-1, 18, 4, 22, 7'h13));         // xori x22, x18, -1
    emit(i_t(12'h404, 22, 5, 23, 7'h13));    // srai x23, x22, 4
    emit(r_t(0, 22, 1, 3, 24, 7'h33));       // sltu x24, x1, x22
    emit(r_t(0, 1, 22, 5, 27, 7'h33));       // srl  x27, x22, x1
    emit(i_t(0, 20, 0, 0, 7'h67));           // jalr x0, 0(x20)
    fin = here();
    emit(j_t(0, 0));                         // jal  x0, 0   (halt)
    prog[jal_f]   = j_t(f - jal_f * 4, 20);
    prog[jal_end] = j_t(fin - jal_end * 4, 0);
  endtask

  // ------------------------------------------------ instruction-set model
  int unsigned   m_reg [32];
  int unsigned   m_mem [int unsigned];
  int unsigned   t_pc [$], t_val [$];
  bit            t_dst [$];
  int            n_redirect_exp = 0, n_loaduse_exp = 0;


  task automatic iss(input int unsigned halt_pc);
    int unsigned pc, ir, rs1v, rs2v, rd, res, npc;
    int unsigned imm_i, imm_s, imm_b, imm_j;
    bit wr;
    int prev_load_rd;
    t_pc.delete(); t_val.delete(); t_dst.delete(); m_mem.delete();
    n_redirect_exp = 0; n_loaduse_exp = 0;
    prev_load_rd = -1;
    for (int i = 0; i < 32; i++) m_reg[i] = 0;
    pc = 0;
    while (pc != halt_pc) begin
      ir = prog[pc / 4];
      rd = ir[11:7];
      rs1v = m_reg[ir[19:15]]; rs2v = m_reg[ir[24:20]];
      imm_i = {{20{ir[31]}}, ir[31:20]};
      imm_s = {{20{ir[31]}}, ir[31:25], ir[11:7]};
      imm_b = {{19{ir[31]}}, ir[31], ir[7], ir[30:25], ir[11:8], 1'b0};
      imm_j = {{11{ir[31]}}, ir[31], ir[19:12], ir[20], ir[30:21], 1'b0};
      npc = pc + 4; wr = 0; res = 0;
      // the pipeline holds an instruction that reads the register a load
      // right before it writes
      if (prev_load_rd > 0 && ((ir[6:0] != 7'h37 && ir[6:0] != 7'h17 && ir[6:0] != 7'h6f && ir[19:15] == prev_load_rd) ||
          ((ir[6:0] == 7'h33 || ir[6:0] == 7'h23 || ir[6:0] == 7'h63) && ir[24:20] == prev_load_rd)))
        n_loaduse_exp++;
      prev_load_rd = -1;
      case (ir[6:0])
        7'h37: begin wr = 1; res = {ir[31:12], 12'b0}; end
        7'h17: begin wr = 1; res = pc + {ir[31:12], 12'b0}; end
        7'h6f: begin wr = 1; res = pc + 4; npc = pc + imm_j; end
        7'h67: begin wr = 1; res = pc + 4; npc = (rs1v + imm_i) & ~32'h1; end
        7'h63: begin
          bit t;
          case (ir[14:12])
            3'b000: t = (rs1v == rs2v);
            3'b001: t = (rs1v != rs2v);
            3'b100: t = ($signed(rs1v) < $signed(rs2v));
            3'b101: t = ($signed(rs1v) >= $signed(rs2v));
            3'b110: t = (rs1v < rs2v);
            default: t = (rs1v >= rs2v);
          endcase
          if (t) npc = pc + imm_b;
        end
        7'h03: begin
          wr = 1;
          res = m_mem.exists((rs1v + imm_i) / 4) ? m_mem[(rs1v + imm_i) / 4] : 0;
          prev_load_rd = rd;
        end
        7'h23: m_mem[(rs1v + imm_s) / 4] = rs2v;
        7'h13, 7'h33: begin
          int unsigned b;
          bit alt;
          b   = (ir[6:0] == 7'h13) ? imm_i : rs2v;
          alt = ir[30] && (ir[6:0] == 7'h33 || ir[14:12] == 3'b101);
          wr  = 1;
          case (ir[14:12])
            3'b000: res = alt ? rs1v - b : rs1v + b;
            3'b001: res = rs1v << b[4:0];
            3'b010: res = ($signed(rs1v) < $signed(b)) ? 1 : 0;
            3'b011: res = (rs1v < b) ? 1 : 0;
            3'b100: res = rs1v ^ b;
            3'b101: res = alt ? $unsigned($signed(rs1v) >>> b[4:0]) : rs1v >> b[4:0];
            3'b110: res = rs1v | b;
            default: res = rs1v & b;
          endcase
        end
        default: ;
      endcase
      if (npc != pc + 4) n_redirect_exp++;
      t_pc.push_back(pc);
      t_dst.push_back(wr && rd != 0);
      t_val.push_back(res);
      if (wr && rd != 0) m_reg[rd] = res;
      pc = npc;
    end
  endtask

endpackage
