// rv_decoder: ID-stage decoder and immediate generator of the RV32I pipeline.
//
// From a 32-bit instruction word it produces the register numbers, the
// sign-extended immediate of the instruction's format, the format flags
// (r, i, s, b, u, j and ld for loads) and the control of the later stages,
// as one rv_pkg::dec_t record. Purely combinational.
//
// Supported: LUI, AUIPC, JAL, JALR, BEQ/BNE/BLT/BGE/BLTU/BGEU, LW, SW, the
// register-immediate and register-register ALU instructions. Loads and stores
// move 32-bit words only. Anything else is flagged illegal and executes as a
// no-op. LUI is executed as x0 + imm; x0 as destination writes nothing.
// The format flags and the immediate follow the pipeline figure's immediate
// generator; the instruction subset is this design's choice.
module rv_decoder
  import rv_pkg::*;
(
  input  logic [31:0] ir,
  output dec_t        d
);
  logic [6:0] opcode;
  logic [2:0] f3;
  logic       f7b5;

  assign opcode = ir[6:0];
  assign f3     = ir[14:12];
  assign f7b5   = ir[30];

  always_comb begin
    d          = '0;
    d.rd       = ir[11:7];
    d.rs1      = ir[19:15];
    d.rs2      = ir[24:20];
    d.op       = ALU_ADD;
    d.cond     = br_cond_t'(f3);
    unique case (opcode)
      OP_LUI:    begin d.fmt.u = 1; d.has_dst = 1; d.in2_imm = 1; d.rs1 = '0; d.use_rs1 = 1; end
      OP_AUIPC:  begin d.fmt.u = 1; d.has_dst = 1; d.in1_pc = 1; d.in2_imm = 1; end
      OP_JAL:    begin d.fmt.j = 1; d.has_dst = 1; d.in1_pc = 1; d.in2_four = 1; d.is_jal = 1; end
      OP_JALR:   begin
                   d.fmt.i = 1; d.has_dst = 1; d.use_rs1 = 1; d.in1_pc = 1; d.in2_four = 1;
                   d.is_jalr = 1; d.illegal = (f3 != 3'b000);
                 end
      OP_BRANCH: begin
                   d.fmt.b = 1; d.use_rs1 = 1; d.use_rs2 = 1; d.is_branch = 1;
                   d.illegal = (f3 == 3'b010) || (f3 == 3'b011);
                 end
      OP_LOAD:   begin
                   d.fmt.i = 1; d.fmt.ld = 1; d.has_dst = 1; d.use_rs1 = 1; d.in2_imm = 1;
                   d.is_load = 1; d.illegal = (f3 != 3'b010);
                 end
      OP_STORE:  begin
                   d.fmt.s = 1; d.use_rs1 = 1; d.use_rs2 = 1; d.in2_imm = 1; d.is_store = 1;
                   d.illegal = (f3 != 3'b010);
                 end
      OP_IMM:    begin
                   d.fmt.i = 1; d.has_dst = 1; d.use_rs1 = 1; d.in2_imm = 1;
                   unique case (f3)
                     3'b000: d.op = ALU_ADD;
                     3'b001: d.op = ALU_SLL;
                     3'b010: d.op = ALU_SLT;
                     3'b011: d.op = ALU_SLTU;
                     3'b100: d.op = ALU_XOR;
                     3'b101: d.op = f7b5 ? ALU_SRA : ALU_SRL;
                     3'b110: d.op = ALU_OR;
                     default: d.op = ALU_AND;
                   endcase
                 end
      OP_REG:    begin
                   d.fmt.r = 1; d.has_dst = 1; d.use_rs1 = 1; d.use_rs2 = 1;
                   unique case (f3)
                     3'b000: d.op = f7b5 ? ALU_SUB : ALU_ADD;
                     3'b001: d.op = ALU_SLL;
                     3'b010: d.op = ALU_SLT;
                     3'b011: d.op = ALU_SLTU;
                     3'b100: d.op = ALU_XOR;
                     3'b101: d.op = f7b5 ? ALU_SRA : ALU_SRL;
                     3'b110: d.op = ALU_OR;
                     default: d.op = ALU_AND;
                   endcase
                 end
      default:   d.illegal = 1;
    endcase
    if (d.illegal) begin
      d.has_dst = 0; d.is_load = 0; d.is_store = 0; d.is_branch = 0; d.is_jal = 0; d.is_jalr = 0;
    end

    // immediate generator
    unique case (1'b1)
      d.fmt.u: d.imm = {ir[31:12], 12'b0};
      d.fmt.j: d.imm = {{12{ir[31]}}, ir[19:12], ir[20], ir[30:21], 1'b0};
      d.fmt.b: d.imm = {{20{ir[31]}}, ir[7], ir[30:25], ir[11:8], 1'b0};
      d.fmt.s: d.imm = {{21{ir[31]}}, ir[30:25], ir[11:7]};
      d.fmt.i: d.imm = {{21{ir[31]}}, ir[30:20]};
      default: d.imm = '0;
    endcase
  end
endmodule
