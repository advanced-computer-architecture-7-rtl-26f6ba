// rv_pkg: instruction fields, ALU operations and the decoded-instruction
// record of the 6-stage RV32I pipeline (IF, ID, RN, EX, MA, WB).
//
// The decoder fills a dec_t for every instruction; the record travels down
// the pipeline next to the renamed register tags. The format flags r, i, s,
// b, u, j and ld are the instruction classes the immediate generator reports.
package rv_pkg;
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU,
    ALU_XOR, ALU_SRL, ALU_SRA, ALU_OR, ALU_AND
  } alu_op_t;

  // branch condition, funct3 of the B-type instructions
  typedef enum logic [2:0] {
    BR_EQ = 3'b000, BR_NE = 3'b001, BR_LT = 3'b100,
    BR_GE = 3'b101, BR_LTU = 3'b110, BR_GEU = 3'b111
  } br_cond_t;

  typedef struct packed {
    logic r, i, s, b, u, j, ld;   // instruction format / class
  } fmt_t;

  typedef struct packed {
    fmt_t        fmt;
    logic [4:0]  rd, rs1, rs2;
    logic        use_rs1, use_rs2, has_dst;
    logic [31:0] imm;
    alu_op_t     op;
    logic        in1_pc;      // ALU input 1 is the PC (AUIPC, JAL, JALR)
    logic        in2_imm;     // ALU input 2 is the immediate
    logic        in2_four;    // ALU input 2 is 4 (link address of JAL, JALR)
    logic        is_load, is_store, is_branch, is_jal, is_jalr;
    br_cond_t    cond;
    logic        illegal;
  } dec_t;
endpackage
