// rv_alu: EX-stage ALU of the RV32I pipeline.
//
// Computes w_alu = in1 op in2 for the RV32I integer operations and, for
// branches, w_tkn: whether the branch condition holds for in1 and in2. Shift
// amounts are in2[4:0]. Purely combinational.
module rv_alu
  import rv_pkg::*;
(
  input  alu_op_t     op,
  input  br_cond_t    cond,
  input  logic [31:0] in1,
  input  logic [31:0] in2,
  output logic [31:0] w_alu,
  output logic        w_tkn
);
  always_comb begin
    unique case (op)
      ALU_ADD:  w_alu = in1 + in2;
      ALU_SUB:  w_alu = in1 - in2;
      ALU_SLL:  w_alu = in1 << in2[4:0];
      ALU_SLT:  w_alu = {31'b0, $signed(in1) < $signed(in2)};
      ALU_SLTU: w_alu = {31'b0, in1 < in2};
      ALU_XOR:  w_alu = in1 ^ in2;
      ALU_SRL:  w_alu = in1 >> in2[4:0];
      ALU_SRA:  w_alu = $unsigned($signed(in1) >>> in2[4:0]);
      ALU_OR:   w_alu = in1 | in2;
      default:  w_alu = in1 & in2;
    endcase
    unique case (cond)
      BR_EQ:   w_tkn = (in1 == in2);
      BR_NE:   w_tkn = (in1 != in2);
      BR_LT:   w_tkn = ($signed(in1) < $signed(in2));
      BR_GE:   w_tkn = ($signed(in1) >= $signed(in2));
      BR_LTU:  w_tkn = (in1 < in2);
      default: w_tkn = (in1 >= in2);
    endcase
  end
endmodule
