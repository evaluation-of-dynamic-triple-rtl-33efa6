// Execute logic (IE stage): ALU, branch comparison and next-PC computation
// for one instruction of any hart.  Operand A is rs1 or the PC, operand B is
// rs2 or the immediate.  For jumps the result is PC + 4 (link value).  The
// next PC is the branch/jump target when taken, otherwise PC + 4; the same
// value feeds the hart's PC and, through the PC vote, the dummy PC of hart 0.
// Combinational.
// The original scheme names this unit only; its behaviour is plain RV32I and
// its structure is this design's.
module exec_unit
  import dtmr_pkg::*;
(
  input  dec_t        dec_i,
  input  logic [31:0] pc_i,
  input  logic [31:0] rs1_i,
  input  logic [31:0] rs2_i,
  output logic [31:0] result_o,
  output logic [31:0] next_pc_o,
  output logic        taken_o
);
  logic [31:0] a, b, alu;

  assign a = dec_i.op_a_pc  ? pc_i  : rs1_i;
  assign b = dec_i.op_b_imm ? dec_i.imm : rs2_i;

  always_comb begin
    case (dec_i.alu_op)
      ALU_ADD:   alu = a + b;
      ALU_SUB:   alu = a - b;
      ALU_SLL:   alu = a << b[4:0];
      ALU_SLT:   alu = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:  alu = {31'b0, a < b};
      ALU_XOR:   alu = a ^ b;
      ALU_SRL:   alu = a >> b[4:0];
      ALU_SRA:   alu = 32'($signed(a) >>> b[4:0]);
      ALU_OR:    alu = a | b;
      ALU_AND:   alu = a & b;
      ALU_PASSB: alu = b;
      default:   alu = a + b;
    endcase
  end

  always_comb begin
    case (dec_i.br_op)
      BR_EQ:   taken_o = (rs1_i == rs2_i);
      BR_NE:   taken_o = (rs1_i != rs2_i);
      BR_LT:   taken_o = ($signed(rs1_i) <  $signed(rs2_i));
      BR_GE:   taken_o = ($signed(rs1_i) >= $signed(rs2_i));
      BR_LTU:  taken_o = (rs1_i <  rs2_i);
      BR_GEU:  taken_o = (rs1_i >= rs2_i);
      BR_JUMP: taken_o = 1'b1;
      default: taken_o = 1'b0;
    endcase
    if (!taken_o)        next_pc_o = pc_i + 32'd4;
    else if (dec_i.jalr) next_pc_o = (rs1_i + dec_i.imm) & ~32'd1;
    else                 next_pc_o = pc_i + dec_i.imm;
    result_o = dec_i.link ? pc_i + 32'd4 : alu;
  end
endmodule
