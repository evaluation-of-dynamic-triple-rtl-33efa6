// Instruction decoder (ID stage) for RV32I.  Splits a 32-bit instruction into
// register indices, the sign-extended immediate and the control fields of
// dtmr_pkg::dec_t used by the execute, load/store and write-back logic.
// LUI, AUIPC, JAL, JALR, branches, loads, stores, OP-IMM and OP are decoded;
// everything else (FENCE, SYSTEM, CSR, unknown codes) becomes a no-operation,
// which is this design's choice.  Combinational.
module decoder
  import dtmr_pkg::*;
(
  input  logic [31:0] instr_i,
  output dec_t        dec_o
);
  logic [6:0] opcode;
  logic [2:0] f3;
  logic [6:0] f7;

  assign opcode = instr_i[6:0];
  assign f3     = instr_i[14:12];
  assign f7     = instr_i[31:25];

  function automatic alu_op_e alu_of(input logic [2:0] fn3, input logic alt, input logic is_reg);
    case (fn3)
      3'b000:  return (alt && is_reg) ? ALU_SUB : ALU_ADD;
      3'b001:  return ALU_SLL;
      3'b010:  return ALU_SLT;
      3'b011:  return ALU_SLTU;
      3'b100:  return ALU_XOR;
      3'b101:  return alt ? ALU_SRA : ALU_SRL;
      3'b110:  return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    dec_o          = '0;
    dec_o.rd       = instr_i[11:7];
    dec_o.rs1      = instr_i[19:15];
    dec_o.rs2      = instr_i[24:20];
    dec_o.alu_op   = ALU_ADD;
    dec_o.br_op    = BR_NONE;
    dec_o.mem_size = mem_size_e'(f3);
    case (opcode)
      7'b0110111: begin // LUI
        dec_o.rd_we = 1'b1; dec_o.imm = {instr_i[31:12], 12'b0};
        dec_o.alu_op = ALU_PASSB; dec_o.op_b_imm = 1'b1;
      end
      7'b0010111: begin // AUIPC
        dec_o.rd_we = 1'b1; dec_o.imm = {instr_i[31:12], 12'b0};
        dec_o.op_a_pc = 1'b1; dec_o.op_b_imm = 1'b1;
      end
      7'b1101111: begin // JAL
        dec_o.rd_we = 1'b1; dec_o.link = 1'b1; dec_o.br_op = BR_JUMP;
        dec_o.imm = {{12{instr_i[31]}}, instr_i[19:12], instr_i[20], instr_i[30:21], 1'b0};
      end
      7'b1100111: begin // JALR
        dec_o.rd_we = 1'b1; dec_o.link = 1'b1; dec_o.br_op = BR_JUMP; dec_o.jalr = 1'b1;
        dec_o.imm = {{20{instr_i[31]}}, instr_i[31:20]};
      end
      7'b1100011: begin // branches
        dec_o.imm = {{20{instr_i[31]}}, instr_i[7], instr_i[30:25], instr_i[11:8], 1'b0};
        case (f3)
          3'b000:  dec_o.br_op = BR_EQ;
          3'b001:  dec_o.br_op = BR_NE;
          3'b100:  dec_o.br_op = BR_LT;
          3'b101:  dec_o.br_op = BR_GE;
          3'b110:  dec_o.br_op = BR_LTU;
          3'b111:  dec_o.br_op = BR_GEU;
          default: dec_o.br_op = BR_NONE;
        endcase
      end
      7'b0000011: begin // loads
        dec_o.rd_we = 1'b1; dec_o.mem_re = 1'b1; dec_o.op_b_imm = 1'b1;
        dec_o.imm = {{20{instr_i[31]}}, instr_i[31:20]};
      end
      7'b0100011: begin // stores
        dec_o.mem_we = 1'b1; dec_o.op_b_imm = 1'b1;
        dec_o.imm = {{20{instr_i[31]}}, instr_i[31:25], instr_i[11:7]};
      end
      7'b0010011: begin // OP-IMM
        dec_o.rd_we = 1'b1; dec_o.op_b_imm = 1'b1;
        dec_o.imm = {{20{instr_i[31]}}, instr_i[31:20]};
        dec_o.alu_op = alu_of(f3, instr_i[30], 1'b0);
      end
      7'b0110011: begin // OP
        dec_o.rd_we = 1'b1;
        dec_o.alu_op = alu_of(f3, f7[5], 1'b1);
      end
      default: ;
    endcase
    if (dec_o.rd == 5'd0) dec_o.rd_we = 1'b0;
    if (!dec_o.rd_we) dec_o.rd = 5'd0;
  end
endmodule
