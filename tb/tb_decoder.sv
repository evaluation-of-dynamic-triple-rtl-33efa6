// Self-checking test of decoder: random instructions of every class, built
// with the encoder of rv_tb_pkg; the expected immediate, registers and control
// fields are written down per class here.
// The checks are this design's own; they test the behaviour described above.
module tb_decoder;
  import dtmr_pkg::*;
  import rv_tb_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] ins;
  dec_t d;

  decoder dut (.instr_i(ins), .dec_o(d));

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s (instr %h)", m, ins); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      int rd, a, b, imm, off;
      rd = 1 + $urandom % 31; a = $urandom % 32; b = $urandom % 32;
      imm = int'($urandom % 4096) - 2048;
      off = (int'($urandom % 4096) - 2048) * 2;
      ins = ADDI(rd, a, imm); #1;
      chk(d.rd_we && d.rd == 5'(rd) && d.rs1 == 5'(a) && d.imm == 32'(imm) && d.op_b_imm &&
          d.alu_op == ALU_ADD && !d.mem_re && !d.mem_we && d.br_op == BR_NONE, "ADDI");
      ins = SUB(rd, a, b); #1;
      chk(d.rd_we && d.rs2 == 5'(b) && !d.op_b_imm && d.alu_op == ALU_SUB, "SUB");
      ins = SRAI(rd, a, b); #1;
      chk(d.alu_op == ALU_SRA && d.imm[4:0] == 5'(b), "SRAI");
      ins = SRLI(rd, a, b); #1;
      chk(d.alu_op == ALU_SRL, "SRLI");
      ins = SLTU(rd, a, b); #1;
      chk(d.alu_op == ALU_SLTU, "SLTU");
      ins = LH(rd, a, imm); #1;
      chk(d.mem_re && !d.mem_we && d.mem_size == MEM_H && d.imm == 32'(imm) && d.rd_we, "LH");
      ins = SB(b, a, imm); #1;
      chk(d.mem_we && !d.mem_re && d.mem_size == MEM_B && d.imm == 32'(imm) && !d.rd_we &&
          d.rs2 == 5'(b), "SB");
      ins = BGE(a, b, off); #1;
      chk(d.br_op == BR_GE && d.imm == 32'(off) && !d.rd_we, "BGE");
      ins = JAL(rd, off * 64); #1;
      chk(d.br_op == BR_JUMP && d.link && !d.jalr && d.imm == 32'(off * 64) && d.rd_we, "JAL");
      ins = JALR(rd, a, imm); #1;
      chk(d.br_op == BR_JUMP && d.link && d.jalr && d.imm == 32'(imm), "JALR");
      ins = LUI(rd, imm + 2048); #1;
      chk(d.alu_op == ALU_PASSB && d.imm == {20'(imm + 2048), 12'b0} && d.rd_we, "LUI");
      ins = AUIPC(rd, imm + 2048); #1;
      chk(d.op_a_pc && d.op_b_imm && d.alu_op == ALU_ADD, "AUIPC");
      ins = ADD(0, a, b); #1;
      chk(!d.rd_we, "write to x0 dropped");
      ins = 32'h0000_0073; #1;
      chk(!d.rd_we && !d.mem_re && !d.mem_we && d.br_op == BR_NONE, "ECALL is a no-operation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
