// Self-checking test of exec_unit: random operands for every ALU operation,
// branch condition and jump kind, against results computed here.
// The checks are this design's own; they test the behaviour described above.
module tb_exec_unit;
  import dtmr_pkg::*;
  int checks = 0, failures = 0;
  dec_t d;
  logic [31:0] pc, a, b, res, npc;
  logic taken;

  exec_unit dut (.dec_i(d), .pc_i(pc), .rs1_i(a), .rs2_i(b), .result_o(res), .next_pc_o(npc), .taken_o(taken));

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s a=%h b=%h res=%h npc=%h", m, a, b, res, npc); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      logic [31:0] e;
      pc = $urandom & ~32'd3; a = $urandom; b = (i % 4 == 0) ? a : $urandom;
      d = '0;
      for (int op = 0; op <= int'(ALU_PASSB); op++) begin
        d.alu_op = alu_op_e'(op); #1;
        case (alu_op_e'(op))
          ALU_ADD:  e = a + b;
          ALU_SUB:  e = a - b;
          ALU_SLL:  e = a << b[4:0];
          ALU_SLT:  e = ($signed(a) < $signed(b)) ? 1 : 0;
          ALU_SLTU: e = (a < b) ? 1 : 0;
          ALU_XOR:  e = a ^ b;
          ALU_SRL:  e = a >> b[4:0];
          ALU_SRA:  begin e = a >> b[4:0]; if (a[31]) for (int k = 0; k < int'(b[4:0]); k++) e[31-k] = 1'b1; end
          ALU_OR:   e = a | b;
          ALU_AND:  e = a & b;
          default:  e = b;
        endcase
        chk(res === e && npc === pc + 4 && !taken, $sformatf("alu op %0d", op));
      end
      d = '0; d.imm = {{19{b[12]}}, b[12:1], 1'b0};
      d.br_op = BR_EQ;  #1; chk(taken == (a == b) && npc == (a == b ? pc + d.imm : pc + 4), "BEQ");
      d.br_op = BR_NE;  #1; chk(taken == (a != b), "BNE");
      d.br_op = BR_LT;  #1; chk(taken == ($signed(a) < $signed(b)), "BLT");
      d.br_op = BR_GE;  #1; chk(taken == ($signed(a) >= $signed(b)), "BGE");
      d.br_op = BR_LTU; #1; chk(taken == (a < b) && npc == (a < b ? pc + d.imm : pc + 4), "BLTU");
      d.br_op = BR_GEU; #1; chk(taken == (a >= b), "BGEU");
      d.br_op = BR_JUMP; d.link = 1; #1; chk(taken && npc == pc + d.imm && res == pc + 4, "JAL");
      d.jalr = 1; #1; chk(npc == ((a + d.imm) & ~32'd1) && res == pc + 4, "JALR");
      d = '0; d.op_a_pc = 1; d.op_b_imm = 1; d.imm = {b[31:12], 12'b0}; #1;
      chk(res == pc + d.imm, "AUIPC");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
