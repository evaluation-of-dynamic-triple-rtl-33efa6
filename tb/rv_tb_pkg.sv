// Testbench helpers: an RV32I instruction encoder (a tiny assembler) and a
// reference instruction-set simulator.  The simulator executes one
// instruction per call on its own register file and byte-addressed data
// memory; testbenches run a program on it and compare the core's register
// files and data memory with its state.  Instruction and data memories are
// separate, as in the core.
// Test support written for this design; nothing in it is part of the scheme.
package rv_tb_pkg;

  // ---------------------------------------------------------------- encoder
  function automatic logic [31:0] r_type(input logic [6:0] f7, input int rs2, input int rs1,
                                         input logic [2:0] f3, input int rd, input logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] i_type(input int imm, input int rs1, input logic [2:0] f3,
                                         input int rd, input logic [6:0] op);
    return {12'(imm), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] s_type(input int imm, input int rs2, input int rs1,
                                         input logic [2:0] f3);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), f3, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_type(input int off, input int rs2, input int rs1,
                                         input logic [2:0] f3);
    logic [12:0] i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] ADD (int rd, int a, int b); return r_type(7'h00, b, a, 3'd0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SUB (int rd, int a, int b); return r_type(7'h20, b, a, 3'd0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLL (int rd, int a, int b); return r_type(7'h00, b, a, 3'd1, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLT (int rd, int a, int b); return r_type(7'h00, b, a, 3'd2, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLTU(int rd, int a, int b); return r_type(7'h00, b, a, 3'd3, rd, 7'b0110011); endfunction
  function automatic logic [31:0] XOR (int rd, int a, int b); return r_type(7'h00, b, a, 3'd4, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SRL (int rd, int a, int b); return r_type(7'h00, b, a, 3'd5, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SRA (int rd, int a, int b); return r_type(7'h20, b, a, 3'd5, rd, 7'b0110011); endfunction
  function automatic logic [31:0] OR  (int rd, int a, int b); return r_type(7'h00, b, a, 3'd6, rd, 7'b0110011); endfunction
  function automatic logic [31:0] AND (int rd, int a, int b); return r_type(7'h00, b, a, 3'd7, rd, 7'b0110011); endfunction
  function automatic logic [31:0] ADDI(int rd, int a, int imm); return i_type(imm, a, 3'd0, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLTI(int rd, int a, int imm); return i_type(imm, a, 3'd2, rd, 7'b0010011); endfunction
  function automatic logic [31:0] XORI(int rd, int a, int imm); return i_type(imm, a, 3'd4, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ORI (int rd, int a, int imm); return i_type(imm, a, 3'd6, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ANDI(int rd, int a, int imm); return i_type(imm, a, 3'd7, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLLI(int rd, int a, int sh); return i_type(sh, a, 3'd1, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRLI(int rd, int a, int sh); return i_type(sh, a, 3'd5, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRAI(int rd, int a, int sh); return i_type(sh | 'h400, a, 3'd5, rd, 7'b0010011); endfunction
  function automatic logic [31:0] LB  (int rd, int a, int imm); return i_type(imm, a, 3'd0, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LH  (int rd, int a, int imm); return i_type(imm, a, 3'd1, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LW  (int rd, int a, int imm); return i_type(imm, a, 3'd2, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LBU (int rd, int a, int imm); return i_type(imm, a, 3'd4, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LHU (int rd, int a, int imm); return i_type(imm, a, 3'd5, rd, 7'b0000011); endfunction
  function automatic logic [31:0] SB  (int b, int a, int imm); return s_type(imm, b, a, 3'd0); endfunction
  function automatic logic [31:0] SH  (int b, int a, int imm); return s_type(imm, b, a, 3'd1); endfunction
  function automatic logic [31:0] SW  (int b, int a, int imm); return s_type(imm, b, a, 3'd2); endfunction
  function automatic logic [31:0] BEQ (int a, int b, int off); return b_type(off, b, a, 3'd0); endfunction
  function automatic logic [31:0] BNE (int a, int b, int off); return b_type(off, b, a, 3'd1); endfunction
  function automatic logic [31:0] BLT (int a, int b, int off); return b_type(off, b, a, 3'd4); endfunction
  function automatic logic [31:0] BGE (int a, int b, int off); return b_type(off, b, a, 3'd5); endfunction
  function automatic logic [31:0] BLTU(int a, int b, int off); return b_type(off, b, a, 3'd6); endfunction
  function automatic logic [31:0] BGEU(int a, int b, int off); return b_type(off, b, a, 3'd7); endfunction
  function automatic logic [31:0] LUI (int rd, int imm20); return {20'(imm20), 5'(rd), 7'b0110111}; endfunction
  function automatic logic [31:0] AUIPC(int rd, int imm20); return {20'(imm20), 5'(rd), 7'b0010111}; endfunction
  function automatic logic [31:0] JAL (int rd, int off);
    logic [20:0] i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction
  function automatic logic [31:0] JALR(int rd, int a, int imm); return i_type(imm, a, 3'd0, rd, 7'b1100111); endfunction

  // ------------------------------------------------- reference simulator
  class rv32i_iss;
    logic [31:0] x [32];
    logic [31:0] pc;
    logic [31:0] imem [];
    logic [7:0]  dmem [];
    longint      steps;

    function new(int imem_words, int dmem_bytes);
      imem = new[imem_words];
      dmem = new[dmem_bytes];
      foreach (x[i]) x[i] = '0;
      foreach (imem[i]) imem[i] = '0;
      foreach (dmem[i]) dmem[i] = '0;
      pc = '0;
      steps = 0;
    endfunction

    function logic [31:0] rd32(logic [31:0] a);
      return {dmem[a+3], dmem[a+2], dmem[a+1], dmem[a]};
    endfunction

    function void step();
      logic [31:0] ins, a, b, r, ea, npc, immi, imms, immb, immj;
      logic [4:0]  rd;
      logic [2:0]  f3;
      logic        wr;
      ins  = imem[pc[31:2]];
      rd   = ins[11:7];
      f3   = ins[14:12];
      a    = x[ins[19:15]];
      b    = x[ins[24:20]];
      immi = {{20{ins[31]}}, ins[31:20]};
      imms = {{20{ins[31]}}, ins[31:25], ins[11:7]};
      immb = {{20{ins[31]}}, ins[7], ins[30:25], ins[11:8], 1'b0};
      immj = {{12{ins[31]}}, ins[19:12], ins[20], ins[30:21], 1'b0};
      npc  = pc + 4;
      wr   = 1'b0;
      r    = '0;
      case (ins[6:0])
        7'b0110111: begin r = {ins[31:12], 12'b0}; wr = 1; end
        7'b0010111: begin r = pc + {ins[31:12], 12'b0}; wr = 1; end
        7'b1101111: begin r = pc + 4; wr = 1; npc = pc + immj; end
        7'b1100111: begin r = pc + 4; wr = 1; npc = (a + immi) & ~32'd1; end
        7'b1100011: begin
          logic t;
          case (f3)
            3'd0: t = (a == b);
            3'd1: t = (a != b);
            3'd4: t = ($signed(a) < $signed(b));
            3'd5: t = ($signed(a) >= $signed(b));
            3'd6: t = (a < b);
            3'd7: t = (a >= b);
            default: t = 0;
          endcase
          if (t) npc = pc + immb;
        end
        7'b0000011: begin
          ea = a + immi; wr = 1;
          case (f3)
            3'd0: r = {{24{dmem[ea][7]}}, dmem[ea]};
            3'd1: r = {{16{dmem[ea+1][7]}}, dmem[ea+1], dmem[ea]};
            3'd4: r = {24'b0, dmem[ea]};
            3'd5: r = {16'b0, dmem[ea+1], dmem[ea]};
            default: r = rd32(ea);
          endcase
        end
        7'b0100011: begin
          ea = a + imms;
          dmem[ea] = b[7:0];
          if (f3 >= 3'd1) dmem[ea+1] = b[15:8];
          if (f3 == 3'd2) begin dmem[ea+2] = b[23:16]; dmem[ea+3] = b[31:24]; end
        end
        7'b0010011, 7'b0110011: begin
          logic [31:0] o;
          logic alt;
          o   = (ins[6:0] == 7'b0010011) ? immi : b;
          alt = ins[30] && (ins[6:0] == 7'b0110011 || f3 == 3'd5);
          wr  = 1;
          case (f3)
            3'd0: r = alt ? a - o : a + o;
            3'd1: r = a << o[4:0];
            3'd2: r = {31'b0, $signed(a) < $signed(o)};
            3'd3: r = {31'b0, a < o};
            3'd4: r = a ^ o;
            3'd5: r = alt ? 32'($signed(a) >>> o[4:0]) : a >> o[4:0];
            3'd6: r = a | o;
            default: r = a & o;
          endcase
        end
        default: ;
      endcase
      if (wr && rd != 0) x[rd] = r;
      pc = npc;
      steps++;
    endfunction
  endclass

endpackage
