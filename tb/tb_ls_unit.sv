// Self-checking test of ls_unit: random base and offset for every access
// size; address, byte enables and lane placement of store data are checked
// against values formed here.
// The checks are this design's own; they test the behaviour described above.
module tb_ls_unit;
  import dtmr_pkg::*;
  int checks = 0, failures = 0;
  dec_t d;
  logic [31:0] a, b;
  ls_rec_t r;
  logic [1:0] off;

  ls_unit dut (.dec_i(d), .rs1_i(a), .rs2_i(b), .req_o(r), .byte_off_o(off));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] ea;
      logic [3:0]  ebe;
      mem_size_e   sz;
      d = '0; a = $urandom; b = $urandom;
      d.imm = 32'(int'($urandom % 4096) - 2048);
      sz = (i % 3 == 0) ? MEM_B : (i % 3 == 1) ? MEM_H : MEM_W;
      ea = a + d.imm;
      if (sz == MEM_H) begin a[0] = ea[0] ^ a[0]; ea = a + d.imm; end
      if (sz == MEM_W) begin a[1:0] = a[1:0] - ea[1:0]; ea = a + d.imm; end
      d.mem_size = sz;
      d.mem_we = i[3]; d.mem_re = !i[3];
      #1;
      ebe = (sz == MEM_B) ? 4'b0001 << ea[1:0] : (sz == MEM_H) ? 4'b0011 << ea[1:0] : 4'b1111;
      checks++;
      if (r.addr !== {ea[31:2], 2'b00} || r.be !== ebe || off !== ea[1:0] || r.we !== d.mem_we || r.re !== d.mem_re) begin
        failures++; $display("FAIL request ea=%h be=%b", ea, r.be);
      end
      if (d.mem_we) begin
        for (int k = 0; k < 4; k++) if (ebe[k]) begin
          checks++;
          if (r.wdata[8*k +: 8] !== b[8*(k - int'(ea[1:0])) +: 8]) begin failures++; $display("FAIL lane %0d", k); end
        end
      end
    end
    d = '0; a = $urandom; #1;
    checks++; if (r !== '0) begin failures++; $display("FAIL idle request"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
