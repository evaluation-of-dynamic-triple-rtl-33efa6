// End-to-end test of the dynamic-TMR core with its memories, at the default
// sizes.  A bitwise CRC-32 over LEN random bytes followed by a routine that
// exercises every RV32I instruction class is loaded, run once without faults
// and once with single upsets injected into pipeline registers (the PC of an
// instruction in ID, a write-back record, a load/store immediate) and into
// the memory read registers.  Both runs must end with the registers of harts
// 2 and 1 and the data memory equal to a reference instruction-set simulator.
// Checked as well: one instruction retires every two cycles without faults,
// every restore keeps the core out of normal mode for exactly four cycles, the
// instruction voted three ways is the one at the dummy PC, and each mechanism
// (PC, WB and LSU restore, three-way retire, ECC correction in both memories,
// forwarding of a write-back value, loads and stores) happened.
// The four-cycle restore comes from the original scheme; the programs,
// the upset sites and the cycle-accounting checks are this design's.
module tb_dft03_top;
  import dtmr_pkg::*;
  import rv_tb_pkg::*;

  localparam int IW = 8192, DW = 8192;
  localparam int LEN = 40;
  localparam int DONE_W = 'h208 / 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic prog_we = 1'b0, host_we = 1'b0, host_re = 1'b0;
  logic [12:0] prog_addr = '0, host_addr = '0;
  logic [31:0] prog_data = '0, host_wdata = '0, host_rdata;
  mode_e mode;
  logic rpc, rwb, rlsu, rfmm, ret, ret_tmr, ie_s, id_d, de_s, de_d;
  logic [2:0] cause;
  logic [31:0] restores, ret_pc, pc0;

  int checks = 0, failures = 0;
  longint cyc = 0;

  dft03_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .prog_we_i(prog_we), .prog_addr_i(prog_addr), .prog_data_i(prog_data),
    .host_we_i(host_we), .host_re_i(host_re), .host_addr_i(host_addr),
    .host_wdata_i(host_wdata), .host_rdata_o(host_rdata),
    .mode_o(mode), .restore_pc_o(rpc), .restore_wb_o(rwb), .restore_lsu_o(rlsu),
    .restore_cause_o(cause), .restores_o(restores), .rf_mismatch_o(rfmm),
    .retire_o(ret), .retire_tmr_o(ret_tmr), .retire_pc_o(ret_pc), .pc0_o(pc0),
    .imem_ecc_single_o(ie_s), .imem_ecc_double_o(id_d),
    .dmem_ecc_single_o(de_s), .dmem_ecc_double_o(de_d)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ program
  logic [31:0] prog [64];
  logic [7:0]  data [LEN];

  function automatic void build_program();
    foreach (prog[i]) prog[i] = ADDI(0, 0, 0);
    prog[0]  = ADDI(10, 0, 'h100);
    prog[1]  = ADDI(11, 0, LEN);
    prog[2]  = ADDI(12, 0, -1);
    prog[3]  = LUI(13, 'hEDB88);
    prog[4]  = ADDI(13, 13, 'h320);
    prog[5]  = BEQ(11, 0, (18 - 5) * 4);
    prog[6]  = LBU(14, 10, 0);
    prog[7]  = XOR(12, 12, 14);
    prog[8]  = ADDI(15, 0, 8);
    prog[9]  = ANDI(16, 12, 1);
    prog[10] = SRLI(12, 12, 1);
    prog[11] = BEQ(16, 0, 8);
    prog[12] = XOR(12, 12, 13);
    prog[13] = ADDI(15, 15, -1);
    prog[14] = BNE(15, 0, (9 - 14) * 4);
    prog[15] = ADDI(10, 10, 1);
    prog[16] = ADDI(11, 11, -1);
    prog[17] = JAL(0, (5 - 17) * 4);
    prog[18] = XORI(12, 12, -1);
    prog[19] = SW(12, 0, 'h200);
    prog[20] = JAL(1, (26 - 20) * 4);
    prog[21] = SW(20, 0, 'h204);
    prog[22] = ADDI(5, 0, 1);
    prog[23] = SW(5, 0, 'h208);
    prog[24] = JAL(0, 0);
    prog[26] = LUI(20, 'h80000);
    prog[27] = SRAI(21, 20, 4);
    prog[28] = SUB(22, 21, 12);
    prog[29] = SH(22, 0, 'h210);
    prog[30] = LH(23, 0, 'h210);
    prog[31] = SB(12, 0, 'h215);
    prog[32] = LB(24, 0, 'h215);
    prog[33] = LHU(25, 0, 'h214);
    prog[34] = SLT(26, 21, 0);
    prog[35] = SLTU(27, 0, 21);
    prog[36] = AUIPC(28, 1);
    prog[37] = ADD(20, 23, 24);
    prog[38] = ADD(20, 20, 25);
    prog[39] = ADD(20, 20, 26);
    prog[40] = ADD(20, 20, 27);
    prog[41] = XOR(20, 20, 28);
    prog[42] = SLL(29, 12, 26);
    prog[43] = SRA(30, 21, 27);
    prog[44] = SRL(31, 21, 27);
    prog[45] = OR(20, 20, 29);
    prog[46] = AND(9, 30, 31);
    prog[47] = BLT(21, 0, 8);
    prog[48] = ADDI(20, 20, 99);
    prog[49] = BGE(0, 21, 8);
    prog[50] = ADDI(20, 20, 77);
    prog[51] = BLTU(21, 0, 8);
    prog[52] = ADDI(20, 20, 5);
    prog[53] = BGEU(21, 0, 8);
    prog[54] = ADDI(20, 20, 55);
    prog[55] = SLTI(8, 12, 0);
    prog[56] = ORI(7, 12, 'h0f0);
    prog[57] = ANDI(6, 12, 'h7ff);
    prog[58] = SLLI(4, 12, 3);
    prog[59] = LW(3, 0, 'h200);
    prog[60] = ADD(20, 20, 3);
    prog[61] = JALR(0, 1, 0);
  endfunction

  task automatic load_data();
    for (int w = 0; w < 'h240 / 4; w++) begin
      logic [31:0] word;
      word = '0;
      for (int b = 0; b < 4; b++)
        if (w * 4 + b >= 'h100 && w * 4 + b < 'h100 + LEN) word[8*b +: 8] = data[w * 4 + b - 'h100];
      @(negedge clk);
      host_we = 1'b1; host_addr = 13'(w); host_wdata = word;
    end
    @(negedge clk);
    host_we = 1'b0;
  endtask

  // ------------------------------------------------------- event counters
  int n_rpc, n_rwb, n_rlsu, n_tmr, n_iecc, n_decc, n_fwd, n_ret, n_ld, n_st, n_even;
  logic ie_s_q, de_s_q;
  int restore_len;
  logic [31:0] pc0_at_detect;
  logic dre_q, faulting;

  always @(posedge clk) begin
    if (rst_n) begin
      if (rpc)  n_rpc++;
      if (rwb)  n_rwb++;
      if (rlsu) n_rlsu++;
      if (ie_s && !ie_s_q) n_iecc++;
      if (de_s && !de_s_q) n_decc++;
      if (mode == MODE_NORMAL && (rpc || rwb)) n_even++;
      if (ret)  n_ret++;
      if (dut.u_core.dmem_re_o) n_ld++;
      if (dut.u_core.dmem_we_o) n_st++;
      if (dut.u_core.rf_we && dut.u_core.ie_valid_q &&
          (dut.u_core.rf_wa == dut.u_core.ie_dec_q.rs1 || dut.u_core.rf_wa == dut.u_core.ie_dec_q.rs2))
        n_fwd++;
      if (mode == MODE_NORMAL && (rpc || rwb || rlsu)) begin
        pc0_at_detect <= pc0;
        restore_len   <= 0;
      end else if (mode != MODE_NORMAL) begin
        restore_len <= restore_len + 1;
      end
      if (ret_tmr) begin
        n_tmr++;
        check(ret_pc == pc0_at_detect, $sformatf("TMR retire pc %h, dummy PC was %h", ret_pc, pc0_at_detect));
        check(restore_len == 3, $sformatf("restore lasted %0d cycles", restore_len + 1));
      end
      check(!id_d && !de_d, "no uncorrectable ECC error");
    end
    dre_q  <= dut.u_core.dmem_re_o;
    ie_s_q <= ie_s;
    de_s_q <= de_s;
  end

  // ------------------------------------------------------ fault injection
  task automatic inject(input int kind);
    logic [31:0] v32;
    logic [38:0] v39;
    dec_t        d;
    wb_rec_t     w;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      if (mode != MODE_NORMAL) continue;
      case (kind)
        0, 1: if (dut.u_core.id_valid_q && dut.u_core.id_harc_q == (kind == 0 ? HARC_A : HARC_B)) begin
          v32 = dut.u_core.id_pc_q ^ 32'h20;
          force dut.u_core.id_pc_q = v32; #4; release dut.u_core.id_pc_q; return;
        end
        2: if (dut.u_core.wb_valid_q && dut.u_core.wb_harc_q == HARC_A && dut.u_core.wb_rec_q.rd_we) begin
          w = dut.u_core.wb_rec_q; w.value[3] = ~w.value[3];
          force dut.u_core.wb_rec_q = w; #4; release dut.u_core.wb_rec_q; return;
        end
        3: if (dut.u_core.ie_valid_q && dut.u_core.ie_harc_q == HARC_A &&
               (dut.u_core.ie_dec_q.mem_re || dut.u_core.ie_dec_q.mem_we)) begin
          d = dut.u_core.ie_dec_q; d.imm[2] = ~d.imm[2];
          force dut.u_core.ie_dec_q = d; #4; release dut.u_core.ie_dec_q; return;
        end
        4: if (dut.u_core.id_valid_q) begin
          v39 = dut.u_imem.rd_q ^ (39'd1 << (t % 39));
          force dut.u_imem.rd_q = v39; #4; release dut.u_imem.rd_q; return;
        end
        default: if (dre_q) begin
          v39 = dut.u_dmem.rd_q ^ (39'd1 << 17);
          force dut.u_dmem.rd_q = v39; #4; release dut.u_dmem.rd_q; return;
        end
      endcase
    end
  endtask

  // ------------------------------------------------------------ one run
  task automatic run(input bit with_faults, output longint cycles, output int retired);
    longint start, stop;
    int     k;
    load_data();
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    n_ret = 0;
    rst_n = 1'b1;
    start = cyc;
    host_re = 1'b1;
    host_addr = 13'(DONE_W);
    faulting = with_faults;
    k = 0;
    fork
      begin
        while (faulting) begin
          repeat (37 + 5 * k) @(negedge clk);
          if (faulting) inject(k % 6);
          k++;
        end
      end
      begin
        do @(posedge clk); while (host_rdata != 32'd1 && cyc - start < 200000);
        stop = cyc;
        faulting = 1'b0;
      end
    join
    cycles  = stop - start;
    retired = n_ret;
    host_re = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  task automatic compare(input rv32i_iss iss, input string tag);
    int bad = 0;
    for (int r = 1; r < 32; r++) begin
      if (dut.u_core.u_rf_hart2.regs[r] != iss.x[r] || dut.u_core.u_rf_hart1.regs[r] != iss.x[r]) begin
        bad++;
        $display("%s: x%0d = %h / %h, expected %h", tag, r, dut.u_core.u_rf_hart2.regs[r],
                 dut.u_core.u_rf_hart1.regs[r], iss.x[r]);
      end
    end
    check(bad == 0, {tag, ": register files"});
    bad = 0;
    for (int w = 0; w < 'h240 / 4; w++) begin
      @(negedge clk);
      host_re = 1'b1; host_addr = 13'(w);
      @(negedge clk);
      host_re = 1'b0;
      if (host_rdata != iss.rd32(32'(w * 4))) begin
        bad++;
        $display("%s: mem[%h] = %h, expected %h", tag, w * 4, host_rdata, iss.rd32(32'(w * 4)));
      end
    end
    check(bad == 0, {tag, ": data memory"});
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rv32i_iss iss;
    longint   c0, c1;
    int       r0, r1;
    build_program();
    foreach (data[i]) data[i] = 8'($urandom);
    iss = new(64, 'h240);
    foreach (prog[i]) iss.imem[i] = prog[i];
    foreach (data[i]) iss.dmem['h100 + i] = data[i];
    while (!(iss.pc == 32'd96)) iss.step();
    $display("reference: %0d instructions, crc %h", iss.steps, iss.x[12]);

    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 13'(i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 1'b0;

    run(1'b0, c0, r0);
    $display("fault-free run: %0d cycles, %0d instructions retired", c0, r0);
    check(n_rpc + n_rwb + n_rlsu == 0, "no restore without faults");
    check(longint'(r0) >= iss.steps, "all reference instructions retired");
    check(c0 <= 2 * longint'(iss.steps) + 12, "one instruction every two cycles");
    compare(iss, "fault-free");

    n_rpc = 0; n_rwb = 0; n_rlsu = 0; n_tmr = 0; n_even = 0; n_iecc = 0; n_decc = 0; n_fwd = 0; n_ld = 0; n_st = 0;
    run(1'b1, c1, r1);
    $display("faulty run: %0d cycles, restores pc=%0d wb=%0d lsu=%0d, three-way retires=%0d",
             c1, n_rpc, n_rwb, n_rlsu, n_tmr);
    $display("ECC corrections imem=%0d dmem=%0d, forwards=%0d, loads=%0d, stores=%0d",
             n_iecc, n_decc, n_fwd, n_ld, n_st);
    $display("cycles lost: %0d for %0d restores in IE/WB slots and %0d in LSU slots",
             c1 - c0, n_even, n_tmr - n_even);
    compare(iss, "with faults");
    check(n_rpc > 0,  "PC restore happened");
    check(n_rwb > 0,  "WB restore happened");
    check(n_rlsu > 0, "LSU restore happened");
    check(n_tmr == n_rpc + n_rwb + n_rlsu || n_tmr == int'(restores), "one three-way retire per restore");
    check(n_iecc > 0, "program memory ECC correction happened");
    check(n_decc > 0, "data memory ECC correction happened");
    check(n_fwd > 0,  "write-back forwarding happened");
    check(n_ld > 0 && n_st > 0, "loads and stores happened");
    check(c1 - c0 == 6 * longint'(n_even) + 5 * (longint'(n_tmr) - longint'(n_even)),
          "each restore costs six (PC/WB) or five (LSU) cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
