// Self-checking test of dft03_core on its own, with plain memories modelled
// here (one-cycle synchronous reads, no ECC).  A loop that sums, rewrites and
// byte-swaps an array of words runs while upsets are injected every few
// dozen cycles into the PC of an instruction in ID (hart 1 or hart 2), a
// write-back record and a load/store immediate.  The final register files and
// memory must match the reference simulator, every upset must give exactly
// one restore, and each restore must last four cycles.
// The program and the upset sites are this design's own test choices.
module tb_dft03_core;
  import dtmr_pkg::*;
  import rv_tb_pkg::*;

  localparam int N = 24;
  logic clk = 1'b0, rst_n = 1'b0;
  logic imem_re, dmem_re, dmem_we;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic [3:0] dmem_be;
  mode_e mode;
  logic rpc, rwb, rlsu, rfmm, ret, ret_tmr;
  logic [2:0] cause;
  logic [31:0] restores, ret_pc, pc0;

  logic [31:0] imem [64];
  logic [31:0] dmem [256];

  int checks = 0, failures = 0;

  dft03_core dut (
    .clk_i(clk), .rst_ni(rst_n),
    .imem_re_o(imem_re), .imem_addr_o(imem_addr), .imem_rdata_i(imem_rdata),
    .dmem_re_o(dmem_re), .dmem_we_o(dmem_we), .dmem_addr_o(dmem_addr), .dmem_be_o(dmem_be),
    .dmem_wdata_o(dmem_wdata), .dmem_rdata_i(dmem_rdata),
    .mode_o(mode), .restore_pc_o(rpc), .restore_wb_o(rwb), .restore_lsu_o(rlsu),
    .restore_cause_o(cause), .restores_o(restores), .rf_mismatch_o(rfmm),
    .retire_o(ret), .retire_tmr_o(ret_tmr), .retire_pc_o(ret_pc), .pc0_o(pc0)
  );

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (imem_re) imem_rdata <= imem[imem_addr[7:2]];
    if (dmem_re) dmem_rdata <= dmem[dmem_addr[9:2]];
    if (dmem_we)
      for (int b = 0; b < 4; b++) if (dmem_be[b]) dmem[dmem_addr[9:2]][8*b +: 8] <= dmem_wdata[8*b +: 8];
  end

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  int n_restore, n_tmr, n_inj, len;
  logic done;
  always @(posedge clk) begin
    if (rst_n) begin
      if (mode == MODE_NORMAL && (rpc || rwb || rlsu)) begin n_restore++; len <= 0; end
      else if (mode != MODE_NORMAL) len <= len + 1;
      if (ret_tmr) begin n_tmr++; chk(len == 3, "restore lasts four cycles"); end
      chk(!rfmm, "register-file copies agree");
    end
  end

  task automatic inject(input int kind);
    dec_t d; wb_rec_t w; logic [31:0] v;
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      if (mode != MODE_NORMAL) continue;
      case (kind)
        0, 1: if (dut.id_valid_q && dut.id_harc_q == (kind == 0 ? HARC_A : HARC_B)) begin
          v = dut.id_pc_q ^ (32'h4 << (t % 4));
          force dut.id_pc_q = v; #4; release dut.id_pc_q; n_inj++; return;
        end
        2: if (dut.wb_valid_q && dut.wb_harc_q == HARC_A && dut.wb_rec_q.rd_we) begin
          w = dut.wb_rec_q; w.rd[1] = ~w.rd[1];
          force dut.wb_rec_q = w; #4; release dut.wb_rec_q; n_inj++; return;
        end
        default: if (dut.ie_valid_q && dut.ie_harc_q == HARC_A && (dut.ie_dec_q.mem_re || dut.ie_dec_q.mem_we)) begin
          d = dut.ie_dec_q; d.imm[3] = ~d.imm[3];
          force dut.ie_dec_q = d; #4; release dut.ie_dec_q; n_inj++; return;
        end
      endcase
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rv32i_iss iss;
    int k;
    foreach (imem[i]) imem[i] = ADDI(0, 0, 0);
    imem[0]  = ADDI(1, 0, 'h100);      // pointer
    imem[1]  = ADDI(2, 0, N);          // count
    imem[2]  = ADDI(3, 0, 0);          // sum
    imem[3]  = LW(4, 1, 0);            // loop:
    imem[4]  = ADD(3, 3, 4);
    imem[5]  = JAL(5, (20 - 5) * 4);   // call swap
    imem[6]  = SW(4, 1, 0);
    imem[7]  = SH(3, 1, 'h102);
    imem[8]  = ADDI(1, 1, 4);
    imem[9]  = ADDI(2, 2, -1);
    imem[10] = BNE(2, 0, (3 - 10) * 4);
    imem[11] = SW(3, 0, 'h80);
    imem[12] = ADDI(6, 0, 1);
    imem[13] = SW(6, 0, 'h84);
    imem[14] = JAL(0, 0);
    imem[20] = SLLI(7, 4, 24);         // swap: x4 = byte-reversed x4
    imem[21] = SRLI(8, 4, 24);
    imem[22] = OR(7, 7, 8);
    imem[23] = LUI(9, 'h00FF0);
    imem[24] = AND(8, 4, 9);
    imem[25] = SRLI(8, 8, 8);
    imem[26] = OR(7, 7, 8);
    imem[27] = SRLI(9, 9, 8);
    imem[28] = AND(8, 4, 9);
    imem[29] = SLLI(8, 8, 8);
    imem[30] = OR(4, 7, 8);
    imem[31] = JALR(0, 5, 0);
    foreach (dmem[i]) dmem[i] = (i >= 64 && i < 64 + N) ? $urandom : 32'd0;

    iss = new(64, 1024);
    foreach (imem[i]) iss.imem[i] = imem[i];
    foreach (dmem[i]) for (int b = 0; b < 4; b++) iss.dmem[4 * i + b] = dmem[i][8*b +: 8];
    while (iss.pc != 32'd56) iss.step();

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    done = 1'b0;
    k = 0;
    fork
      while (!done) begin
        repeat (29 + 3 * (k % 5)) @(negedge clk);
        if (!done) inject(k % 4);
        k++;
      end
      begin
        do @(posedge clk); while (dmem[33] != 32'd1);
        done = 1'b1;
      end
    join
    repeat (4) @(negedge clk);
    $display("%0d upsets injected, %0d restores, %0d three-way retires", n_inj, n_restore, n_tmr);
    chk(n_inj >= 8, "upsets injected");
    chk(n_restore == n_inj, "every upset detected once");
    chk(n_tmr == n_restore, "every restore ends with a three-way retire");
    for (int r = 1; r < 32; r++)
      chk(dut.u_rf_hart2.regs[r] == iss.x[r] && dut.u_rf_hart1.regs[r] == iss.x[r], $sformatf("x%0d", r));
    for (int i = 0; i < 256; i++)
      chk(dmem[i] == iss.rd32(32'(4 * i)), $sformatf("mem word %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
