// Cycle-level replay of the program-counter restore example: a straight-line
// program starting at 0x700 runs on dft03_core (BOOT_ADDR = 0x700, plain
// one-cycle instruction memory modelled here).  When hart 1 holds the
// instruction at 0x714 in ID, bit 5 of its pc_ID is flipped, turning 0x714
// into 0x734.  Expected, in order: the PC vote fails in that very cycle while
// the dummy PC holds 0x710; hart 0 fetches 0x710 in the next cycle; 0x710 is
// committed by the three-way vote; harts 2 and 1 then fetch 0x714 (hart 2
// first); and every instruction is applied exactly once (each adds 1 to x1,
// each also writes its own register).  The transcript prints one line per
// cycle around the restore.
// The addresses (0x710, 0x714 turned into 0x734) and the expected sequence
// follow the original scheme's PC restore example; the program is this
// design's.
module tb_pc_restore_example;
  import dtmr_pkg::*;
  import rv_tb_pkg::*;

  localparam logic [31:0] BASE = 32'h700;
  localparam int NI = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  logic imem_re, dmem_re, dmem_we;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata;
  logic [3:0] dmem_be;
  mode_e mode;
  logic rpc, rwb, rlsu, rfmm, ret, ret_tmr;
  logic [2:0] cause;
  logic [31:0] restores, ret_pc, pc0;
  logic [31:0] imem [64];
  int checks = 0, failures = 0;

  dft03_core #(.BOOT_ADDR(BASE)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .imem_re_o(imem_re), .imem_addr_o(imem_addr), .imem_rdata_i(imem_rdata),
    .dmem_re_o(dmem_re), .dmem_we_o(dmem_we), .dmem_addr_o(dmem_addr), .dmem_be_o(dmem_be),
    .dmem_wdata_o(dmem_wdata), .dmem_rdata_i(32'd0),
    .mode_o(mode), .restore_pc_o(rpc), .restore_wb_o(rwb), .restore_lsu_o(rlsu),
    .restore_cause_o(cause), .restores_o(restores), .rf_mismatch_o(rfmm),
    .retire_o(ret), .retire_tmr_o(ret_tmr), .retire_pc_o(ret_pc), .pc0_o(pc0)
  );

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (imem_re) imem_rdata <= imem[6'((imem_addr - BASE) >> 2)];

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tmr_retires;
    logic [31:0] tmr_pc;
    foreach (imem[i]) imem[i] = JAL(0, 0);
    for (int i = 0; i < NI; i++)                   // instruction i: x1 += 1, x(2+i%8) = x1
      imem[i] = (i % 2 == 0) ? ADDI(1, 1, 1) : ADDI(2 + (i / 2) % 8, 1, 0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // wait for hart 1 with 0x714 in ID
    while (!(dut.id_valid_q && dut.id_harc_q == HARC_A && dut.id_pc_q == 32'h714)) @(negedge clk);
    chk(pc0 == 32'h710, "dummy PC holds 0x710 before the fault");
    force dut.id_pc_q = 32'h734;
    #1;
    chk(rpc, "restore_pc rises in the cycle of the fault");
    $display("fault: pc_ID 0x714 -> 0x%h, pc_IE 0x%h, dummy PC 0x%h, restore_pc %0d",
             dut.id_pc_q, dut.ie_pc_q, pc0, rpc);
    @(negedge clk);
    release dut.id_pc_q;
    chk(mode == MODE_R_FETCH && imem_re && imem_addr == 32'h710, "hart 0 fetches 0x710");
    tmr_retires = 0;
    tmr_pc = '0;
    for (int c = 0; c < 6; c++) begin
      $display("cycle +%0d: mode %-13s fetch %0d @0x%h  retire %0d (three-way %0d) pc 0x%h",
               c + 1, mode.name(), imem_re, imem_addr, ret, ret_tmr, ret_pc);
      if (ret && ret_tmr) begin tmr_retires++; tmr_pc = ret_pc; end
      if (c == 3) chk(mode == MODE_R_WB && imem_re && imem_addr == 32'h714, "hart 2 fetches 0x714");
      if (c == 4) chk(mode == MODE_NORMAL && imem_re && imem_addr == 32'h714, "hart 1 fetches 0x714");
      @(negedge clk);
    end
    chk(tmr_retires == 1 && tmr_pc == 32'h710, "0x710 committed once by the three-way vote");
    chk(restores == 1, "one restore");
    repeat (60) @(negedge clk);
    chk(dut.u_rf_hart2.regs[1] == NI / 2 && dut.u_rf_hart1.regs[1] == NI / 2,
        "every instruction applied exactly once");
    for (int r = 2; r < 10; r++)
      chk(dut.u_rf_hart2.regs[r] == dut.u_rf_hart1.regs[r] && dut.u_rf_hart2.regs[r] != 0,
          "register files agree");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
