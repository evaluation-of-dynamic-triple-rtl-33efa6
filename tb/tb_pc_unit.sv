// Self-checking test of pc_unit, driven with the ID/IE pattern of the
// interleaved pipeline: the fetch address bypass, the dummy PC taking the
// voted address every other cycle, restore_pc_o on a corrupted pc_ID (the
// case of an instruction at 0x714 whose address turns into 0x734), no
// dummy-PC update when hold_i is set, and the reload of all PCs at the end of
// a restore, and the restart at the boot address when the very first vote
// after reset fails.
// The addresses 0x710, 0x714 and 0x734 follow the original scheme's PC restore
// example; the other checks are this design's own.
module tb_pc_unit;
  import dtmr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic normal = 1, id_v = 0, ie_v = 0, hold = 0, load = 0;
  harc_t fh = HARC_B, id_h = HARC_A, ie_h = HARC_B;
  logic [31:0] id_pc = 0, ie_pc = 0, ie_npc = 0, faddr, pc0;
  logic rpc;

  pc_unit #(.BOOT_ADDR(32'h700)) dut (.clk_i(clk), .rst_ni(rst_n), .normal_i(normal),
    .fetch_harc_i(fh), .fetch_addr_o(faddr), .id_valid_i(id_v), .id_harc_i(id_h), .id_pc_i(id_pc),
    .ie_valid_i(ie_v), .ie_harc_i(ie_h), .ie_pc_i(ie_pc), .ie_next_pc_i(ie_npc), .hold_i(hold),
    .load_next_i(load), .restore_pc_o(rpc), .pc0_o(pc0));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s faddr=%h pc0=%h rpc=%b", m, faddr, pc0, rpc); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    chk(pc0 == 32'h700, "reset value");
    rst_n = 1;
    fh = HARC_B; #1; chk(faddr == 32'h700, "first fetch at boot address");
    for (int k = 0; k < 20; k++) begin
      logic [31:0] a;
      a = 32'h700 + 4 * k;
      // even cycle: hart 2 in IE, hart 1 in ID with the same instruction
      @(negedge clk);
      id_v = 1; ie_v = 1; id_h = HARC_A; ie_h = HARC_B; id_pc = a; ie_pc = a; ie_npc = a + 4;
      fh = HARC_B; #1;
      chk(!rpc, "addresses agree");
      chk(faddr == a + 4, "hart 2 fetch bypass");
      @(posedge clk); #1;
      chk(pc0 == a, "dummy PC holds the voted address");
      // odd cycle: hart 1 in IE
      @(negedge clk);
      id_h = HARC_B; ie_h = HARC_A; id_pc = a + 4; ie_pc = a; fh = HARC_A; #1;
      chk(!rpc, "no vote in odd cycle");
      chk(faddr == a + 4, "hart 1 fetch bypass");
    end
    // fault: pc_ID of hart 1 turns 0x714 into 0x734 while the dummy PC holds 0x710
    @(negedge clk);
    id_h = HARC_A; ie_h = HARC_B; ie_pc = 32'h714; id_pc = 32'h734; hold = 1; #1;
    chk(rpc, "mismatch raises restore_pc");
    @(posedge clk); #1;
    @(negedge clk);
    hold = 0; id_pc = 32'h700; ie_pc = 32'h700; #1;
    @(negedge clk);
    id_pc = 32'h710; ie_pc = 32'h710; #1;
    @(posedge clk); #1;
    chk(pc0 == 32'h710, "dummy PC updated again");
    @(negedge clk);
    id_pc = 32'h714; ie_pc = 32'h714; hold = 1; #1;
    @(posedge clk); #1;
    chk(pc0 == 32'h710, "hold keeps the dummy PC");
    // restore: hart 0 fetches the dummy PC and executes it; next PC 0x714 reloads all PCs
    @(negedge clk);
    hold = 0; normal = 0; id_v = 0; ie_v = 0; fh = HARC_AUX; #1;
    chk(faddr == 32'h710 && !rpc, "hart 0 fetches the last correct instruction");
    @(negedge clk);
    ie_v = 1; ie_h = HARC_AUX; ie_pc = 32'h710; ie_npc = 32'h714; load = 1;
    @(posedge clk); #1;
    load = 0; ie_v = 0; normal = 1;
    fh = HARC_B; #1; chk(faddr == 32'h714, "hart 2 resumes at next instruction");
    fh = HARC_A; #1; chk(faddr == 32'h714, "hart 1 resumes at next instruction");
    chk(pc0 == 32'h714, "dummy PC holds the next instruction");
    // boot window: a mismatch on the first instruction after reset, before any
    // vote succeeded, sends every hart back to the boot address
    @(negedge clk);
    rst_n = 0; #1; rst_n = 1;
    id_v = 1; ie_v = 1; id_h = HARC_A; ie_h = HARC_B; id_pc = 32'h700; ie_pc = 32'h708; #1;
    chk(rpc, "mismatch on the first instruction");
    @(negedge clk);
    normal = 0; id_v = 0; ie_v = 1; ie_h = HARC_AUX; ie_pc = 32'h700; ie_npc = 32'h704; load = 1;
    @(posedge clk); #1;
    load = 0; ie_v = 0; normal = 1;
    fh = HARC_B; #1; chk(faddr == 32'h700, "hart 2 restarts at the boot address");
    fh = HARC_A; #1; chk(faddr == 32'h700, "hart 1 restarts at the boot address");
    chk(pc0 == 32'h700, "dummy PC stays at the boot address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
