// Self-checking test of restore_unit: alternating hart 2 / hart 1 fetch in
// normal mode, and for each restore signal the four-cycle sequence R_FETCH
// (hart 0 fetched), R_DECODE, R_EXEC, R_WB (hart 2 fetched) followed by normal
// mode with hart 1, the cause register and the restore count.
// The checks are this design's own; they test the behaviour described above.
module tb_restore_unit;
  import dtmr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic rpc = 0, rwb = 0, rlsu = 0;
  mode_e mode;
  logic det, fv;
  harc_t fh;
  logic [2:0] cause;
  logic [31:0] cnt;

  restore_unit dut (.clk_i(clk), .rst_ni(rst_n), .restore_pc_i(rpc), .restore_wb_i(rwb),
    .restore_lsu_i(rlsu), .mode_o(mode), .detect_o(det), .fetch_valid_o(fv), .fetch_harc_o(fh),
    .restore_cause_o(cause), .restores_o(cnt));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s mode=%s fv=%b fh=%0d", m, mode.name(), fv, fh); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    harc_t expect_h;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // the first posedge after reset fetched hart 2
    expect_h = HARC_A;
    for (int r = 0; r < 30; r++) begin
      int n;
      n = 3 + $urandom % 6;
      for (int i = 0; i < n; i++) begin
        @(negedge clk); #1;
        chk(mode == MODE_NORMAL && fv && fh == expect_h && !det, "normal alternation");
        expect_h = (expect_h == HARC_B) ? HARC_A : HARC_B;
      end
      @(negedge clk);
      rpc = (r % 3 == 0); rwb = (r % 3 == 1); rlsu = (r % 3 == 2); #1;
      chk(det, "detect");
      @(negedge clk);
      rpc = 0; rwb = 0; rlsu = 0; #1;
      chk(mode == MODE_R_FETCH && fv && fh == HARC_AUX, "hart 0 fetched");
      chk(cause == {r % 3 == 2, r % 3 == 1, r % 3 == 0}, "cause");
      chk(cnt == 32'(r + 1), "restore count");
      @(negedge clk); #1; chk(mode == MODE_R_DECODE && !fv, "R_DECODE");
      rpc = 1; #1; chk(!det, "restore signals ignored during restore"); rpc = 0;
      @(negedge clk); #1; chk(mode == MODE_R_EXEC && !fv, "R_EXEC");
      @(negedge clk); #1; chk(mode == MODE_R_WB && fv && fh == HARC_B, "R_WB: hart 2 fetch");
      expect_h = HARC_A;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
