// Self-checking test of vote_buffer: copies of harts 2, 1 and 0 are captured
// one per cycle as in the core; the DMR compare of hart 1's live copy against
// hart 2's buffer, and the three-way majority with one corrupted copy, are
// checked against a model of the buffers kept here.
// The checks are this design's own; they test the behaviour described above.
module tb_vote_buffer;
  import dtmr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cap_en = 0, chk_en = 0, tmr = 0;
  harc_t cap_h = HARC_B;
  logic [31:0] cap_d = 0, live = 0, voted;
  logic mm, dis;
  logic [31:0] model [3];

  vote_buffer dut (.clk_i(clk), .rst_ni(rst_n), .cap_en_i(cap_en), .cap_harc_i(cap_h),
    .cap_data_i(cap_d), .chk_en_i(chk_en), .tmr_i(tmr), .live_i(live), .voted_o(voted),
    .mismatch_o(mm), .tmr_disagree_o(dis));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s voted=%h mm=%b", m, voted, mm); end
  endtask

  task automatic capture(input harc_t h, input logic [31:0] v);
    @(negedge clk); cap_en = 1; cap_h = h; cap_d = v;
    @(posedge clk); model[h] = v;
    #1 cap_en = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      logic [31:0] v, flip;
      v = 32'($urandom);
      flip = (i % 2 == 0) ? 32'd0 : 32'd1 << ($urandom % 32);
      capture(HARC_B, v ^ ((i % 4 == 3) ? flip : 32'd0));
      @(negedge clk);
      chk_en = 1; live = v ^ ((i % 4 == 1) ? flip : 32'd0); #1;
      chk(mm == (model[HARC_B] != live) && voted == model[HARC_B], "DMR compare");
      chk_en = 0; #1;
      chk(!mm, "no mismatch without chk_en");
      capture(HARC_A, live);
      if (i % 5 == 0) begin
        // end of restore: hart 0's live copy is good
        @(negedge clk);
        tmr = 1; live = v; #1;
        chk(voted == v && !mm, "TMR majority");
        chk(dis == (flip != 0), "TMR disagreement flag");
        tmr = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
