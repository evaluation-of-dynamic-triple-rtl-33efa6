// Self-checking test of data_mem against a byte-array model: random byte,
// half-word and word stores with byte enables (read-modify-write of the code
// word), loads one cycle later, host writes and reads, and correction of an
// upset in the stored word before a partial store merges into it.
// The checks are this design's own; they test the behaviour described above.
module tb_data_mem;
  int checks = 0, failures = 0;
  localparam int W = 8192;
  logic clk = 0, re = 0, we = 0, hwe = 0, hre = 0;
  logic [31:0] addr = 0, wd = 0, q, hwd = 0, hq;
  logic [3:0] be = 0;
  logic [12:0] ha = 0;
  logic s1, s2;
  logic [31:0] model [W];

  data_mem dut (.clk_i(clk), .req_re_i(re), .req_we_i(we), .req_addr_i(addr),
    .req_be_i(be), .req_wdata_i(wd), .rdata_o(q), .ecc_single_o(s1), .ecc_double_o(s2),
    .host_we_i(hwe), .host_re_i(hre), .host_addr_i(ha), .host_wdata_i(hwd), .host_rdata_o(hq));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk); hwe = 1; ha = 13'(i); hwd = $urandom; model[i] = hwd;
    end
    @(negedge clk); hwe = 0;
    for (int i = 0; i < 3000; i++) begin
      int a;
      a = $urandom % W;
      @(negedge clk);
      addr = 32'(a * 4);
      if ($urandom % 2 == 1) begin
        we = 1; re = 0; be = 4'($urandom); wd = $urandom;
        for (int b = 0; b < 4; b++) if (be[b]) model[a][8*b +: 8] = wd[8*b +: 8];
        @(negedge clk); we = 0;
      end else begin
        re = 1; we = 0;
        @(negedge clk); re = 0;
        chk(q === model[a] && !s1 && !s2, $sformatf("load word %0d", a));
      end
    end
    for (int i = 0; i < W; i++) begin
      @(negedge clk); hre = 1; ha = 13'(i);
      @(negedge clk); hre = 0;
      chk(hq === model[i], "host read");
    end
    // an upset in word 5, then a byte store into it: the merge must use corrected data
    begin
      logic [38:0] v;
      v = dut.mem[5] ^ 39'h8;
      dut.mem[5] = v;
      @(negedge clk);
      re = 1; addr = 32'd20;
      @(negedge clk); re = 0;
      chk(q === model[5] && s1, "corrected load");
      we = 1; be = 4'b0100; wd = 32'h00AB_0000; model[5][23:16] = 8'hAB;
      @(negedge clk); we = 0; re = 1;
      @(negedge clk); re = 0;
      chk(q === model[5] && !s1, "store merged into corrected word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
