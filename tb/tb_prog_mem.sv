// Self-checking test of prog_mem: words written through the load port are
// read back on the fetch port one cycle later; an upset in a stored code word
// is corrected and flagged.
// The checks are this design's own; they test the behaviour described above.
module tb_prog_mem;
  int checks = 0, failures = 0;
  localparam int W = 8192;
  logic clk = 0, re = 0, we = 0;
  logic [31:0] addr = 0, q, wd = 0;
  logic [12:0] wa = 0;
  logic s1, s2;
  logic [31:0] model [W];

  prog_mem dut (.clk_i(clk), .fetch_re_i(re), .fetch_addr_i(addr), .fetch_data_o(q),
    .ecc_single_o(s1), .ecc_double_o(s2), .ld_we_i(we), .ld_addr_i(wa), .ld_data_i(wd));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk); we = 1; wa = 13'(i); wd = $urandom; model[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 1000; i++) begin
      int a;
      a = $urandom % W;
      @(negedge clk); re = 1; addr = 32'(a * 4);
      @(negedge clk); re = 0;
      checks++; if (q !== model[a] || s1 || s2) begin failures++; $display("FAIL read %0d", a); end
    end
    // flip one stored bit
    @(negedge clk);
    re = 1; addr = 32'h40;
    @(negedge clk);
    re = 0;
    begin
      logic [38:0] v;
      v = dut.rd_q ^ 39'h100;
      force dut.rd_q = v; #1;
      checks++; if (q !== model[16] || !s1 || s2) begin failures++; $display("FAIL correction"); end
      release dut.rd_q;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
