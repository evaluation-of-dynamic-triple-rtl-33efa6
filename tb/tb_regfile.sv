// Self-checking test of regfile against a shadow array: random writes and
// reads on both ports, x0 stays zero, reset clears everything.
// The checks are this design's own; they test the behaviour described above.
module tb_regfile;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] ra1 = 0, ra2 = 0, wa = 0;
  logic [31:0] wd = 0, rd1, rd2;
  logic [31:0] shadow [32];

  regfile dut (.clk_i(clk), .rst_ni(rst_n), .ra1_i(ra1), .rd1_o(rd1), .ra2_i(ra2), .rd2_o(rd2),
               .we_i(we), .wa_i(wa), .wd_i(wd));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ra1 = 5'($urandom); ra2 = 5'($urandom);
      #1;
      checks++; if (rd1 !== shadow[ra1]) begin failures++; $display("FAIL port1 x%0d", ra1); end
      checks++; if (rd2 !== shadow[ra2]) begin failures++; $display("FAIL port2 x%0d", ra2); end
      we = 1'($urandom % 2); wa = 5'($urandom); wd = $urandom;
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
      #1 we = 0;
    end
    rst_n = 0; #1;
    for (int r = 0; r < 32; r++) begin
      ra1 = 5'(r); #1;
      checks++; if (rd1 !== 0) begin failures++; $display("FAIL reset x%0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
