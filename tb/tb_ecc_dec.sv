// Self-checking test of ecc_dec with ecc_enc in front: clean words, every
// single-bit error position (corrected, err_single_o) and random double-bit
// errors (detected, err_double_o).
// The checks are this design's own; they test the behaviour described above.
module tb_ecc_dec;
  int checks = 0, failures = 0;
  logic [31:0] d, q;
  logic [38:0] c, e;
  logic        s1, s2;

  ecc_enc u_enc (.data_i(d), .code_o(c));
  ecc_dec dut   (.code_i(c ^ e), .data_o(q), .err_single_o(s1), .err_double_o(s2));

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      d = $urandom; e = '0; #1;
      chk(q === d && !s1 && !s2, "clean word");
      for (int p = 0; p < 39; p++) begin
        e = 39'd1 << p; #1;
        chk(q === d && s1 && !s2, $sformatf("single error at %0d", p));
      end
      begin
        int p1, p2;
        p1 = $urandom % 39; p2 = (p1 + 1 + $urandom % 38) % 39;
        e = (39'd1 << p1) | (39'd1 << p2); #1;
        chk(!s1 && s2, "double error detected");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
