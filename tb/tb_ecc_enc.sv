// Self-checking test of ecc_enc: every code word must have the data bits in
// the non-power-of-two positions, even overall parity, a zero Hamming
// syndrome, and must differ from the code of any data word one bit away in at
// least four positions (distance of a SECDED code).
// The checks are this design's own; they test the behaviour described above.
module tb_ecc_enc;
  int checks = 0, failures = 0;
  logic [31:0] d, d2;
  logic [38:0] c, c2;

  ecc_enc dut  (.data_i(d),  .code_o(c));
  ecc_enc dut2 (.data_i(d2), .code_o(c2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int n, syn;
      logic [31:0] got;
      d  = $urandom;
      d2 = d ^ (32'd1 << ($urandom % 32));
      #1;
      n = 0;
      for (int p = 1; p < 39; p++) if ((p & (p - 1)) != 0) begin got[n] = c[p]; n++; end
      checks++; if (got !== d) begin failures++; $display("FAIL data placement"); end
      checks++; if (^c !== 1'b0) begin failures++; $display("FAIL overall parity"); end
      syn = 0;
      for (int p = 1; p < 39; p++) if (c[p]) syn ^= p;
      checks++; if (syn != 0) begin failures++; $display("FAIL syndrome %0d", syn); end
      checks++; if ($countones(c ^ c2) < 4) begin failures++; $display("FAIL distance"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
