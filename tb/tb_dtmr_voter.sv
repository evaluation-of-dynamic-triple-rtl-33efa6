// Self-checking test of dtmr_voter: random words with single-copy errors in
// DMR and TMR mode; the expected outputs are worked out bit by bit here.
// The checks are this design's own; they test the behaviour described above.
module tb_dtmr_voter;
  int checks = 0, failures = 0;
  logic        tmr;
  logic [31:0] a, b, c, y, exp_y;
  logic        mm;

  dtmr_voter dut (.tmr_i(tmr), .a_i(a), .b_i(b), .c_i(c), .y_o(y), .mismatch_o(mm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] good, flip;
      int which;
      good  = $urandom;
      flip  = (i % 3 == 0) ? 32'd0 : (32'd1 << ($urandom % 32));
      which = $urandom % 3;
      tmr   = i[0];
      a = good ^ (which == 0 ? flip : 32'd0);
      b = good ^ (which == 1 ? flip : 32'd0);
      c = good ^ (which == 2 ? flip : 32'd0);
      #1;
      if (tmr) begin
        for (int k = 0; k < 32; k++) exp_y[k] = (int'(a[k]) + int'(b[k]) + int'(c[k])) >= 2;
        checks++; if (y !== good || y !== exp_y) begin failures++; $display("FAIL tmr y %h exp %h", y, good); end
        checks++; if (mm !== (flip != 0)) begin failures++; $display("FAIL tmr mismatch"); end
      end else begin
        checks++; if (y !== a) begin failures++; $display("FAIL dmr y"); end
        checks++; if (mm !== (flip != 0 && which != 2)) begin failures++; $display("FAIL dmr mismatch"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
