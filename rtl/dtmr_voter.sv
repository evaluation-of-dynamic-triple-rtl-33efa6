// Voter of the dynamic-TMR scheme (the "V" units of the pipeline).
// In DMR mode (tmr_i = 0) it compares the two redundant copies a_i and b_i and
// forwards a_i; mismatch_o flags any difference, which in the core starts the
// restore procedure.  In TMR mode (tmr_i = 1), used at the end of a restore,
// it takes the bitwise majority of a_i, b_i and c_i; mismatch_o then flags
// that the three copies were not all equal (the majority still corrects a
// single bad copy).  Purely combinational.  The two behaviours follow the
// document; the bitwise majority is this design's choice of voter circuit.
module dtmr_voter #(
  parameter int unsigned W = 32
) (
  input  logic         tmr_i,
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic [W-1:0] c_i,
  output logic [W-1:0] y_o,
  output logic         mismatch_o
);
  always_comb begin
    if (tmr_i) begin
      y_o        = (a_i & b_i) | (a_i & c_i) | (b_i & c_i);
      mismatch_o = (a_i != b_i) || (a_i != c_i);
    end else begin
      y_o        = a_i;
      mismatch_o = (a_i != b_i);
    end
  end
endmodule
