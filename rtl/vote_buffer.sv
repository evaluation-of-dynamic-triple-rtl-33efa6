// Buffered voting stage used for the write-back (WB buffer) and load/store
// (LS buffer) units.  Each hart's copy of an instruction's result is kept in a
// buffer of its own (buf_q[h]), because the redundant harts produce it in
// different clock cycles.
//  * Capture: cap_en_i stores cap_data_i in the buffer of hart cap_harc_i.
//  * DMR check (chk_en_i): the live copy of hart 1 (live_i) is compared with
//    the buffered copy of hart 2; mismatch_o rises in that cycle and voted_o
//    is hart 2's copy.
//  * TMR vote (tmr_i, end of a restore): voted_o is the bitwise majority of the
//    buffers of harts 2 and 1 and the live copy of hart 0.
// Buffers change only on capture; reset clears them.  Following the document,
// harts 2 and 1 are compared in normal mode and hart 0's copy joins only after
// a detected error; the exact capture and compare timing is this design's.
module vote_buffer
  import dtmr_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         cap_en_i,
  input  harc_t        cap_harc_i,
  input  logic [W-1:0] cap_data_i,
  input  logic         chk_en_i,
  input  logic         tmr_i,
  input  logic [W-1:0] live_i,
  output logic [W-1:0] voted_o,
  output logic         mismatch_o,
  output logic         tmr_disagree_o
);
  logic [W-1:0] buf_q [NHARTS];
  logic         diff;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int h = 0; h < int'(NHARTS); h++) buf_q[h] <= '0;
    end else if (cap_en_i && cap_harc_i < harc_t'(NHARTS)) begin
      buf_q[cap_harc_i] <= cap_data_i;
    end
  end

  dtmr_voter #(.W(W)) u_voter (
    .tmr_i     (tmr_i),
    .a_i       (buf_q[HARC_B]),
    .b_i       (tmr_i ? buf_q[HARC_A] : live_i),
    .c_i       (live_i),
    .y_o       (voted_o),
    .mismatch_o(diff)
  );

  assign mismatch_o     = chk_en_i && !tmr_i && diff;
  assign tmr_disagree_o = tmr_i && diff;
endmodule
