// Program-counter unit with the PC voter and the dummy PC of hart 0.
// Harts 1 and 2 each own a PC holding the address of their next fetch.  When
// a hart's previous instruction is in IE its next PC is taken straight from
// the execute logic (so the two interleaved harts can each fetch every other
// cycle without bubbles) and is also written into the hart's PC.
// PC vote: when hart 1 is in ID and hart 2 is in IE (the same instruction one
// cycle apart) their instruction addresses pc_ID and pc_IE are compared.  On
// a match the dummy PC of hart 0 (pc0_o) takes that address, so it always
// holds the last instruction whose address was voted correct; on a mismatch
// restore_pc_o rises.  hold_i (any other error in the same cycle) stops the
// dummy PC update.  During the restore hart 0 fetches from the dummy PC; when
// its instruction is in IE (load_next_i) the computed next PC is loaded into
// the dummy PC and into the PCs of harts 2 and 1, which resume from there.
// Until the first successful vote after reset no instruction has been voted,
// so the vote buffers are empty and hart 0's re-execution of the boot
// instruction cannot be committed; a restore in that window therefore sends
// all harts back to BOOT_ADDR instead of past it (voted_q).
// reset: all PCs at BOOT_ADDR.  The dummy-PC scheme follows the document; the
// next-PC bypass and the boot-window rule are this design's.
module pc_unit
  import dtmr_pkg::*;
#(
  parameter logic [31:0] BOOT_ADDR = 32'h0000_0000
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        normal_i,
  input  harc_t       fetch_harc_i,
  output logic [31:0] fetch_addr_o,
  input  logic        id_valid_i,
  input  harc_t       id_harc_i,
  input  logic [31:0] id_pc_i,
  input  logic        ie_valid_i,
  input  harc_t       ie_harc_i,
  input  logic [31:0] ie_pc_i,
  input  logic [31:0] ie_next_pc_i,
  input  logic        hold_i,
  input  logic        load_next_i,
  output logic        restore_pc_o,
  output logic [31:0] pc0_o
);
  logic [31:0] pc_q [NHARTS];
  logic        vote_en, mismatch;
  logic [31:0] voted_pc;
  logic        voted_q;
  logic [31:0] resume_pc;

  assign vote_en = normal_i && id_valid_i && ie_valid_i &&
                   id_harc_i == HARC_A && ie_harc_i == HARC_B;

  dtmr_voter #(.W(32)) u_pc_voter (
    .tmr_i     (1'b0),
    .a_i       (ie_pc_i),
    .b_i       (id_pc_i),
    .c_i       (32'd0),
    .y_o       (voted_pc),
    .mismatch_o(mismatch)
  );

  assign restore_pc_o = vote_en && mismatch;
  assign resume_pc    = voted_q ? ie_next_pc_i : BOOT_ADDR;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int h = 0; h < int'(NHARTS); h++) pc_q[h] <= BOOT_ADDR;
      voted_q <= 1'b0;
    end else if (load_next_i) begin
      pc_q[HARC_AUX] <= resume_pc;
      pc_q[HARC_A]   <= resume_pc;
      pc_q[HARC_B]   <= resume_pc;
    end else begin
      if (vote_en && !mismatch && !hold_i) begin
        pc_q[HARC_AUX] <= voted_pc;
        voted_q        <= 1'b1;
      end
      if (normal_i && ie_valid_i && ie_harc_i != HARC_AUX) pc_q[ie_harc_i] <= ie_next_pc_i;
    end
  end

  always_comb begin
    if (fetch_harc_i == HARC_AUX)                         fetch_addr_o = pc_q[HARC_AUX];
    else if (ie_valid_i && ie_harc_i == fetch_harc_i)     fetch_addr_o = ie_next_pc_i;
    else                                                  fetch_addr_o = pc_q[fetch_harc_i];
  end

  assign pc0_o = pc_q[HARC_AUX];
endmodule
