// Restore unit: operating-mode controller and hart scheduler.
// Normal ("buffered DMR") mode: harts 2 and 1 are fetched alternately, hart 2
// first, one instruction per cycle; hart 0 sleeps.  Any of the restore_
// signals (PC, WB or LSU vote failed) gives detect_o in the same cycle, which
// flushes the pipeline, and starts the restore: hart 0 is fetched from the
// dummy PC (R_FETCH), decoded (R_DECODE) and executed (R_EXEC, three-way LS
// vote and reload of the PCs); in R_WB its result is voted three ways and
// written back while hart 2 already fetches again, and the next cycle is
// normal mode with hart 1.  The restore costs four cycles in which harts 2
// and 1 fetch nothing.  restore_cause_o keeps {lsu, wb, pc} of the last
// restore and restores_o counts them.  Sequence and four-cycle length follow
// the document; state encoding and counters are this design's.
module restore_unit
  import dtmr_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        restore_pc_i,
  input  logic        restore_wb_i,
  input  logic        restore_lsu_i,
  output mode_e       mode_o,
  output logic        detect_o,
  output logic        fetch_valid_o,
  output harc_t       fetch_harc_o,
  output logic [2:0]  restore_cause_o,
  output logic [31:0] restores_o
);
  mode_e mode_q, mode_d;
  harc_t turn_q;

  assign detect_o = (mode_q == MODE_NORMAL) &&
                    (restore_pc_i || restore_wb_i || restore_lsu_i);

  always_comb begin
    mode_d = mode_q;
    case (mode_q)
      MODE_NORMAL:   if (detect_o) mode_d = MODE_R_FETCH;
      MODE_R_FETCH:  mode_d = MODE_R_DECODE;
      MODE_R_DECODE: mode_d = MODE_R_EXEC;
      MODE_R_EXEC:   mode_d = MODE_R_WB;
      default:       mode_d = MODE_NORMAL;
    endcase
  end

  always_comb begin
    case (mode_q)
      MODE_NORMAL:  begin fetch_valid_o = 1'b1; fetch_harc_o = turn_q;   end
      MODE_R_FETCH: begin fetch_valid_o = 1'b1; fetch_harc_o = HARC_AUX; end
      MODE_R_WB:    begin fetch_valid_o = 1'b1; fetch_harc_o = HARC_B;   end
      default:      begin fetch_valid_o = 1'b0; fetch_harc_o = HARC_B;   end
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      mode_q          <= MODE_NORMAL;
      turn_q          <= HARC_B;
      restore_cause_o <= '0;
      restores_o      <= '0;
    end else begin
      mode_q <= mode_d;
      if (mode_q == MODE_NORMAL) turn_q <= (turn_q == HARC_B) ? HARC_A : HARC_B;
      else if (mode_q == MODE_R_WB) turn_q <= HARC_A;
      else turn_q <= HARC_B;
      if (detect_o) begin
        restore_cause_o <= {restore_lsu_i, restore_wb_i, restore_pc_i};
        restores_o      <= restores_o + 32'd1;
      end
    end
  end

  assign mode_o = mode_q;

  // Hart 0 is fetched only in the first cycle of a restore.
  a_aux_fetch_only_in_restore: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (fetch_valid_o && fetch_harc_o == HARC_AUX) |-> mode_q == MODE_R_FETCH);
endmodule
