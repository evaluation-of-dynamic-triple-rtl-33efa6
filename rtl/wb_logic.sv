// Write-back logic: turns a voted write-back record into the register-file
// write.  For a load it extracts the addressed byte or half-word from the
// (ECC-corrected) memory word and sign- or zero-extends it; otherwise it
// passes the execute result.  The write goes to the register files of harts 2
// and 1 together.  Combinational.
// The original scheme names this unit only; its behaviour is plain RV32I and
// its structure is this design's.
module wb_logic
  import dtmr_pkg::*;
(
  input  logic        commit_i,
  input  wb_rec_t     rec_i,
  input  logic [31:0] mem_rdata_i,
  output logic        rf_we_o,
  output logic [4:0]  rf_wa_o,
  output logic [31:0] rf_wd_o
);
  logic [31:0] sh;

  assign sh = mem_rdata_i >> {rec_i.byte_off, 3'b000};

  always_comb begin
    rf_we_o = commit_i && rec_i.rd_we && (rec_i.rd != 5'd0);
    rf_wa_o = rec_i.rd;
    if (rec_i.is_load) begin
      case (rec_i.mem_size)
        MEM_B:   rf_wd_o = {{24{sh[7]}}, sh[7:0]};
        MEM_BU:  rf_wd_o = {24'b0, sh[7:0]};
        MEM_H:   rf_wd_o = {{16{sh[15]}}, sh[15:0]};
        MEM_HU:  rf_wd_o = {16'b0, sh[15:0]};
        default: rf_wd_o = mem_rdata_i;
      endcase
    end else begin
      rf_wd_o = rec_i.value;
    end
  end
endmodule
