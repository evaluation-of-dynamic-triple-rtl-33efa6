// Interleaved-multi-threading RV32I core with dynamic triple modular
// redundancy (three harts, four stages IF / ID / IE / WB).
//
// Normal mode (buffered DMR): harts 2 and 1 run the same program, hart 2 one
// cycle ahead, so instruction k of hart 2 is in IE while the same instruction
// of hart 1 is in ID.  Each hart has its own PC and register file (spatial
// redundancy); the pipeline is shared (temporal redundancy).  Three voters
// check the two copies before anything architectural changes:
//   PC  - pc_IE of hart 2 against pc_ID of hart 1 (pc_unit); a match copies
//         the address into the dummy PC of hart 0;
//   LSU - the memory request of hart 1 in IE against hart 2's buffered one;
//         only a matching request reaches the data memory, once;
//   WB  - the write-back record of hart 1 in WB against hart 2's buffered
//         one; only a matching record is written, into both register files.
// Operands are read in IE from the hart's own register file, with the value
// being written back in the same cycle forwarded; the two register-file
// copies are also compared on every read (rf_mismatch_o, detection only).
//
// Restore: a failed PC, LSU or WB vote (restore_*_o) stops every commit in
// that cycle and flushes the pipeline.  The instruction at the dummy PC (the
// youngest one whose address was voted correct) has then not committed yet:
// its WB vote was suppressed in this cycle or is still to come, and both
// buffered copies of it are intact.  Hart 0 fetches and executes it again,
// the LS and WB voters take the majority of the three copies (harts 2 and 1
// from the buffers, hart 0 live), and hart 0's next PC is loaded into all
// PCs.  Harts 2 and 1 resume four cycles after the detection.
//
// Memory interfaces: instruction fetch is a one-cycle synchronous read
// (imem_rdata_i belongs to the address sent the cycle before); data requests
// are one per cycle, load data arrive in the next cycle.
// From the original scheme: the two active harts, the PC, LSU and WB votes
// and where they sit, the per-hart buffers, the dummy PC and the three-way
// vote that ends a restore.  This design's own: operands read in IE with
// forwarding, commit suppression in the detection cycle, the detection-only
// register-file check, and the status outputs.
module dft03_core
  import dtmr_pkg::*;
#(
  parameter logic [31:0] BOOT_ADDR = 32'h0000_0000
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // program memory
  output logic        imem_re_o,
  output logic [31:0] imem_addr_o,
  input  logic [31:0] imem_rdata_i,
  // data memory
  output logic        dmem_re_o,
  output logic        dmem_we_o,
  output logic [31:0] dmem_addr_o,
  output logic [3:0]  dmem_be_o,
  output logic [31:0] dmem_wdata_o,
  input  logic [31:0] dmem_rdata_i,
  // status
  output mode_e       mode_o,
  output logic        restore_pc_o,
  output logic        restore_wb_o,
  output logic        restore_lsu_o,
  output logic [2:0]  restore_cause_o,
  output logic [31:0] restores_o,
  output logic        rf_mismatch_o,
  output logic        retire_o,
  output logic        retire_tmr_o,
  output logic [31:0] retire_pc_o,
  output logic [31:0] pc0_o
);
  mode_e       mode;
  logic        normal, detect;
  logic        fetch_valid;
  harc_t       fetch_harc;
  logic [31:0] fetch_addr;

  // pipeline registers
  logic        id_valid_q, ie_valid_q, wb_valid_q;
  harc_t       id_harc_q,  ie_harc_q,  wb_harc_q;
  logic [31:0] id_pc_q,    ie_pc_q;
  dec_t        id_dec,     ie_dec_q;
  wb_rec_t     wb_rec_q;

  // execute stage
  logic [31:0] rf2_a, rf2_b, rf1_a, rf1_b, rfv_a, rfv_b;
  logic        rfmm_a, rfmm_b;
  logic [31:0] op_a, op_b, ie_result, ie_next_pc;
  ls_rec_t     ie_ls;
  logic [1:0]  ie_byte_off;
  wb_rec_t     ie_wb;

  // voting and commit
  logic        ls_chk, ls_tmr, wb_chk, wb_tmr, cap_en;
  logic [LS_REC_W-1:0] ls_voted_bits;
  logic [WB_REC_W-1:0] wb_voted_bits;
  ls_rec_t     ls_voted;
  wb_rec_t     wb_voted;
  logic        commit;
  logic        rf_we;
  logic [4:0]  rf_wa;
  logic [31:0] rf_wd;

  assign normal = (mode == MODE_NORMAL);

  // ---------------------------------------------------------------- control
  restore_unit u_restore (
    .clk_i          (clk_i),
    .rst_ni         (rst_ni),
    .restore_pc_i   (restore_pc_o),
    .restore_wb_i   (restore_wb_o),
    .restore_lsu_i  (restore_lsu_o),
    .mode_o         (mode),
    .detect_o       (detect),
    .fetch_valid_o  (fetch_valid),
    .fetch_harc_o   (fetch_harc),
    .restore_cause_o(restore_cause_o),
    .restores_o     (restores_o)
  );

  pc_unit #(.BOOT_ADDR(BOOT_ADDR)) u_pc (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .normal_i    (normal),
    .fetch_harc_i(fetch_harc),
    .fetch_addr_o(fetch_addr),
    .id_valid_i  (id_valid_q),
    .id_harc_i   (id_harc_q),
    .id_pc_i     (id_pc_q),
    .ie_valid_i  (ie_valid_q),
    .ie_harc_i   (ie_harc_q),
    .ie_pc_i     (ie_pc_q),
    .ie_next_pc_i(ie_next_pc),
    .hold_i      (detect),
    .load_next_i (mode == MODE_R_EXEC && ie_valid_q && ie_harc_q == HARC_AUX),
    .restore_pc_o(restore_pc_o),
    .pc0_o       (pc0_o)
  );

  // ----------------------------------------------------------------- IF
  assign imem_re_o   = fetch_valid;
  assign imem_addr_o = fetch_addr;

  // ----------------------------------------------------------------- ID
  decoder u_dec (.instr_i(imem_rdata_i), .dec_o(id_dec));

  // ----------------------------------------------------------------- IE
  regfile u_rf_hart2 (
    .clk_i(clk_i), .rst_ni(rst_ni),
    .ra1_i(ie_dec_q.rs1), .rd1_o(rf2_a), .ra2_i(ie_dec_q.rs2), .rd2_o(rf2_b),
    .we_i(rf_we), .wa_i(rf_wa), .wd_i(rf_wd)
  );
  regfile u_rf_hart1 (
    .clk_i(clk_i), .rst_ni(rst_ni),
    .ra1_i(ie_dec_q.rs1), .rd1_o(rf1_a), .ra2_i(ie_dec_q.rs2), .rd2_o(rf1_b),
    .we_i(rf_we), .wa_i(rf_wa), .wd_i(rf_wd)
  );

  dtmr_voter #(.W(32)) u_rf_vote_a (.tmr_i(1'b0), .a_i(rf2_a), .b_i(rf1_a), .c_i(32'd0),
                                    .y_o(rfv_a), .mismatch_o(rfmm_a));
  dtmr_voter #(.W(32)) u_rf_vote_b (.tmr_i(1'b0), .a_i(rf2_b), .b_i(rf1_b), .c_i(32'd0),
                                    .y_o(rfv_b), .mismatch_o(rfmm_b));
  assign rf_mismatch_o = ie_valid_q && (rfmm_a || rfmm_b);

  // Each redundant hart reads its own copy; hart 0 reads through the voter.
  always_comb begin
    op_a = (ie_harc_q == HARC_A) ? rf1_a : (ie_harc_q == HARC_B) ? rf2_a : rfv_a;
    op_b = (ie_harc_q == HARC_A) ? rf1_b : (ie_harc_q == HARC_B) ? rf2_b : rfv_b;
    if (rf_we && rf_wa == ie_dec_q.rs1) op_a = rf_wd;
    if (rf_we && rf_wa == ie_dec_q.rs2) op_b = rf_wd;
  end

  exec_unit u_exec (
    .dec_i(ie_dec_q), .pc_i(ie_pc_q), .rs1_i(op_a), .rs2_i(op_b),
    .result_o(ie_result), .next_pc_o(ie_next_pc), .taken_o()
  );

  ls_unit u_ls (.dec_i(ie_dec_q), .rs1_i(op_a), .rs2_i(op_b),
                .req_o(ie_ls), .byte_off_o(ie_byte_off));

  always_comb begin
    ie_wb          = '0;
    ie_wb.pc       = ie_pc_q;
    ie_wb.rd_we    = ie_dec_q.rd_we;
    ie_wb.rd       = ie_dec_q.rd;
    ie_wb.value    = ie_dec_q.mem_re ? 32'd0 : ie_result;
    ie_wb.is_load  = ie_dec_q.mem_re;
    ie_wb.mem_size = ie_dec_q.mem_re ? ie_dec_q.mem_size : MEM_B;
    ie_wb.byte_off = ie_dec_q.mem_re ? ie_byte_off : 2'b00;
  end

  // A detection in a cycle where hart 2 is in IE belongs to the instruction
  // before hart 2's; keep hart 2's buffers so that it can be voted again.
  assign cap_en = ie_valid_q && !(detect && ie_harc_q == HARC_B);

  assign ls_chk = normal && ie_valid_q && ie_harc_q == HARC_A;
  assign ls_tmr = (mode == MODE_R_EXEC) && ie_valid_q && ie_harc_q == HARC_AUX;

  vote_buffer #(.W(LS_REC_W)) u_ls_buf (
    .clk_i(clk_i), .rst_ni(rst_ni),
    .cap_en_i(cap_en), .cap_harc_i(ie_harc_q), .cap_data_i(ie_ls),
    .chk_en_i(ls_chk), .tmr_i(ls_tmr), .live_i(ie_ls),
    .voted_o(ls_voted_bits), .mismatch_o(restore_lsu_o), .tmr_disagree_o()
  );
  assign ls_voted = ls_voted_bits;

  // Only the LSU vote can fail in a cycle where hart 1 is in IE.
  assign dmem_re_o    = ((ls_chk && !restore_lsu_o) || ls_tmr) && ls_voted.re;
  assign dmem_we_o    = ((ls_chk && !restore_lsu_o) || ls_tmr) && ls_voted.we;
  assign dmem_addr_o  = ls_voted.addr;
  assign dmem_be_o    = ls_voted.be;
  assign dmem_wdata_o = ls_voted.wdata;

  // ----------------------------------------------------------------- WB
  assign wb_chk = normal && wb_valid_q && wb_harc_q == HARC_A;
  assign wb_tmr = (mode == MODE_R_WB) && wb_valid_q && wb_harc_q == HARC_AUX;

  vote_buffer #(.W(WB_REC_W)) u_wb_buf (
    .clk_i(clk_i), .rst_ni(rst_ni),
    .cap_en_i(cap_en), .cap_harc_i(ie_harc_q), .cap_data_i(ie_wb),
    .chk_en_i(wb_chk), .tmr_i(wb_tmr), .live_i(wb_rec_q),
    .voted_o(wb_voted_bits), .mismatch_o(restore_wb_o), .tmr_disagree_o()
  );
  assign wb_voted = wb_voted_bits;

  // Only the PC and WB votes can fail in a cycle where hart 1 is in WB.
  assign commit = (wb_chk && !restore_pc_o && !restore_wb_o) || wb_tmr;

  wb_logic u_wb (
    .commit_i(commit), .rec_i(wb_voted), .mem_rdata_i(dmem_rdata_i),
    .rf_we_o(rf_we), .rf_wa_o(rf_wa), .rf_wd_o(rf_wd)
  );

  assign retire_o     = commit;
  assign retire_tmr_o = wb_tmr;
  assign retire_pc_o  = wb_voted.pc;
  assign mode_o       = mode;

  // ------------------------------------------------------ pipeline registers
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      id_valid_q <= 1'b0; ie_valid_q <= 1'b0; wb_valid_q <= 1'b0;
      id_harc_q  <= HARC_B; ie_harc_q <= HARC_B; wb_harc_q <= HARC_B;
      id_pc_q    <= '0; ie_pc_q <= '0;
      ie_dec_q   <= '0; wb_rec_q <= '0;
    end else begin
      id_valid_q <= fetch_valid && !detect;
      ie_valid_q <= id_valid_q  && !detect;
      wb_valid_q <= ie_valid_q  && !detect;
      id_harc_q  <= fetch_harc;
      id_pc_q    <= fetch_addr;
      ie_harc_q  <= id_harc_q;
      ie_pc_q    <= id_pc_q;
      ie_dec_q   <= id_valid_q ? id_dec : '0;
      wb_harc_q  <= ie_harc_q;
      wb_rec_q   <= ie_wb;
    end
  end

  // Only a voted request may reach the data memory.
  a_single_mem_access: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (dmem_re_o || dmem_we_o) |-> (ls_tmr || (ls_chk && !restore_lsu_o)));
  // A commit never happens in the cycle of a detected error.
  a_no_commit_on_error: assert property (@(posedge clk_i) disable iff (!rst_ni)
    detect |-> !commit);
endmodule
