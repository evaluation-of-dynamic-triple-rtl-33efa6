// Dynamic-TMR interleaved-multi-threading RISC-V system: the dft03_core with
// its ECC-protected program and data memories.  A host loads the program
// through the prog_* port and reads or writes data words through the host_*
// port (word indices), normally while rst_ni holds the core in reset; the core
// then runs from BOOT_ADDR.  Status outputs show the operating mode, the
// restore signals of the three voters, a count of restores, each retired
// instruction and the ECC events of the two memories.
// The core with ECC-protected program and data memories follows the original
// scheme; the memory sizes, the boot address and the host ports are this
// design's own choices.
module dft03_top
  import dtmr_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 8192,
  parameter int unsigned DMEM_WORDS = 8192,
  parameter logic [31:0] BOOT_ADDR  = 32'h0000_0000
) (
  input  logic                          clk_i,
  input  logic                          rst_ni,
  input  logic                          prog_we_i,
  input  logic [$clog2(IMEM_WORDS)-1:0] prog_addr_i,
  input  logic [31:0]                   prog_data_i,
  input  logic                          host_we_i,
  input  logic                          host_re_i,
  input  logic [$clog2(DMEM_WORDS)-1:0] host_addr_i,
  input  logic [31:0]                   host_wdata_i,
  output logic [31:0]                   host_rdata_o,
  output mode_e                         mode_o,
  output logic                          restore_pc_o,
  output logic                          restore_wb_o,
  output logic                          restore_lsu_o,
  output logic [2:0]                    restore_cause_o,
  output logic [31:0]                   restores_o,
  output logic                          rf_mismatch_o,
  output logic                          retire_o,
  output logic                          retire_tmr_o,
  output logic [31:0]                   retire_pc_o,
  output logic [31:0]                   pc0_o,
  output logic                          imem_ecc_single_o,
  output logic                          imem_ecc_double_o,
  output logic                          dmem_ecc_single_o,
  output logic                          dmem_ecc_double_o
);
  logic        imem_re, dmem_re, dmem_we;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic [3:0]  dmem_be;

  dft03_core #(.BOOT_ADDR(BOOT_ADDR)) u_core (
    .clk_i(clk_i), .rst_ni(rst_ni),
    .imem_re_o(imem_re), .imem_addr_o(imem_addr), .imem_rdata_i(imem_rdata),
    .dmem_re_o(dmem_re), .dmem_we_o(dmem_we), .dmem_addr_o(dmem_addr),
    .dmem_be_o(dmem_be), .dmem_wdata_o(dmem_wdata), .dmem_rdata_i(dmem_rdata),
    .mode_o(mode_o), .restore_pc_o(restore_pc_o), .restore_wb_o(restore_wb_o),
    .restore_lsu_o(restore_lsu_o), .restore_cause_o(restore_cause_o),
    .restores_o(restores_o), .rf_mismatch_o(rf_mismatch_o),
    .retire_o(retire_o), .retire_tmr_o(retire_tmr_o), .retire_pc_o(retire_pc_o),
    .pc0_o(pc0_o)
  );

  prog_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk_i(clk_i), .fetch_re_i(imem_re), .fetch_addr_i(imem_addr),
    .fetch_data_o(imem_rdata), .ecc_single_o(imem_ecc_single_o),
    .ecc_double_o(imem_ecc_double_o),
    .ld_we_i(prog_we_i), .ld_addr_i(prog_addr_i), .ld_data_i(prog_data_i)
  );

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk_i(clk_i), .req_re_i(dmem_re), .req_we_i(dmem_we), .req_addr_i(dmem_addr),
    .req_be_i(dmem_be), .req_wdata_i(dmem_wdata), .rdata_o(dmem_rdata),
    .ecc_single_o(dmem_ecc_single_o), .ecc_double_o(dmem_ecc_double_o),
    .host_we_i(host_we_i), .host_re_i(host_re_i), .host_addr_i(host_addr_i),
    .host_wdata_i(host_wdata_i), .host_rdata_o(host_rdata_o)
  );
endmodule
