// Shared types and constants of the dynamic-TMR interleaved multi-threading core.
// Three hardware threads (harts) share one four-stage in-order pipeline
// (IF, ID, IE, WB).  Harts 2 and 1 run the same program one cycle apart;
// hart 0 is the auxiliary hart that is woken only to re-execute an instruction
// after a vote has failed.  The ISA is RV32I without CSR, FENCE and system
// instructions (those decode as no-operations).
// Hart numbering (2 and 1 active, 0 auxiliary) and the operating modes follow
// the original scheme; the record layouts and encodings are this design's.
package dtmr_pkg;

  localparam int unsigned XLEN     = 32;
  localparam int unsigned NHARTS   = 3;
  localparam int unsigned ECC_W    = 39;   // 32 data bits + 7 SECDED check bits

  typedef logic [1:0]      harc_t;
  localparam harc_t HARC_AUX = 2'd0;   // auxiliary hart (Thread 0)
  localparam harc_t HARC_A   = 2'd1;   // second redundant hart (Thread 1)
  localparam harc_t HARC_B   = 2'd2;   // leading redundant hart (Thread 2)

  // Operating modes of the core.
  typedef enum logic [2:0] {
    MODE_NORMAL    = 3'd0,  // buffered DMR: harts 2 and 1 interleaved
    MODE_R_FETCH   = 3'd1,  // restore: hart 0 in IF
    MODE_R_DECODE  = 3'd2,  // restore: hart 0 in ID
    MODE_R_EXEC    = 3'd3,  // end of restore: hart 0 in IE, three-way LS vote
    MODE_R_WB      = 3'd4   // end of restore: hart 0 in WB, three-way WB vote
  } mode_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR,
    ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_PASSB
  } alu_op_e;

  typedef enum logic [2:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LT, BR_GE, BR_LTU, BR_GEU, BR_JUMP
  } br_op_e;

  // Size and sign of a memory access: funct3 of the load/store instruction.
  typedef enum logic [2:0] {
    MEM_B = 3'b000, MEM_H = 3'b001, MEM_W = 3'b010,
    MEM_BU = 3'b100, MEM_HU = 3'b101
  } mem_size_e;

  // Output of the decoder.
  typedef struct packed {
    logic        rd_we;
    logic [4:0]  rd;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [31:0] imm;
    alu_op_e     alu_op;
    logic        op_a_pc;    // ALU operand A is the PC (AUIPC, JAL)
    logic        op_b_imm;   // ALU operand B is the immediate
    br_op_e      br_op;
    logic        jalr;       // target is rs1 + imm
    logic        link;       // rd gets PC + 4
    logic        mem_re;
    logic        mem_we;
    mem_size_e   mem_size;
  } dec_t;

  // What one hart produces for the register file (the WB buffer entry).
  typedef struct packed {
    logic [31:0] pc;         // address of the instruction
    logic        rd_we;
    logic [4:0]  rd;
    logic [31:0] value;      // ALU or link result; unused for loads
    logic        is_load;
    mem_size_e   mem_size;
    logic [1:0]  byte_off;
  } wb_rec_t;

  // What one hart asks of the data memory (the LS buffer entry).
  typedef struct packed {
    logic        re;
    logic        we;
    logic [31:0] addr;       // word-aligned byte address
    logic [3:0]  be;
    logic [31:0] wdata;      // already shifted into its byte lanes
  } ls_rec_t;

  localparam int unsigned WB_REC_W = $bits(wb_rec_t);
  localparam int unsigned LS_REC_W = $bits(ls_rec_t);

endpackage
