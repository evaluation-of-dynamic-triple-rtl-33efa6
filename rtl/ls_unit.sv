// Load/store logic (IE stage): forms the data-memory request of one hart as
// an ls_rec_t: word-aligned address, byte enables, store data moved into its
// byte lanes, and read/write strobes.  Misaligned accesses are not supported
// (the low address bits select lanes inside one word).  The request is not
// sent to memory here: it goes to the LS buffers and the LS vote first.
// Combinational.
// The original scheme names this unit only; its behaviour is plain RV32I and
// its structure is this design's.
module ls_unit
  import dtmr_pkg::*;
(
  input  dec_t        dec_i,
  input  logic [31:0] rs1_i,
  input  logic [31:0] rs2_i,
  output ls_rec_t     req_o,
  output logic [1:0]  byte_off_o
);
  logic [31:0] ea;

  assign ea         = rs1_i + dec_i.imm;
  assign byte_off_o = ea[1:0];

  always_comb begin
    req_o       = '0;
    req_o.re    = dec_i.mem_re;
    req_o.we    = dec_i.mem_we;
    if (dec_i.mem_re || dec_i.mem_we) begin
      req_o.addr = {ea[31:2], 2'b00};
      case (dec_i.mem_size)
        MEM_B, MEM_BU: req_o.be = 4'b0001 << ea[1:0];
        MEM_H, MEM_HU: req_o.be = 4'b0011 << {ea[1], 1'b0};
        default:       req_o.be = 4'b1111;
      endcase
      if (dec_i.mem_we) begin
        case (dec_i.mem_size)
          MEM_B, MEM_BU: req_o.wdata = {4{rs2_i[7:0]}};
          MEM_H, MEM_HU: req_o.wdata = {2{rs2_i[15:0]}};
          default:       req_o.wdata = rs2_i;
        endcase
      end
    end
  end
endmodule
