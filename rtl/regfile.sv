// Register file of one hart: x1..x31 of RV32I (x0 reads as zero).
// Two asynchronous read ports and one write port written on the rising edge.
// The core has one instance per hart; the write-back writes the voted value
// into the copies of harts 2 and 1 in the same cycle.  Reset clears all
// registers (this design's choice).  The document's per-hart CSRs are not
// part of this block.
module regfile (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic [4:0]  ra1_i,
  output logic [31:0] rd1_o,
  input  logic [4:0]  ra2_i,
  output logic [31:0] rd2_o,
  input  logic        we_i,
  input  logic [4:0]  wa_i,
  input  logic [31:0] wd_i
);
  logic [31:0] regs [32];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we_i && wa_i != 5'd0) begin
      regs[wa_i] <= wd_i;
    end
  end

  assign rd1_o = (ra1_i == 5'd0) ? '0 : regs[ra1_i];
  assign rd2_o = (ra2_i == 5'd0) ? '0 : regs[ra2_i];
endmodule
