// Program memory with ECC.  Each word is stored as a 39-bit SECDED code word
// (ecc_enc on the load port, ecc_dec on the fetch port), so that a single
// upset in a stored instruction is corrected before decode.
// Fetch port: fetch_re_i/fetch_addr_i (byte address, word aligned) in one
// cycle, corrected instruction on fetch_data_o in the next (synchronous read,
// the output register is the IF/ID instruction register).
// Load port: ld_we_i writes ld_data_i at word index ld_addr_i; it is how a
// host puts a program into the memory before releasing the core's reset.
// The size (WORDS) is this design's choice: the document gives none.
module prog_mem #(
  parameter int unsigned WORDS = 8192
) (
  input  logic                     clk_i,
  input  logic                     fetch_re_i,
  input  logic [31:0]              fetch_addr_i,
  output logic [31:0]              fetch_data_o,
  output logic                     ecc_single_o,
  output logic                     ecc_double_o,
  input  logic                     ld_we_i,
  input  logic [$clog2(WORDS)-1:0] ld_addr_i,
  input  logic [31:0]              ld_data_i
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [38:0] mem [WORDS];
  logic [38:0] rd_q;
  logic [38:0] ld_code;

  ecc_enc u_enc (.data_i(ld_data_i), .code_o(ld_code));

  always_ff @(posedge clk_i) begin
    if (ld_we_i) mem[ld_addr_i] <= ld_code;
    if (fetch_re_i) rd_q <= mem[fetch_addr_i[AW+1:2]];
  end

  ecc_dec u_dec (
    .code_i      (rd_q),
    .data_o      (fetch_data_o),
    .err_single_o(ecc_single_o),
    .err_double_o(ecc_double_o)
  );
endmodule
