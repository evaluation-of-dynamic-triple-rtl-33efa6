// Data memory with ECC.  Words are stored as 39-bit SECDED code words.
// Core port: one request per cycle (req_re_i or req_we_i) at the byte address
// req_addr_i (word aligned) with byte enables req_be_i.  A store with partial
// byte enables is a read-modify-write within the cycle: the stored word is
// decoded (and corrected), the enabled lanes are replaced, and the result is
// re-encoded.  Load data appear, corrected, on rdata_o in the next cycle.
// Host port: whole-word write (host_we_i) and synchronous read (host_re_i,
// host_rdata_o one cycle later) for loading and inspecting data; the core port
// wins if both write the same cycle.  The document only says that the data
// memory bus is ECC protected; size, ports and code are this design's choices.
module data_mem #(
  parameter int unsigned WORDS = 8192
) (
  input  logic                     clk_i,
  input  logic                     req_re_i,
  input  logic                     req_we_i,
  input  logic [31:0]              req_addr_i,
  input  logic [3:0]               req_be_i,
  input  logic [31:0]              req_wdata_i,
  output logic [31:0]              rdata_o,
  output logic                     ecc_single_o,
  output logic                     ecc_double_o,
  input  logic                     host_we_i,
  input  logic                     host_re_i,
  input  logic [$clog2(WORDS)-1:0] host_addr_i,
  input  logic [31:0]              host_wdata_i,
  output logic [31:0]              host_rdata_o
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [38:0]   mem [WORDS];
  logic [38:0]   rd_q, host_q;
  logic [AW-1:0] idx;
  logic [31:0]   old_word, new_word;
  logic [38:0]   new_code, host_code;
  logic          old_single, old_double, host_single, host_double;

  assign idx = req_addr_i[AW+1:2];

  ecc_dec u_rmw_dec (.code_i(mem[idx]), .data_o(old_word),
                     .err_single_o(old_single), .err_double_o(old_double));

  always_comb begin
    for (int b = 0; b < 4; b++)
      new_word[8*b +: 8] = req_be_i[b] ? req_wdata_i[8*b +: 8] : old_word[8*b +: 8];
  end

  ecc_enc u_enc  (.data_i(new_word),     .code_o(new_code));
  ecc_enc u_henc (.data_i(host_wdata_i), .code_o(host_code));

  always_ff @(posedge clk_i) begin
    if (req_we_i)       mem[idx]         <= new_code;
    else if (host_we_i) mem[host_addr_i] <= host_code;
    if (req_re_i)  rd_q   <= mem[idx];
    if (host_re_i) host_q <= mem[host_addr_i];
  end

  ecc_dec u_dec (.code_i(rd_q), .data_o(rdata_o),
                 .err_single_o(ecc_single_o), .err_double_o(ecc_double_o));
  ecc_dec u_hdec (.code_i(host_q), .data_o(host_rdata_o),
                  .err_single_o(host_single), .err_double_o(host_double));
endmodule
