// SECDED decoder matching ecc_enc: recomputes the six Hamming check bits and
// the overall parity.  A non-zero syndrome with odd overall parity is a single
// error at position <syndrome> and is corrected; a non-zero syndrome with even
// parity is an uncorrectable double error (the data is passed on unchanged and
// err_double_o is raised).  A lone flip of the overall parity bit is corrected
// silently.  Combinational.
// The original scheme only states that the memories are ECC-protected; the
// SECDED (39,32) code and its bit layout are this design's choice.
module ecc_dec (
  input  logic [38:0] code_i,
  output logic [31:0] data_o,
  output logic        err_single_o,
  output logic        err_double_o
);
  always_comb begin
    logic [5:0]  syn;
    logic        par;
    logic [38:0] c;
    int unsigned d;
    c = code_i;
    for (int unsigned k = 0; k < 6; k++) begin
      logic s;
      s = 1'b0;
      for (int unsigned p = 1; p < 39; p++)
        if (((p >> k) & 1) == 1) s ^= code_i[p];
      syn[k] = s;
    end
    par          = ^code_i;
    err_single_o = par;
    err_double_o = (syn != 6'd0) && !par;
    if (par && syn != 6'd0 && syn < 6'd39) c[syn] = ~c[syn];
    data_o = '0;
    d = 0;
    for (int unsigned p = 1; p < 39; p++) begin
      if ((p & (p - 1)) != 0) begin
        data_o[d] = c[p];
        d++;
      end
    end
  end
endmodule
