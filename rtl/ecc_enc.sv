// SECDED encoder (extended Hamming (39,32)) protecting the memory words.
// Data bits fill the non-power-of-two positions 3..38 of a Hamming code word;
// the check bit at position 2^k is the XOR of all positions whose index has
// bit k set; bit 0 is the overall parity of positions 1..38.  The document only
// states that memories are ECC protected; the code chosen here is this
// design's own.  Combinational.
// The original scheme only states that the memories are ECC-protected; the
// SECDED (39,32) code and its bit layout are this design's choice.
module ecc_enc (
  input  logic [31:0] data_i,
  output logic [38:0] code_o
);
  always_comb begin
    logic [38:0] c;
    int unsigned d;
    c = '0;
    d = 0;
    for (int unsigned p = 1; p < 39; p++) begin
      if ((p & (p - 1)) != 0) begin
        c[p] = data_i[d];
        d++;
      end
    end
    for (int unsigned k = 0; k < 6; k++) begin
      logic par;
      par = 1'b0;
      for (int unsigned p = 1; p < 39; p++)
        if (((p >> k) & 1) == 1) par ^= c[p];
      c[1 << k] = par;
    end
    c[0] = ^c[38:1];
    code_o = c;
  end
endmodule
