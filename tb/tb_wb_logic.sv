// Self-checking test of wb_logic: byte/half-word extraction with sign or zero
// extension for loads, pass-through of results, and the write enable.
// The checks are this design's own; they test the behaviour described above.
module tb_wb_logic;
  import dtmr_pkg::*;
  int checks = 0, failures = 0;
  logic commit;
  wb_rec_t rec;
  logic [31:0] md, wd;
  logic we;
  logic [4:0] wa;

  wb_logic dut (.commit_i(commit), .rec_i(rec), .mem_rdata_i(md), .rf_we_o(we), .rf_wa_o(wa), .rf_wd_o(wd));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static mem_size_e sizes [5] = '{MEM_B, MEM_BU, MEM_H, MEM_HU, MEM_W};
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] e;
      logic [7:0]  by;
      logic [15:0] hw;
      rec = '0; md = $urandom; commit = 1'($urandom % 2);
      rec.rd = 5'($urandom); rec.rd_we = 1'($urandom % 2); rec.value = $urandom;
      rec.is_load = i[0];
      rec.mem_size = sizes[$urandom % 5];
      rec.byte_off = (rec.mem_size == MEM_W) ? 2'd0 :
                     (rec.mem_size inside {MEM_H, MEM_HU}) ? {1'($urandom), 1'b0} : 2'($urandom);
      #1;
      by = md[8*rec.byte_off +: 8];
      hw = md[8*rec.byte_off +: 16];
      if (!rec.is_load) e = rec.value;
      else case (rec.mem_size)
        MEM_B:  e = {{24{by[7]}}, by};
        MEM_BU: e = {24'd0, by};
        MEM_H:  e = {{16{hw[15]}}, hw};
        MEM_HU: e = {16'd0, hw};
        default: e = md;
      endcase
      checks++;
      if (wd !== e || wa !== rec.rd || we !== (commit && rec.rd_we && rec.rd != 0)) begin
        failures++; $display("FAIL wd=%h exp=%h", wd, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
