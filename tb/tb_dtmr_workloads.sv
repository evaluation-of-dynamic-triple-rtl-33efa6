// Workload and fault-injection campaign on dft03_top, in the style of a
// time-frame-spanning evaluation.  Three kernels are run: a bitwise CRC-32
// over CRC_LEN bytes, an integer FIR filter (NT taps, NY outputs) and a
// radix-2 decimation-in-time FFT of FFT_N complex points in Q15 fixed point
// (input taken in bit-reversed order, twiddles cos/-sin scaled by 32767 and
// computed here).  Multiplication is done in software by shift and add, as
// the core has no multiplier.  The sizes are chosen so that the fault-free
// runs take roughly the cycle counts reported for the redundant core (about
// 15 000, 49 000 and 106 000 cycles).  For each kernel the fault-free run sets the cycle count
// C; then, for every target register and each of M = 10 time frames of C/M
// cycles, the kernel is run again while one random bit of the target is
// flipped every 35 cycles inside that frame (never during a restore).  A frame
// fails if the results differ from the reference simulator or the program does
// not finish.  The registers covered by the PC, LSU and WB votes or by ECC
// must show no failing frame.  The hart tags and valid bits of the pipeline
// stages and the two register-file copies are reported only: the votes do
// not cover them (a register-file bit stays flipped until it is rewritten).
// The time-frame method, ten frames and one flip every 35 cycles follow the
// original evaluation, as do the three kernels; the kernel code, its sizes
// and the target list are this design's.
module tb_dtmr_workloads;
  import dtmr_pkg::*;
  import rv_tb_pkg::*;

  localparam int CRC_LEN = 144;
  localparam int NT = 8, NY = 62;
  localparam int FFT_N = 32;
  localparam int XR = 'h100, XI = XR + 4 * FFT_N, WR = 'h300, WI = WR + 2 * FFT_N;
  localparam int M = 10, RATE = 35;
  localparam int DONE_W = 'h208 / 4;
  localparam int NTARGET = 12;
  localparam int NPROT = 6;
  localparam string TNAME [NTARGET] = '{"pc_ID", "pc_IE", "IE decode", "WB record",
    "imem read", "dmem read", "harc_ID", "harc_IE", "harc_WB", "RF hart 2", "RF hart 1",
    "valid bits"};

  logic clk = 1'b0, rst_n = 1'b0;
  logic prog_we = 1'b0, host_we = 1'b0, host_re = 1'b0;
  logic [12:0] prog_addr = '0, host_addr = '0;
  logic [31:0] prog_data = '0, host_wdata = '0, host_rdata;
  mode_e mode;
  logic rpc, rwb, rlsu, rfmm, ret, ret_tmr, ie_s, id_d, de_s, de_d;
  logic [2:0] cause;
  logic [31:0] restores, ret_pc, pc0;
  int checks = 0, failures = 0;
  longint cyc = 0;

  dft03_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .prog_we_i(prog_we), .prog_addr_i(prog_addr), .prog_data_i(prog_data),
    .host_we_i(host_we), .host_re_i(host_re), .host_addr_i(host_addr),
    .host_wdata_i(host_wdata), .host_rdata_o(host_rdata),
    .mode_o(mode), .restore_pc_o(rpc), .restore_wb_o(rwb), .restore_lsu_o(rlsu),
    .restore_cause_o(cause), .restores_o(restores), .rf_mismatch_o(rfmm),
    .retire_o(ret), .retire_tmr_o(ret_tmr), .retire_pc_o(ret_pc), .pc0_o(pc0),
    .imem_ecc_single_o(ie_s), .imem_ecc_double_o(id_d),
    .dmem_ecc_single_o(de_s), .dmem_ecc_double_o(de_d)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  logic [31:0] prog [80];
  logic [7:0]  init [1024];   // first 1 KiB of data memory

  function automatic void crc_program();
    foreach (prog[i]) prog[i] = ADDI(0, 0, 0);
    prog[0]  = ADDI(10, 0, 'h100);
    prog[1]  = ADDI(11, 0, CRC_LEN);
    prog[2]  = ADDI(12, 0, -1);
    prog[3]  = LUI(13, 'hEDB88);
    prog[4]  = ADDI(13, 13, 'h320);
    prog[5]  = BEQ(11, 0, (18 - 5) * 4);
    prog[6]  = LBU(14, 10, 0);
    prog[7]  = XOR(12, 12, 14);
    prog[8]  = ADDI(15, 0, 8);
    prog[9]  = ANDI(16, 12, 1);
    prog[10] = SRLI(12, 12, 1);
    prog[11] = BEQ(16, 0, 8);
    prog[12] = XOR(12, 12, 13);
    prog[13] = ADDI(15, 15, -1);
    prog[14] = BNE(15, 0, (9 - 14) * 4);
    prog[15] = ADDI(10, 10, 1);
    prog[16] = ADDI(11, 11, -1);
    prog[17] = JAL(0, (5 - 17) * 4);
    prog[18] = XORI(12, 12, -1);
    prog[19] = SW(12, 0, 'h200);
    prog[20] = ADDI(5, 0, 1);
    prog[21] = SW(5, 0, 'h208);
    prog[22] = JAL(0, 0);
    foreach (init[i]) init[i] = (i >= 'h100 && i < 'h100 + CRC_LEN) ? 8'($urandom) : 8'd0;
  endfunction

  // y[n] = sum_k h[k] * x[n+k]; x words at 0x100, h words at 0x280, y at 0x300
  function automatic void fir_program();
    foreach (prog[i]) prog[i] = ADDI(0, 0, 0);
    prog[0]  = ADDI(10, 0, 'h100);
    prog[1]  = ADDI(11, 0, 'h280);
    prog[2]  = ADDI(12, 0, 'h300);
    prog[3]  = ADDI(13, 0, NY);
    prog[4]  = ADDI(14, 0, 0);
    prog[5]  = ADDI(15, 0, NT);
    prog[6]  = ADDI(16, 10, 0);
    prog[7]  = ADDI(17, 11, 0);
    prog[8]  = LW(18, 16, 0);
    prog[9]  = LW(19, 17, 0);
    prog[10] = JAL(1, (30 - 10) * 4);
    prog[11] = ADD(14, 14, 20);
    prog[12] = ADDI(16, 16, 4);
    prog[13] = ADDI(17, 17, 4);
    prog[14] = ADDI(15, 15, -1);
    prog[15] = BNE(15, 0, (8 - 15) * 4);
    prog[16] = SW(14, 12, 0);
    prog[17] = ADDI(12, 12, 4);
    prog[18] = ADDI(10, 10, 4);
    prog[19] = ADDI(13, 13, -1);
    prog[20] = BNE(13, 0, (4 - 20) * 4);
    prog[21] = ADDI(5, 0, 1);
    prog[22] = SW(5, 0, 'h208);
    prog[23] = JAL(0, 0);
    prog[30] = ADDI(20, 0, 0);         // x20 = x18 * x19 by shift and add
    prog[31] = ADDI(21, 18, 0);
    prog[32] = ADDI(22, 19, 0);
    prog[33] = BEQ(22, 0, (40 - 33) * 4);
    prog[34] = ANDI(23, 22, 1);
    prog[35] = BEQ(23, 0, 8);
    prog[36] = ADD(20, 20, 21);
    prog[37] = SLLI(21, 21, 1);
    prog[38] = SRLI(22, 22, 1);
    prog[39] = JAL(0, (33 - 39) * 4);
    prog[40] = JALR(0, 1, 0);
    foreach (init[i]) init[i] = 8'd0;
    for (int n = 0; n < NY + NT; n++) begin
      logic [31:0] v;
      v = 32'(int'($urandom % 2001) - 1000);
      for (int b = 0; b < 4; b++) init['h100 + 4 * n + b] = v[8*b +: 8];
    end
    for (int k = 0; k < NT; k++) begin
      logic [31:0] v;
      v = 32'($urandom % 64);
      for (int b = 0; b < 4; b++) init['h280 + 4 * k + b] = v[8*b +: 8];
    end
  endfunction

  function automatic void fft_program();
    foreach (prog[i]) prog[i] = ADDI(0, 0, 0);
    prog[0]  = ADDI(5, 0, 4);              // half * 4
    prog[1]  = ADDI(6, 0, 2 * FFT_N);      // twiddle stride * 4
    prog[2]  = ADDI(7, 0, 0);              // group start * 4
    prog[3]  = ADDI(8, 0, 0);              // j * 4
    prog[4]  = ADDI(9, 0, 0);              // twiddle offset
    prog[5]  = ADD(24, 7, 8);              // a * 4
    prog[6]  = ADD(25, 24, 5);             // b * 4
    prog[7]  = LW(26, 9, WR);
    prog[8]  = LW(27, 9, WI);
    prog[9]  = LW(28, 25, XR);
    prog[10] = LW(29, 25, XI);
    prog[11] = ADDI(18, 26, 0); prog[12] = ADDI(19, 28, 0); prog[13] = JAL(1, (56 - 13) * 4);
    prog[14] = ADDI(30, 20, 0);
    prog[15] = ADDI(18, 27, 0); prog[16] = ADDI(19, 29, 0); prog[17] = JAL(1, (56 - 17) * 4);
    prog[18] = SUB(30, 30, 20);
    prog[19] = SRAI(30, 30, 15);           // tr = (wr*br - wi*bi) >> 15
    prog[20] = ADDI(18, 26, 0); prog[21] = ADDI(19, 29, 0); prog[22] = JAL(1, (56 - 22) * 4);
    prog[23] = ADDI(31, 20, 0);
    prog[24] = ADDI(18, 27, 0); prog[25] = ADDI(19, 28, 0); prog[26] = JAL(1, (56 - 26) * 4);
    prog[27] = ADD(31, 31, 20);
    prog[28] = SRAI(31, 31, 15);           // ti = (wr*bi + wi*br) >> 15
    prog[29] = LW(28, 24, XR);
    prog[30] = LW(29, 24, XI);
    prog[31] = SUB(18, 28, 30); prog[32] = SW(18, 25, XR);
    prog[33] = SUB(18, 29, 31); prog[34] = SW(18, 25, XI);
    prog[35] = ADD(18, 28, 30); prog[36] = SW(18, 24, XR);
    prog[37] = ADD(18, 29, 31); prog[38] = SW(18, 24, XI);
    prog[39] = ADDI(8, 8, 4);
    prog[40] = ADD(9, 9, 6);
    prog[41] = BNE(8, 5, (5 - 41) * 4);
    prog[42] = ADD(7, 7, 5);
    prog[43] = ADD(7, 7, 5);
    prog[44] = ADDI(11, 0, 4 * FFT_N);
    prog[45] = BNE(7, 11, (3 - 45) * 4);
    prog[46] = SLLI(5, 5, 1);
    prog[47] = SRAI(6, 6, 1);
    prog[48] = BNE(5, 11, (2 - 48) * 4);
    prog[49] = ADDI(12, 0, 1);
    prog[50] = SW(12, 0, 'h208);
    prog[51] = JAL(0, 0);
    prog[56] = ADDI(20, 0, 0);             // x20 = x18 * x19 by shift and add
    prog[57] = ADDI(21, 18, 0);
    prog[58] = ADDI(22, 19, 0);
    prog[59] = BEQ(22, 0, (66 - 59) * 4);
    prog[60] = ANDI(23, 22, 1);
    prog[61] = BEQ(23, 0, 8);
    prog[62] = ADD(20, 20, 21);
    prog[63] = SLLI(21, 21, 1);
    prog[64] = SRLI(22, 22, 1);
    prog[65] = JAL(0, (59 - 65) * 4);
    prog[66] = JALR(0, 1, 0);
    foreach (init[i]) init[i] = 8'd0;
    for (int n = 0; n < 2 * FFT_N; n++) begin
      logic [31:0] v;
      v = 32'(int'($urandom % 1001) - 500);
      for (int b = 0; b < 4; b++) init[XR + 4 * n + b] = v[8*b +: 8];
    end
    for (int k = 0; k < FFT_N / 2; k++) begin
      logic [31:0] c, sn;
      c  = 32'($rtoi($floor(32767.0 * $cos(2.0 * 3.14159265358979 * k / FFT_N) + 0.5)));
      sn = 32'(-$rtoi($floor(32767.0 * $sin(2.0 * 3.14159265358979 * k / FFT_N) + 0.5)));
      for (int b = 0; b < 4; b++) begin
        init[WR + 4 * k + b] = c[8*b +: 8];
        init[WI + 4 * k + b] = sn[8*b +: 8];
      end
    end
  endfunction

  task automatic load_program();
    for (int i = 0; i < 80; i++) begin
      @(negedge clk); prog_we = 1'b1; prog_addr = 13'(i); prog_data = prog[i];
    end
    @(negedge clk); prog_we = 1'b0;
  endtask

  task automatic load_data();
    for (int w = 0; w < 256; w++) begin
      @(negedge clk);
      host_we = 1'b1; host_addr = 13'(w);
      host_wdata = {init[4*w+3], init[4*w+2], init[4*w+1], init[4*w]};
    end
    @(negedge clk); host_we = 1'b0;
  endtask

  task automatic flip(input int target);
    int b;
    case (target)
      0: begin logic [31:0] v; v = dut.u_core.id_pc_q; b = $urandom % 32; v[b] = ~v[b];
               force dut.u_core.id_pc_q = v; #4; release dut.u_core.id_pc_q; end
      1: begin logic [31:0] v; v = dut.u_core.ie_pc_q; b = $urandom % 32; v[b] = ~v[b];
               force dut.u_core.ie_pc_q = v; #4; release dut.u_core.ie_pc_q; end
      2: begin dec_t v; v = dut.u_core.ie_dec_q; b = $urandom % $bits(dec_t); v[b] = ~v[b];
               force dut.u_core.ie_dec_q = v; #4; release dut.u_core.ie_dec_q; end
      3: begin wb_rec_t v; v = dut.u_core.wb_rec_q; b = $urandom % $bits(wb_rec_t); v[b] = ~v[b];
               force dut.u_core.wb_rec_q = v; #4; release dut.u_core.wb_rec_q; end
      4: begin logic [38:0] v; v = dut.u_imem.rd_q; b = $urandom % 39; v[b] = ~v[b];
               force dut.u_imem.rd_q = v; #4; release dut.u_imem.rd_q; end
      5: begin logic [38:0] v; v = dut.u_dmem.rd_q; b = $urandom % 39; v[b] = ~v[b];
               force dut.u_dmem.rd_q = v; #4; release dut.u_dmem.rd_q; end
      6: begin harc_t v; v = dut.u_core.id_harc_q; b = $urandom % 2; v[b] = ~v[b];
               force dut.u_core.id_harc_q = v; #4; release dut.u_core.id_harc_q; end
      7: begin harc_t v; v = dut.u_core.ie_harc_q; b = $urandom % 2; v[b] = ~v[b];
               force dut.u_core.ie_harc_q = v; #4; release dut.u_core.ie_harc_q; end
      8: begin harc_t v; v = dut.u_core.wb_harc_q; b = $urandom % 2; v[b] = ~v[b];
               force dut.u_core.wb_harc_q = v; #4; release dut.u_core.wb_harc_q; end
      9: begin int r; r = 1 + $urandom % 31; b = $urandom % 32;
               dut.u_core.u_rf_hart2.regs[r][b] = ~dut.u_core.u_rf_hart2.regs[r][b]; end
      10: begin int r; r = 1 + $urandom % 31; b = $urandom % 32;
               dut.u_core.u_rf_hart1.regs[r][b] = ~dut.u_core.u_rf_hart1.regs[r][b]; end
      default: case ($urandom % 3)
               0: begin force dut.u_core.id_valid_q = ~dut.u_core.id_valid_q; #4; release dut.u_core.id_valid_q; end
               1: begin force dut.u_core.ie_valid_q = ~dut.u_core.ie_valid_q; #4; release dut.u_core.ie_valid_q; end
               default: begin force dut.u_core.wb_valid_q = ~dut.u_core.wb_valid_q; #4; release dut.u_core.wb_valid_q; end
             endcase
    endcase
  endtask

  // One run; target < 0 means no faults.  Returns cycles (or -1 on timeout).
  int n_flips;
  task automatic run(input int target, input longint f_lo, input longint f_hi, input longint limit,
                     output longint cycles);
    longint start, next;
    bit finished;
    load_data();
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    host_re = 1'b1; host_addr = 13'(DONE_W);
    start = cyc;
    next = f_lo;
    finished = 1'b0;
    while (!finished && cyc - start < limit) begin
      @(negedge clk);
      if (host_rdata == 32'd1) finished = 1'b1;
      else if (target >= 0 && cyc - start >= next && cyc - start < f_hi && mode == MODE_NORMAL) begin
        flip(target);
        n_flips++;
        next = cyc - start + longint'(RATE);
      end
    end
    host_re = 1'b0;
    cycles = finished ? cyc - start : -1;
    @(negedge clk);
  endtask

  task automatic results_ok(input rv32i_iss iss, output bit ok);
    ok = 1'b1;
    for (int w = 'h100 / 4; w < 'h400 / 4; w++) begin
      @(negedge clk); host_re = 1'b1; host_addr = 13'(w);
      @(negedge clk); host_re = 1'b0;
      if (host_rdata != iss.rd32(32'(4 * w))) ok = 1'b0;
    end
  endtask

  // The kernel itself is checked once: the reference simulator's output must
  // be the DFT of the (bit-reversal reordered) input within rounding error.
  // Each of the log2(N) stages truncates its products by up to 2 LSB and later
  // stages amplify an error by at most 2, so the bound is 2 * (N - 1) < 64;
  // a wrong twiddle or index gives errors in the thousands.
  task automatic fft_against_dft();
    rv32i_iss iss;
    real maxerr;
    iss = new(80, 1024);
    foreach (prog[i]) iss.imem[i] = prog[i];
    foreach (init[i]) iss.dmem[i] = init[i];
    while (!(iss.imem[iss.pc[31:2]] == JAL(0, 0))) iss.step();
    maxerr = 0.0;
    for (int k = 0; k < FFT_N; k++) begin
      real sr, si, er, ei;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < FFT_N; n++) begin
        int r, xr, xi;
        real ang;
        r = 0;
        for (int b = 0; b < $clog2(FFT_N); b++) r |= ((n >> b) & 1) << ($clog2(FFT_N) - 1 - b);
        xr = int'({init[XR + 4*r + 3], init[XR + 4*r + 2], init[XR + 4*r + 1], init[XR + 4*r]});
        xi = int'({init[XI + 4*r + 3], init[XI + 4*r + 2], init[XI + 4*r + 1], init[XI + 4*r]});
        ang = 2.0 * 3.14159265358979 * n * k / FFT_N;
        sr += xr * $cos(ang) + xi * $sin(ang);
        si += xi * $cos(ang) - xr * $sin(ang);
      end
      er = real'(int'(iss.rd32(32'(XR + 4 * k)))) - sr;
      ei = real'(int'(iss.rd32(32'(XI + 4 * k)))) - si;
      if (er < 0.0) er = -er;
      if (ei < 0.0) ei = -ei;
      if (er > maxerr) maxerr = er;
      if (ei > maxerr) maxerr = ei;
    end
    $display("fft: largest difference to the exact DFT %0.1f", maxerr);
    chk(maxerr < 64.0, "fft kernel computes the DFT");
  endtask

  task automatic campaign(input string name);
    rv32i_iss iss;
    longint c0, c;
    bit ok;
    int fail_frames [NTARGET];
    iss = new(80, 1024);
    foreach (prog[i]) iss.imem[i] = prog[i];
    foreach (init[i]) iss.dmem[i] = init[i];
    while (!(iss.imem[iss.pc[31:2]] == JAL(0, 0))) iss.step();
    load_program();
    run(-1, 0, 0, 400000, c0);
    results_ok(iss, ok);
    $display("%s: %0d instructions, %0d cycles without faults", name, iss.steps, c0);
    chk(c0 > 0 && ok, {name, ": fault-free result"});
    chk(c0 <= 2 * iss.steps + 12, {name, ": one instruction every two cycles"});
    for (int t = 0; t < NTARGET; t++) begin
      int r0;
      fail_frames[t] = 0;
      n_flips = 0;
      r0 = int'(restores);
      for (int f = 0; f < M; f++) begin
        run(t, longint'(f) * c0 / longint'(M), (longint'(f) + 1) * c0 / longint'(M), 4 * c0 + 1000, c);
        results_ok(iss, ok);
        if (c < 0 || !ok) fail_frames[t]++;
      end
      $display("%s: target %-10s  %4d flips, failing frames %0d of %0d (Pf <= %0d%%)",
               name, TNAME[t], n_flips, fail_frames[t], M, 100 * fail_frames[t] / M);
      if (t < NPROT) chk(fail_frames[t] == 0, {name, ": no failing frame for ", TNAME[t]});
      chk(longint'(n_flips) >= longint'(M) * (c0 / longint'(M) / longint'(RATE)) / 2, {name, ": flips injected into ", TNAME[t]});
    end
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    crc_program();
    campaign("crc32");
    fir_program();
    campaign("fir");
    fft_program();
    fft_against_dft();
    campaign("fft");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
