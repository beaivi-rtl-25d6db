// Workload-style test of the full subsystem (default sizes) with the DSP
// operations of two image kernels, on random data checked against reference
// arithmetic written here:
//  - a DCT butterfly in RISC-V mode with the custom SIMD instructions: for
//    eight pairs of packed 16-bit words, s = ADDRHI_S16(x, y) and
//    d = MULRHI16(SUBRHI_S16(x, y), cos(pi/4) in Q15);
//  - a texture-compression error metric in RISC-V mode: per byte
//    |a - b| = SATSUBU8(a, b) | SATSUBU8(b, a), scaled with SHRRU8 by 2;
//  - then, in exposed-datapath mode, the operations RISC-V code cannot
//    issue: the scaled errors are summed with SATACCDOT (unsigned 8x4,
//    accumulator kept in the operand register), the sum is bit-reversed with
//    REFLECT, and SHUFFLE2 interleaves the first s and d words.
module tb_beaivi_kernels;
  import beaivi_pkg::*;
  import beaivi_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, bank_sel = 1'b0;
  logic host_req = 1'b0, host_we = 1'b0, host_sel = 1'b0;
  logic [15:0] host_addr = '0;
  logic [3:0]  host_be = 4'hF;
  logic [63:0] host_wdata = '0, host_rdata;
  logic rv_mode, ev_bypass, ev_stall, ev_flush, ev_mode_switch;
  logic ev_dict_header, ev_dict_fill, ev_compressed, ev_guard_off;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  beaivi_top dut (.*);

  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [31:0] rv [int];
  logic [63:0] tta [int];
  logic [31:0] xv [8], yv [8], s_exp [8], d_exp [8], e_exp [8];
  logic [31:0] sum_exp, refl_exp, shuf_exp;

  task automatic host_write(input logic sel, input int addr, input logic [63:0] d);
    @(negedge clk);
    host_req = 1'b1; host_we = 1'b1; host_sel = sel; host_addr = 16'(addr); host_wdata = d;
    @(negedge clk);
    host_req = 1'b0; host_we = 1'b0;
  endtask

  task automatic expect_word(input int addr, input logic [31:0] exp, input string what);
    @(negedge clk);
    host_req = 1'b1; host_we = 1'b0; host_sel = 1'b1; host_addr = 16'(addr);
    @(negedge clk);
    host_req = 1'b0;
    checks++;
    if (host_rdata[31:0] !== exp) begin
      failures++;
      $display("FAIL %s: mem[%h] = %h, expected %h", what, addr, host_rdata[31:0], exp);
    end
  endtask

  function automatic logic [31:0] orr(input logic [4:0] rd, rs1, rs2);
    return rv_r(7'd0, rs2, rs1, 3'b110, rd, 7'b0110011);
  endfunction

  // reference arithmetic, one 16-bit lane or byte at a time
  function automatic logic [15:0] l16(input logic [31:0] w, input int i);
    return w[16*i +: 16];
  endfunction
  function automatic int sx16(input logic [15:0] v);
    return int'($signed(v));
  endfunction

  int a;
  initial begin
    for (int i = 0; i < 8; i++) begin
      xv[i] = $urandom; yv[i] = $urandom;
      for (int l = 0; l < 2; l++) begin
        automatic int x = sx16(l16(xv[i], l)), y = sx16(l16(yv[i], l));
        automatic int s = (x + y + 1) >>> 1;
        automatic int t = (x - y + 1) >>> 1;
        automatic int m = (sx16(16'(t)) * 23170 + 32768) >>> 16;
        s_exp[i][16*l +: 16] = 16'(s);
        d_exp[i][16*l +: 16] = 16'(m);
      end
      for (int b = 0; b < 4; b++) begin
        automatic int p = int'(xv[i][8*b +: 8]), q = int'(yv[i][8*b +: 8]);
        automatic int e = (p > q) ? p - q : q - p;
        automatic int r = (e + 2) >> 2;
        e_exp[i][8*b +: 8] = 8'((r > 255) ? 255 : r);
      end
    end
    sum_exp = 0;
    for (int i = 0; i < 8; i++) for (int b = 0; b < 4; b++) sum_exp += 32'(e_exp[i][8*b +: 8]);
    for (int k = 0; k < 32; k++) refl_exp[k] = sum_exp[31 - k];
    shuf_exp = {d_exp[0][15:0], s_exp[0][15:0]};

    // DCT butterfly, RISC-V mode
    rv[32'h00] = addi(1, 0, 32'h400);
    rv[32'h04] = addi(2, 0, 32'h500);
    rv[32'h08] = addi(3, 0, 32'h600);
    rv[32'h0C] = addi(4, 0, 32'h700);
    rv[32'h10] = lui(9, 32'h5A826);
    rv[32'h14] = addi(9, 9, -1406);          // 0x5A825A82: 23170 in both lanes
    rv[32'h18] = addi(10, 0, 8);
    rv[32'h1C] = lw(5, 1, 0);
    rv[32'h20] = lw(6, 2, 0);
    rv[32'h24] = simd(SI_ADDRHI_S16, 7, 5, 6);
    rv[32'h28] = simd(SI_SUBRHI_S16, 8, 5, 6);
    rv[32'h2C] = simd(SI_MULRHI16, 8, 8, 9);
    rv[32'h30] = sw(7, 3, 0);
    rv[32'h34] = sw(8, 4, 0);
    rv[32'h38] = addi(1, 1, 4);
    rv[32'h3C] = addi(2, 2, 4);
    rv[32'h40] = addi(3, 3, 4);
    rv[32'h44] = addi(4, 4, 4);
    rv[32'h48] = addi(10, 10, -1);
    rv[32'h4C] = bne(10, 0, -48);
    // absolute byte differences, RISC-V mode
    rv[32'h50] = addi(1, 0, 32'h400);
    rv[32'h54] = addi(2, 0, 32'h500);
    rv[32'h58] = addi(3, 0, 32'h780);
    rv[32'h5C] = addi(10, 0, 8);
    rv[32'h60] = addi(11, 0, 2);
    rv[32'h64] = lw(5, 1, 0);
    rv[32'h68] = lw(6, 2, 0);
    rv[32'h6C] = simd(SI_SATSUBU8, 7, 5, 6);
    rv[32'h70] = simd(SI_SATSUBU8, 8, 6, 5);
    rv[32'h74] = orr(7, 7, 8);
    rv[32'h78] = simd(SI_SHRRU8, 7, 7, 11);
    rv[32'h7C] = sw(7, 3, 0);
    rv[32'h80] = addi(1, 1, 4);
    rv[32'h84] = addi(2, 2, 4);
    rv[32'h88] = addi(3, 3, 4);
    rv[32'h8C] = addi(10, 10, -1);
    rv[32'h90] = bne(10, 0, -44);
    rv[32'h94] = swtta(32'h100 - 32'h94);
    // exposed datapath: sum of errors, reflect, shuffle
    a = 32'h100;
    tta[a] = limm(32'h0101_0101); a += 8;
    tta[a] = unc(mv(S_IMM, rfw(14)), nop(), nop(), nop(), mv(simm(0), D_SIMD_O2)); a += 8;
    for (int i = 0; i < 8; i++) begin
      tta[a] = limm(32'h780 + 4 * i); a += 8;
      tta[a] = unc(mv(simm(0), D_LSU_T + 7'(LS_LW)), nop(), nop(), mv(S_IMM, D_LSU_O2), nop()); a += 8;
      tta[a] = unc(nop(), nop(), nop(), nop(), nop()); a += 8;
      tta[a] = unc(mv(rf(14), D_SIMD_T + 7'(SI_DOT_U8)), nop(), nop(), nop(), mv(S_LSU, D_SIMD_O1)); a += 8;
      tta[a] = unc(nop(), nop(), nop(), nop(), nop()); a += 8;
      tta[a] = unc(nop(), nop(), nop(), nop(), mv(S_SIMD, D_SIMD_O2)); a += 8;
    end
    tta[a] = limm(32'h7C0); a += 8;
    tta[a] = unc(mv(simm(0), D_LSU_T + 7'(LS_SW)), nop(), mv(S_SIMD, D_SIMD_O1), mv(S_IMM, D_LSU_O2), mv(S_SIMD, D_LSU_O1)); a += 8;
    tta[a] = unc(mv(simm(0), D_SIMD_T + 7'(SI_REFLECT)), nop(), nop(), nop(), nop()); a += 8;
    tta[a] = unc(nop(), nop(), nop(), nop(), nop()); a += 8;
    tta[a] = limm(32'h7C4); a += 8;
    tta[a] = unc(mv(simm(0), D_LSU_T + 7'(LS_SW)), nop(), nop(), mv(S_IMM, D_LSU_O2), mv(S_SIMD, D_LSU_O1)); a += 8;
    tta[a] = limm(32'h700); a += 8;
    tta[a] = unc(mv(simm(0), D_LSU_T + 7'(LS_LW)), nop(), nop(), mv(S_IMM, D_LSU_O2), nop()); a += 8;
    tta[a] = limm(32'h600); a += 8;
    tta[a] = unc(mv(simm(0), D_LSU_T + 7'(LS_LW)), nop(), nop(), mv(S_IMM, D_LSU_O2), mv(S_LSU, D_SIMD_O1)); a += 8;
    tta[a] = unc(nop(), nop(), nop(), nop(), nop()); a += 8;
    tta[a] = unc(mv(S_LSU, D_SIMD_T + 7'(SI_SHUF16)), nop(), nop(), nop(), mv(simm(2), D_SIMD_O2)); a += 8;
    tta[a] = unc(nop(), nop(), nop(), nop(), nop()); a += 8;
    tta[a] = limm(32'h7C8); a += 8;
    tta[a] = unc(mv(simm(0), D_LSU_T + 7'(LS_SW)), nop(), nop(), mv(S_IMM, D_LSU_O2), mv(S_SIMD, D_LSU_O1)); a += 8;
    tta[a] = limm(32'h380); a += 8;
    tta[a] = unc(nop(), nop(), nop(), mv(S_IMM, D_CU_T + 7'(CU_SWRV)), nop()); a += 8;
    tta[a] = unc(nop(), nop(), nop(), nop(), nop()); a += 8;
    tta[a] = unc(nop(), nop(), nop(), nop(), nop()); a += 8;
    rv[32'h380] = jal(0, 0);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 32'h388; w += 8) begin
      logic [63:0] d;
      if (tta.exists(w)) d = tta[w];
      else d = {rv.exists(w + 4) ? rv[w + 4] : 32'h13, rv.exists(w) ? rv[w] : 32'h13};
      host_write(1'b0, w, d);
    end
    for (int i = 0; i < 8; i++) begin
      host_write(1'b1, 32'h400 + 4 * i, {32'd0, xv[i]});
      host_write(1'b1, 32'h500 + 4 * i, {32'd0, yv[i]});
    end
    @(negedge clk);
    run = 1'b1;
    repeat (900) @(negedge clk);
    run = 1'b0;
    for (int i = 0; i < 8; i++) begin
      expect_word(32'h600 + 4 * i, s_exp[i], "ADDRHI_S16");
      expect_word(32'h700 + 4 * i, d_exp[i], "SUBRHI_S16 + MULRHI16");
      expect_word(32'h780 + 4 * i, e_exp[i], "SATSUBU8 + SHRRU8");
    end
    expect_word(32'h7C0, sum_exp, "SATACCDOT sum");
    expect_word(32'h7C4, refl_exp, "REFLECT");
    expect_word(32'h7C8, shuf_exp, "SHUFFLE2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
