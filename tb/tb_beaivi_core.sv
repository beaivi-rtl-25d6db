// Core test with a keyword-spotting style kernel: the dot product of two
// 32-element int8 vectors, computed twice. First in RISC-V mode as a scalar
// loop (byte loads, multiply, add; exercises bypassing, load and multiply
// stalls and taken-branch flushes), then, after a switch to exposed-datapath
// mode, as a software-scheduled loop of nine words that processes four
// elements per iteration with the SIMD dot-product-accumulate operation,
// operand registers that persist across iterations, and a branch with two
// filled delay slots. Back in RISC-V mode the two results are compared and
// the difference stored. Between the two, the exposed-datapath loop runs a
// second time from three compressed bundles: the testbench builds the five
// dictionaries from the nine loop words, and the program loads them with a
// header and fill words. The test bench holds the instruction and data
// memories and loads them through their second ports; random input data,
// the reference result is computed here.
module tb_beaivi_core;
  import beaivi_pkg::*;
  import beaivi_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [12:0] imem_addr;
  logic [63:0] imem_rdata;
  logic dmem_req, dmem_we;
  logic [13:0] dmem_addr;
  logic [3:0] dmem_be;
  logic [31:0] dmem_wdata, dmem_rdata;
  logic rv_mode, ev_bypass, ev_stall, ev_flush, ev_mode_switch;
  logic ev_dict_header, ev_dict_fill, ev_compressed, ev_guard_off;
  // host side of the memories
  logic ib_req = 0, ib_we = 0, db_req = 0, db_we = 0;
  logic [12:0] ib_addr = '0;
  logic [13:0] db_addr = '0;
  logic [63:0] ib_wdata = '0, ib_rdata;
  logic [31:0] db_wdata = '0, db_rdata;

  int checks = 0, failures = 0;
  int n_bypass = 0, n_stall = 0, n_flush = 0, n_mode = 0, cyc_rv = 0, cyc_tta = 0;

  always #5 clk = ~clk;

  beaivi_core dut (.*);
  beaivi_imem u_imem (.clk, .a_addr(imem_addr), .a_rdata(imem_rdata), .b_req(ib_req), .b_we(ib_we),
                      .b_addr(ib_addr), .b_wdata(ib_wdata), .b_rdata(ib_rdata));
  beaivi_dmem u_dmem (.clk, .a_req(dmem_req), .a_we(dmem_we), .a_addr(dmem_addr), .a_be(dmem_be),
                      .a_wdata(dmem_wdata), .a_rdata(dmem_rdata), .b_req(db_req), .b_we(db_we),
                      .b_addr(db_addr), .b_be(4'hF), .b_wdata(db_wdata), .b_rdata(db_rdata));

  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n) begin
    n_bypass += int'(ev_bypass);
    n_stall  += int'(ev_stall);
    n_flush  += int'(ev_flush);
    n_mode   += int'(ev_mode_switch);
    n_comp   += int'(ev_compressed);
    if (rv_mode) cyc_rv++; else cyc_tta++;
  end

  function automatic logic [31:0] lb(input logic [4:0] rd, rs1, input int imm);
    return rv_i(imm, rs1, 3'b000, rd, 7'b0000011);
  endfunction

  logic [31:0] rv [int];
  logic [63:0] tta [int];
  logic [7:0] va [32], vb [32];
  int expd, a;
  int n_comp = 0;

  // Build dictionaries for the nine-word loop at "src": per slot, each
  // distinct move gets the next entry. Writes the header, the fill words, the
  // loop-target setup and three bundles from "dst" on; "next" returns the
  // address after them.
  task automatic compress_loop(input int src, input int dst, output int next);
    move_t [NSLOTS-1:0] m [9];
    move_t dict [NSLOTS][$];
    int idx [9][NSLOTS];
    int n = 0, lc;
    logic [19:0] c [9];
    for (int i = 0; i < 9; i++) begin
      m[i] = unpack_moves(tta[src + 8 * i]);
      for (int s = 0; s < NSLOTS; s++) begin
        idx[i][s] = -1;
        foreach (dict[s][e]) if (dict[s][e] == m[i][s]) idx[i][s] = e;
        if (idx[i][s] < 0) begin idx[i][s] = dict[s].size(); dict[s].push_back(m[i][s]); end
      end
    end
    for (int s = 0; s < NSLOTS; s++) if (dict[s].size() > n) n = dict[s].size();
    tta[dst] = header(n);
    for (int k = 0; k < n; k++) begin
      move_t [NSLOTS-1:0] f;
      for (int s = 0; s < NSLOTS; s++) f[s] = (k < dict[s].size()) ? dict[s][k] : MOVE_NOP;
      tta[dst + 8 + 8 * k] = fill(f[4], f[3], f[2], f[1], f[0]);
    end
    lc = dst + 8 + 8 * n + 16;
    tta[lc - 16] = limm(lc);
    tta[lc - 8]  = unc(nop(), nop(), nop(), mv(S_IMM, D_CU_O2), nop());
    for (int i = 0; i < 9; i++) c[i] = cidx(idx[i][4], idx[i][3], idx[i][2], idx[i][1], idx[i][0]);
    for (int b = 0; b < 3; b++) tta[lc + 8 * b] = bundle(c[3 * b + 2], c[3 * b + 1], c[3 * b]);
    next = lc + 24;
  endtask

  task automatic dwrite(input int byte_addr, input logic [31:0] d);
    @(negedge clk);
    db_req = 1; db_we = 1; db_addr = 14'(byte_addr >> 2); db_wdata = d;
    @(negedge clk);
    db_req = 0; db_we = 0;
  endtask

  task automatic dexpect(input int byte_addr, input logic [31:0] e, input string what);
    @(negedge clk);
    db_req = 1; db_we = 0; db_addr = 14'(byte_addr >> 2);
    @(negedge clk);
    db_req = 0;
    checks++;
    if (db_rdata !== e) begin failures++; $display("FAIL %s: %0d expected %0d", what, $signed(db_rdata), $signed(e)); end
  endtask

  task automatic expect_count(input int n, input string what);
    checks++;
    if (n < 1) begin failures++; $display("FAIL never happened: %s", what); end
  endtask

  initial begin
    // scalar RISC-V loop
    rv[32'h00] = addi(1, 0, 32'h400);
    rv[32'h04] = addi(2, 0, 32'h500);
    rv[32'h08] = addi(3, 0, 32);
    rv[32'h0C] = addi(4, 0, 0);
    rv[32'h10] = lb(5, 1, 0);
    rv[32'h14] = lb(6, 2, 0);
    rv[32'h18] = mul(7, 5, 6);
    rv[32'h1C] = add(4, 4, 7);
    rv[32'h20] = addi(1, 1, 1);
    rv[32'h24] = addi(2, 2, 1);
    rv[32'h28] = addi(3, 3, -1);
    rv[32'h2C] = bne(3, 0, -28);
    rv[32'h30] = sw(4, 0, 32'h600);
    rv[32'h34] = addi(10, 0, 32'h400);
    rv[32'h38] = addi(11, 0, 32'h500);
    rv[32'h3C] = addi(12, 0, 8);
    rv[32'h40] = addi(13, 0, 0);
    rv[32'h44] = swtta(32'h100 - 32'h44);
    // exposed-datapath loop; r10/r11 pointers, r12 count, r13 accumulator
    tta[32'h100] = limm(32'h110);
    tta[32'h108] = unc(nop(), nop(), nop(), mv(S_IMM, D_CU_O2), nop());
    tta[32'h110] = unc(mv(rf(13), D_SIMD_O2), nop(), nop(), mv(simm(0), D_LSU_T + 7'(LS_LW)), mv(rf(10), D_LSU_O2));
    tta[32'h118] = unc(mv(rf(10), D_ALU_O1), nop(), nop(), mv(simm(0), D_LSU_T + 7'(LS_LW)), mv(rf(11), D_LSU_O2));
    tta[32'h120] = unc(nop(), nop(), nop(), mv(simm(4), D_ALU_T + 7'(ALU_ADD)), mv(S_LSU, D_SIMD_O1));
    tta[32'h128] = unc(mv(rf(11), D_ALU_O1), nop(), nop(), mv(S_ALU, rfw(10)), mv(S_LSU, D_SIMD_T + 7'(SI_DOT_S8)));
    tta[32'h130] = unc(nop(), nop(), nop(), mv(simm(4), D_ALU_T + 7'(ALU_ADD)), nop());
    tta[32'h138] = unc(mv(rf(12), D_ALU_O1), nop(), nop(), mv(simm(-1), D_ALU_T + 7'(ALU_ADD)), mv(S_ALU, rfw(11)));
    tta[32'h140] = unc(nop(), nop(), mv(S_ALU, D_CU_O1), mv(simm(0), D_CU_T + 7'(CU_BNE)), mv(S_ALU, rfw(12)));
    tta[32'h148] = unc(mv(S_SIMD, rfw(13)), nop(), nop(), nop(), nop());   // delay slot
    tta[32'h150] = unc(nop(), nop(), nop(), nop(), nop());                 // delay slot
    tta[32'h158] = limm(32'h604);
    tta[32'h160] = unc(mv(simm(0), D_LSU_T + 7'(LS_SW)), nop(), nop(), mv(S_IMM, D_LSU_O2), mv(rf(13), D_LSU_O1));
    // the same loop again, compressed: reload the pointers, program the
    // dictionaries from the nine loop words, run it as three bundles
    tta[32'h168] = limm(32'h400);
    tta[32'h170] = unc(nop(), nop(), nop(), nop(), mv(S_IMM, rfw(10)));
    tta[32'h178] = limm(32'h500);
    tta[32'h180] = unc(nop(), nop(), nop(), nop(), mv(S_IMM, rfw(11)));
    tta[32'h188] = limm(32'd8);
    tta[32'h190] = unc(nop(), nop(), nop(), nop(), mv(S_IMM, rfw(12)));
    tta[32'h198] = unc(nop(), nop(), nop(), nop(), mv(simm(0), rfw(13)));
    compress_loop(32'h110, 32'h1A0, a);
    tta[a]      = limm(32'h60C);
    tta[a + 8]  = unc(mv(simm(0), D_LSU_T + 7'(LS_SW)), nop(), nop(), mv(S_IMM, D_LSU_O2), mv(rf(13), D_LSU_O1));
    tta[a + 16] = limm(32'h80);
    tta[a + 24] = unc(nop(), nop(), nop(), mv(S_IMM, D_CU_T + 7'(CU_SWRV)), nop());
    tta[a + 32] = unc(nop(), nop(), nop(), nop(), nop());
    tta[a + 40] = unc(nop(), nop(), nop(), nop(), nop());
    // compare in RISC-V mode
    rv[32'h80] = lw(20, 0, 32'h600);
    rv[32'h84] = lw(21, 0, 32'h604);
    rv[32'h88] = sub(22, 20, 21);
    rv[32'h8C] = sw(22, 0, 32'h608);
    rv[32'h90] = lw(23, 0, 32'h60C);
    rv[32'h94] = sub(24, 20, 23);
    rv[32'h98] = sw(24, 0, 32'h610);
    rv[32'h9C] = jal(0, 0);

    for (int w = 0; w < 32'h300; w += 8) begin
      @(negedge clk);
      ib_req = 1; ib_we = 1; ib_addr = 13'(w >> 3);
      if (tta.exists(w)) ib_wdata = tta[w];
      else ib_wdata = {rv.exists(w + 4) ? rv[w + 4] : 32'h13, rv.exists(w) ? rv[w] : 32'h13};
    end
    @(negedge clk); ib_req = 0; ib_we = 0;
    expd = 0;
    for (int i = 0; i < 32; i++) begin
      va[i] = 8'($urandom); vb[i] = 8'($urandom);
      expd += int'($signed(va[i])) * int'($signed(vb[i]));
    end
    for (int w = 0; w < 8; w++) begin
      dwrite(32'h400 + 4 * w, {va[4*w+3], va[4*w+2], va[4*w+1], va[4*w]});
      dwrite(32'h500 + 4 * w, {vb[4*w+3], vb[4*w+2], vb[4*w+1], vb[4*w]});
    end
    dwrite(32'h608, 32'hDEAD);
    @(negedge clk); rst_n = 1;
    repeat (2000) @(negedge clk);
    dexpect(32'h600, expd, "scalar RISC-V dot product");
    dexpect(32'h604, expd, "SIMD exposed-datapath dot product");
    dexpect(32'h608, 0, "difference computed in RISC-V mode");
    expect_count(n_bypass, "bypass");
    expect_count(n_stall, "stall");
    expect_count(n_flush - 30, "flush per taken branch");
    dexpect(32'h610, 0, "compressed loop result equals the scalar one");
    expect_count(n_mode - 1, "two mode switches");
    checks++;
    if (n_comp != 72) begin failures++; $display("FAIL %0d compressed instructions executed, expected 8 x 9", n_comp); end
    $display("  cycles: RISC-V %0d, exposed datapath %0d", cyc_rv, cyc_tta);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
