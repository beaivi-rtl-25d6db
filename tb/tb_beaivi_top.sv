// End-to-end test of the Beaivi subsystem at its full default size.
//
// The host port loads a program that starts in RISC-V mode (ALU operations
// with bypassing, a multiply and a load that stall the pipeline, a counted
// loop whose taken branches flush, a custom SIMD instruction, a jump-and-link)
// and switches into exposed-datapath mode. There it programs the dictionaries
// with a header and two fill words, runs a compressed bundle, uses guarded
// moves, a long immediate, a ternary dot-product, and switches back to
// RISC-V mode through a jump with two delay slots. Results are stored to the
// data memory and read back through the host port; the expected values are
// worked out by hand in the comments below. Every mechanism is counted and
// must have happened at least once. Finally a short RISC-V kernel runs from
// the test register banks while a scratchpad word is checked to stay intact.
module tb_beaivi_top;
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
  int n_bypass = 0, n_stall = 0, n_flush = 0, n_mode = 0, n_hdr = 0, n_fill = 0;
  int n_comp = 0, n_guard = 0, n_tta_cycles = 0, n_bank = 0;

  always #5 clk = ~clk;

  beaivi_top dut (.*);

  always @(posedge clk) if (run) begin
    n_bypass += int'(ev_bypass);
    n_stall  += int'(ev_stall);
    n_flush  += int'(ev_flush);
    n_mode   += int'(ev_mode_switch);
    n_hdr    += int'(ev_dict_header);
    n_fill   += int'(ev_dict_fill);
    n_comp   += int'(ev_compressed);
    n_guard  += int'(ev_guard_off);
    n_tta_cycles += int'(!rv_mode);
  end

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] rv [int];
  logic [63:0] tta [int];

  task automatic host_write(input logic sel, input int addr, input logic [63:0] d);
    @(negedge clk);
    host_req = 1'b1; host_we = 1'b1; host_sel = sel; host_addr = 16'(addr); host_wdata = d;
    @(negedge clk);
    host_req = 1'b0; host_we = 1'b0;
  endtask

  task automatic host_read(input logic sel, input int addr, output logic [63:0] d);
    @(negedge clk);
    host_req = 1'b1; host_we = 1'b0; host_sel = sel; host_addr = 16'(addr);
    @(negedge clk);
    host_req = 1'b0;
    d = host_rdata;
  endtask

  task automatic expect_word(input int addr, input logic [31:0] exp, input string what);
    logic [63:0] d;
    host_read(1'b1, addr, d);
    checks++;
    if (d[31:0] !== exp) begin
      failures++;
      $display("FAIL %s: mem[%h] = %0d (%h), expected %0d", what, addr, d[31:0], d[31:0], exp);
    end
  endtask

  task automatic expect_count(input int n, input string what);
    checks++;
    if (n < 1) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else $display("  %-26s %0d", what, n);
  endtask

  initial begin
    // ---------------- RISC-V program at 0x000
    rv[32'h00] = addi(1, 0, 100);
    rv[32'h04] = addi(2, 0, 23);
    rv[32'h08] = add(3, 1, 2);            // 123, x2 bypassed
    rv[32'h0C] = sub(4, 3, 1);            // 23, x3 bypassed
    rv[32'h10] = mul(5, 3, 4);            // 2829, stalls
    rv[32'h14] = addi(6, 5, 1);           // 2830, from the multiplier
    rv[32'h18] = lui(7, 1);               // 0x1000
    rv[32'h1C] = sw(6, 7, 0);             // [0x1000] = 2830
    rv[32'h20] = lw(8, 7, 0);             // stalls
    rv[32'h24] = addi(8, 8, 5);           // 2835
    rv[32'h28] = sw(8, 7, 4);             // [0x1004] = 2835, store data bypassed
    rv[32'h2C] = addi(9, 0, 3);
    rv[32'h30] = addi(10, 0, 0);
    rv[32'h34] = addi(10, 10, 7);         // loop body
    rv[32'h38] = addi(9, 9, -1);
    rv[32'h3C] = bne(9, 0, -8);           // taken twice
    rv[32'h40] = sw(10, 7, 8);            // [0x1008] = 21
    rv[32'h44] = simd(SI_SATSUBU8, 11, 1, 2);  // 100 - 23 = 77 in byte 0
    rv[32'h48] = sw(11, 7, 12);           // [0x100C] = 77
    rv[32'h4C] = jal(13, 8);              // to 0x54, x13 = 0x50
    rv[32'h50] = addi(10, 0, 999);        // squashed
    rv[32'h54] = sw(13, 7, 16);           // [0x1010] = 0x50
    rv[32'h58] = sw(10, 7, 20);           // [0x1014] = 21
    rv[32'h5C] = swtta(32'h100 - 32'h5C); // exposed-datapath code at 0x100
    rv[32'h60] = addi(10, 0, 555);        // squashed
    // ---------------- exposed-datapath program at 0x100
    tta[32'h100] = unc(mv(simm(3), D_ALU_O1), nop(), nop(), mv(rf(1), D_ALU_T + 7'(ALU_ADD)), nop()); // ALU = 103
    tta[32'h108] = header(2);
    // dictionary entry 0: ALU.out -> r21 ; entry 1: r21 -> ALU.o1, 2 -> ALU.add
    tta[32'h110] = fill(mv(S_ALU, rfw(21)), nop(), nop(), nop(), nop());
    tta[32'h118] = fill(mv(rf(21), D_ALU_O1), nop(), nop(), mv(simm(2), D_ALU_T + 7'(ALU_ADD)), nop());
    // bundle: r21 = 103 ; ALU = 105 ; r21 = 105
    tta[32'h120] = bundle(cidx(0,0,0,0,0), cidx(1,0,0,1,0), cidx(0,0,0,0,0));
    tta[32'h128] = unc(mv(simm(1), D_B0), nop(), nop(), nop(), nop());
    tta[32'h130] = unc(mv(simm(7), rfw(22), 2'd1), nop(), nop(), mv(simm(-1), rfw(23), 2'd2), nop());
    tta[32'h138] = limm(32'h1020);
    tta[32'h140] = unc(mv(rf(21), D_LSU_O1), mv(S_IMM, D_LSU_O2), nop(), mv(simm(0), D_LSU_T + 7'(LS_SW)), nop()); // [0x1020]=105
    tta[32'h148] = unc(mv(rf(22), D_LSU_O1), nop(), nop(), mv(S_IMM, D_LSU_T + 7'(LS_SW)), mv(simm(4), D_LSU_O2)); // [0x1024]=7
    tta[32'h150] = unc(mv(rf(23), D_LSU_O1), nop(), nop(), mv(S_IMM, D_LSU_T + 7'(LS_SW)), mv(simm(-8), D_LSU_O2)); // [0x1018]=0
    // 100*23 + 105 = 2405 (ALU still holds 105)
    tta[32'h158] = unc(mv(rf(1), D_SIMD_O1), nop(), nop(), mv(rf(2), D_SIMD_T + 7'(SI_DOT_S8)), mv(S_ALU, D_SIMD_O2));
    tta[32'h160] = limm(32'h1028);
    tta[32'h168] = unc(nop(), mv(S_IMM, D_LSU_O2), nop(), mv(simm(4), D_LSU_T + 7'(LS_SW)), mv(S_SIMD, D_LSU_O1)); // [0x102C]
    tta[32'h170] = limm(32'h200);
    tta[32'h178] = unc(nop(), nop(), nop(), mv(S_IMM, D_CU_T + 7'(CU_SWRV)), nop());
    tta[32'h180] = unc(mv(simm(1), rfw(25)), nop(), nop(), nop(), nop());   // delay slot 1
    tta[32'h188] = unc(mv(simm(2), rfw(26)), nop(), nop(), nop(), nop());   // delay slot 2
    tta[32'h190] = unc(mv(simm(3), rfw(27)), nop(), nop(), nop(), nop());   // not reached
    // ---------------- RISC-V again at 0x200
    rv[32'h200] = sw(25, 7, 48);          // [0x1030] = 1
    rv[32'h204] = sw(26, 7, 52);          // [0x1034] = 2
    rv[32'h208] = sw(27, 7, 56);          // [0x1038] = 0
    rv[32'h20C] = jal(0, 0);              // stop

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 32'h300; a += 8) begin
      logic [63:0] w;
      if (tta.exists(a)) w = tta[a];
      else w = {rv.exists(a + 4) ? rv[a + 4] : 32'h13, rv.exists(a) ? rv[a] : 32'h13};
      host_write(1'b0, a, w);
    end
    @(negedge clk);
    run = 1'b1;
    repeat (400) @(negedge clk);
    run = 1'b0;

    expect_word(32'h1000, 2830, "mul + bypass");
    expect_word(32'h1004, 2835, "load + bypass");
    expect_word(32'h1008, 21, "loop");
    expect_word(32'h100C, 77, "satsubu8");
    expect_word(32'h1010, 32'h50, "jal link");
    expect_word(32'h1014, 21, "jal flush");
    expect_word(32'h1020, 105, "compressed bundle");
    expect_word(32'h1024, 7, "guard true");
    expect_word(32'h1018, 0, "guard false");
    expect_word(32'h102C, 2405, "sataccdot");
    expect_word(32'h1030, 1, "delay slot 1");
    expect_word(32'h1034, 2, "delay slot 2");
    expect_word(32'h1038, 0, "after delay slots");

    // ---------------- a short kernel from the test register banks
    host_write(1'b1, 32'h10, 64'h5555);         // scratchpad word that must stay untouched
    bank_sel = 1'b1;
    host_write(1'b0, 32'h00, {addi(2, 0, 32'h1F0), addi(1, 0, 42)});
    host_write(1'b0, 32'h08, {lw(3, 0, 32'h10), sw(1, 0, 32'h10)});
    host_write(1'b0, 32'h10, {sw(3, 2, 12), addi(3, 3, 1)});
    host_write(1'b0, 32'h18, {32'h13, jal(0, 0)});
    @(negedge clk);
    run = 1'b1;
    repeat (60) @(negedge clk);
    run = 1'b0;
    n_bank = int'(bank_sel);
    expect_word(32'h10, 42, "register bank store");
    expect_word(32'h1FC, 43, "register bank load");
    bank_sel = 1'b0;
    expect_word(32'h10, 32'h5555, "scratchpad idle while banks run");

    expect_count(n_bypass, "bypass");
    expect_count(n_stall, "multi-cycle stall");
    expect_count(n_flush, "flush");
    expect_count(n_mode - 1, "mode switch (both ways)");
    expect_count(n_hdr, "dictionary header");
    expect_count(n_fill - 1, "dictionary fill (2)");
    expect_count(n_comp - 2, "compressed bundle (3 cycles)");
    expect_count(n_guard, "guard squash");
    expect_count(n_tta_cycles, "exposed-datapath cycles");
    expect_count(n_bank, "run from register banks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
