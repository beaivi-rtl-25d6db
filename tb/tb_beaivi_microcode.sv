// Unit test of the RISC-V microcode unit: checks the moves generated for
// ALU, immediate, multiply, load, store, branch, JAL, LUI/AUIPC, custom SIMD
// and SWTTA instructions; the delayed result move (rd_move) in slot 0 of the
// next instruction; operand bypassing from the previous result; the stall of
// LAT-1 cycles after a multi-cycle operation (2 for a multiply, 1 for a
// load); the flush that keeps only the pending result move; and the direct
// unpacking of exposed-datapath words.
module tb_beaivi_microcode;
  import beaivi_pkg::*;
  import beaivi_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid, rv_mode, flush, stall, ev_bypass, ev_stall;
  logic [63:0] word;
  logic [31:0] pc;
  dec_instr_t out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  beaivi_microcode dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit is(input move_t m, input logic [5:0] s, input logic [6:0] d);
    return m.src == s && m.dst == d && m.guard == 0;
  endfunction

  // present one instruction at the negedge and look at the decode output
  task automatic present(input logic [31:0] ins, input logic [31:0] a);
    @(negedge clk);
    pc = a; word = a[2] ? {ins, 32'h13} : {32'h13, ins}; flush = 0;
    #1;
  endtask

  initial begin
    valid = 0; rv_mode = 1; flush = 0; word = '0; pc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1; valid = 1;
    present(addi(1, 0, 5), 32'h0);
    chk(is(out.moves[4], 6'd0, D_ALU_O1) && is(out.moves[1], S_IMM, D_ALU_T + 7'(ALU_ADD)), "addi moves");
    chk(out.imm_we && out.imm == 5 && out.moves[0].dst == D_NOP, "addi imm, no rd_move");
    present(add(2, 1, 1), 32'h4);
    chk(is(out.moves[0], S_ALU, 7'd1), "rd_move of addi");
    chk(is(out.moves[4], S_ALU, D_ALU_O1) && is(out.moves[1], S_ALU, D_ALU_T + 7'(ALU_ADD)), "bypass both");
    chk(ev_bypass, "bypass event");
    present(mul(3, 2, 1), 32'h8);
    chk(is(out.moves[4], S_ALU, D_MUL_O1) && is(out.moves[1], 6'd1, D_MUL_T + 7'(MU_MUL)), "mul: rs1 bypassed, rs2 from RF");
    chk(is(out.moves[0], S_ALU, 7'd2), "rd_move of add");
    // stall: two empty cycles, then the rd_move with the next instruction
    present(sw(3, 0, 64), 32'hC);
    chk(stall && out.moves[0].dst == D_NOP && out.moves[1].dst == D_NOP, "stall cycle 1");
    present(sw(3, 0, 64), 32'hC);
    chk(stall && out.moves[1].dst == D_NOP, "stall cycle 2");
    present(sw(3, 0, 64), 32'hC);
    chk(!stall && is(out.moves[0], S_MUL, 7'd3), "mul rd_move after stall");
    chk(is(out.moves[4], S_MUL, D_LSU_O1) && is(out.moves[3], S_IMM, D_LSU_O2) &&
        is(out.moves[1], 6'd0, D_LSU_T + 7'(LS_SW)) && out.imm == 64, "store moves with bypassed data");
    present(lw(4, 3, -4), 32'h10);
    chk(!stall && is(out.moves[1], 6'd3, D_LSU_T + 7'(LS_LW)) && out.imm == 32'hFFFF_FFFC, "load moves");
    present(bne(4, 0, -16), 32'h14);
    chk(stall, "load stall 1 cycle");
    present(bne(4, 0, -16), 32'h14);
    chk(!stall && is(out.moves[0], S_LSU, 7'd4) && is(out.moves[4], S_LSU, D_CU_O1), "load rd_move and bypass");
    chk(is(out.moves[3], S_IMM, D_CU_O2) && is(out.moves[1], 6'd0, D_CU_T + 7'(CU_BNE)) && out.imm == 32'h4, "branch target pc+off");
    present(jal(1, 32'h100), 32'h18);
    chk(is(out.moves[1], S_IMM, D_CU_T + 7'(CU_CALL)) && out.imm == 32'h118, "jal");
    // flush: the next instruction is squashed, the link write survives
    present(addi(5, 0, 1), 32'h1C);
    flush = 1; #1;
    chk(is(out.moves[0], S_RA, 7'd1) && out.moves[4].dst == D_NOP && out.moves[1].dst == D_NOP && !stall, "flush keeps link write only");
    present(addi(6, 1, 1), 32'h118);
    chk(is(out.moves[4], 6'd1, D_ALU_O1) && out.moves[0].dst == D_NOP, "no bypass after flush");
    present(lui(7, 32'h12345), 32'h11C);
    chk(is(out.moves[4], S_SIMM, D_ALU_O1) && out.imm == 32'h1234_5000, "lui");
    present(rv_u(1, 8, 7'b0010111), 32'h120);
    chk(out.imm == 32'h1120, "auipc");
    present(simd(SI_SHRRU8, 9, 7, 8), 32'h124);
    chk(is(out.moves[4], 6'd7, D_SIMD_O1) && is(out.moves[1], S_ALU, D_SIMD_T + 7'(SI_SHRRU8)), "simd custom");
    present(swtta(32'h40), 32'h128);
    chk(stall, "simd stall");
    present(swtta(32'h40), 32'h128);
    chk(is(out.moves[1], S_IMM, D_CU_T + 7'(CU_SWTTA)) && out.imm == 32'h168 && is(out.moves[0], S_SIMD, 7'd9), "swtta");
    present(simd(SI_DOT_S8, 9, 7, 8), 32'h12C);
    chk(out.moves[1].dst == D_NOP && out.moves[4].dst == D_NOP, "ternary op not in RISC-V mode");
    // exposed-datapath words
    @(negedge clk);
    rv_mode = 0;
    word = unc(mv(6'd1, D_ALU_O1), mv(S_MUL, D_LSU_O2), nop(), mv(simm(-2), D_ALU_T), mv(S_ALU, 7'd4, 2'd1));
    #1 chk(is(out.moves[4], 6'd1, D_ALU_O1) && is(out.moves[3], S_MUL, D_LSU_O2) &&
           out.moves[0].guard == 1 && out.moves[0].src == S_ALU && !out.rv && !out.imm_we, "tta unpack");
    @(negedge clk);
    word = limm(32'hABCD_0123);
    #1 chk(out.imm_we && out.imm == 32'hABCD_0123 && out.moves[1].dst == D_NOP, "long immediate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
