// Helpers for the Beaivi testbenches: encoders for RV32 instructions, for
// exposed-datapath moves and for the 64-bit instruction words (uncompressed,
// header, fill, compressed bundle, long immediate).
package beaivi_tb_pkg;
  import beaivi_pkg::*;

  // ---- RV32 encoders
  function automatic logic [31:0] rv_r(input logic [6:0] f7, input logic [4:0] rs2, rs1,
                                        input logic [2:0] f3, input logic [4:0] rd,
                                        input logic [6:0] opc);
    return {f7, rs2, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] rv_i(input int imm, input logic [4:0] rs1,
                                        input logic [2:0] f3, input logic [4:0] rd,
                                        input logic [6:0] opc);
    logic [11:0] i = imm[11:0];
    return {i, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] rv_s(input int imm, input logic [4:0] rs2, rs1,
                                        input logic [2:0] f3);
    logic [11:0] i = imm[11:0];
    return {i[11:5], rs2, rs1, f3, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] rv_b(input int imm, input logic [4:0] rs2, rs1,
                                        input logic [2:0] f3);
    logic [12:0] i = imm[12:0];
    return {i[12], i[10:5], rs2, rs1, f3, i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] rv_u(input int imm20, input logic [4:0] rd,
                                        input logic [6:0] opc);
    logic [19:0] i = imm20[19:0];
    return {i, rd, opc};
  endfunction
  function automatic logic [31:0] rv_j(input int imm, input logic [4:0] rd);
    logic [20:0] i = imm[20:0];
    return {i[20], i[10:1], i[11], i[19:12], rd, 7'b1101111};
  endfunction

  function automatic logic [31:0] addi(input logic [4:0] rd, rs1, input int imm);
    return rv_i(imm, rs1, 3'b000, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] add(input logic [4:0] rd, rs1, rs2);
    return rv_r(7'd0, rs2, rs1, 3'b000, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] sub(input logic [4:0] rd, rs1, rs2);
    return rv_r(7'b0100000, rs2, rs1, 3'b000, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] mul(input logic [4:0] rd, rs1, rs2);
    return rv_r(7'b0000001, rs2, rs1, 3'b000, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] lw(input logic [4:0] rd, rs1, input int imm);
    return rv_i(imm, rs1, 3'b010, rd, 7'b0000011);
  endfunction
  function automatic logic [31:0] sw(input logic [4:0] rs2, rs1, input int imm);
    return rv_s(imm, rs2, rs1, 3'b010);
  endfunction
  function automatic logic [31:0] bne(input logic [4:0] rs1, rs2, input int imm);
    return rv_b(imm, rs2, rs1, 3'b001);
  endfunction
  function automatic logic [31:0] lui(input logic [4:0] rd, input int imm20);
    return rv_u(imm20, rd, 7'b0110111);
  endfunction
  function automatic logic [31:0] jal(input logic [4:0] rd, input int imm);
    return rv_j(imm, rd);
  endfunction
  function automatic logic [31:0] simd(input simd_op_e op, input logic [4:0] rd, rs1, rs2);
    return rv_r({2'b00, 5'(op)}, rs2, rs1, 3'b000, rd, 7'b0001011);
  endfunction
  function automatic logic [31:0] swtta(input int imm);
    return rv_i(imm, 5'd0, 3'b001, 5'd0, 7'b0001011);
  endfunction

  // ---- moves
  function automatic move_t mv(input logic [5:0] s, input logic [6:0] d,
                               input logic [1:0] g = 2'd0);
    return '{guard: g, src: s, dst: d};
  endfunction
  function automatic logic [5:0] rf(input int r);
    return 6'(r);
  endfunction
  function automatic logic [6:0] rfw(input int r);
    return 7'(r);
  endfunction
  function automatic logic [5:0] simm(input int v);
    return {2'b11, 4'(v)};
  endfunction
  function automatic move_t nop();
    return MOVE_NOP;
  endfunction

  // five moves, slot 4 first
  function automatic logic [63:0] unc(input move_t m4, m3, m2, m1, m0);
    move_t [NSLOTS-1:0] m;
    m[4] = m4; m[3] = m3; m[2] = m2; m[1] = m1; m[0] = m0;
    return pack_moves(m);
  endfunction
  function automatic logic [63:0] header(input int n);
    return {2'b01, 56'd0, 6'(n)};
  endfunction
  function automatic logic [63:0] fill(input move_t m4, m3, m2, m1, m0);
    logic [63:0] w;
    w = unc(m4, m3, m2, m1, m0);
    w[63:62] = 2'b01;
    return w;
  endfunction
  function automatic logic [19:0] cidx(input int i4, i3, i2, i1, i0);
    return {5'(i4), 3'(i3), 3'(i2), 5'(i1), 4'(i0)};
  endfunction
  function automatic logic [63:0] bundle(input logic [19:0] c2, c1, c0);
    return {2'b10, 2'b00, c2, c1, c0};
  endfunction
  function automatic logic [63:0] limm(input logic [31:0] v);
    return {2'b00, 30'd0, v};
  endfunction
endpackage
