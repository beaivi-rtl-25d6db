// RISC-V microcode unit: lowers RV32 instructions into exposed-datapath moves
// and selects between them and the native exposed-datapath instruction.
//
// Lowering. Each RISC-V instruction becomes at most three moves that bring
// its operands to one function unit and trigger it (slot 4: rs1 or an
// operand, slot 3: the decoded immediate to a second operand port, slot 1:
// the trigger carrying rs2 or the immediate). The immediate travels with the
// instruction into the long-immediate register; pc-relative targets (JAL,
// branches, AUIPC, SWTTA) are added here. The result transport "FU.out -> rd"
// cannot be issued in the same cycle, so it is kept in the rd_move register
// and issued in slot 0 together with the next instruction. If that next
// instruction reads the same register, which the register file has not yet
// received, its operand move is redirected to the function unit's result
// (the rs1/rs2 bypass tables of the document). For multi-cycle operations an
// operation-latency table loads a stall counter and the unit emits
// latency-1 empty instructions while decode holds the next one.
//
// Flush. When a RISC-V branch or jump is taken, "flush" replaces the
// translation of the instruction in decode by an empty one that still
// carries the pending rd_move (a JAL's link write) and forgets the pending
// state.
//
// Mode mux. For an exposed-datapath word the five slots are unpacked
// directly; a long-immediate word (prefix 00) loads the immediate register
// and moves nothing.
//
// Supported: RV32I (FENCE/SYSTEM as no-ops), MUL/MULH/MULHSU/MULHU, and on
// the custom-0 opcode (0001011) funct3=000 R-type SIMD operations whose
// funct7 is the SIMD operation code (two-input operations only), and
// funct3=001 SWTTA: jump to pc + I-immediate and continue in exposed-datapath
// mode. Division and other encodings are executed as no-ops. The structure
// follows the document's microcode organisation; the instruction encodings of the
// custom instructions and the slot assignment are this design's choices.
module beaivi_microcode
  import beaivi_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid,     // an instruction is in decode
  input  logic          rv_mode,   // it is RISC-V code
  input  logic [IW-1:0] word,      // fetched word (after the decompressor)
  input  logic [31:0]   pc,        // address of the instruction in decode
  input  logic          flush,     // taken RISC-V control transfer in execute
  output dec_instr_t    out,
  output logic          stall,     // keep the RISC-V instruction in decode
  output logic          ev_bypass,
  output logic          ev_stall
);
  // rd_move / FU-destination state and the stall counter
  logic       pend_q;
  logic [5:0] pend_src_q;
  logic [4:0] pend_rd_q;
  logic [1:0] stall_q;

  logic [31:0] ins;
  assign ins = pc[2] ? word[63:32] : word[31:0];

  logic [6:0] opc;
  logic [4:0] rd, rs1, rs2;
  logic [2:0] f3;
  logic [6:0] f7;
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;
  assign opc = ins[6:0];
  assign rd  = ins[11:7];
  assign f3  = ins[14:12];
  assign rs1 = ins[19:15];
  assign rs2 = ins[24:20];
  assign f7  = ins[31:25];
  assign imm_i = {{20{ins[31]}}, ins[31:20]};
  assign imm_s = {{20{ins[31]}}, ins[31:25], ins[11:7]};
  assign imm_b = {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
  assign imm_u = {ins[31:12], 12'd0};
  assign imm_j = {{11{ins[31]}}, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0};

  // operand source with bypass from the previous instruction's FU result
  logic [5:0] s1, s2;
  logic       byp1, byp2;
  assign byp1 = pend_q && rs1 != 0 && rs1 == pend_rd_q;
  assign byp2 = pend_q && rs2 != 0 && rs2 == pend_rd_q;
  assign s1   = byp1 ? pend_src_q : {1'b0, rs1};
  assign s2   = byp2 ? pend_src_q : {1'b0, rs2};

  // translation LUT
  move_t       m4, m3, m1;
  logic [31:0] imm;
  logic        has_rd, uses1, uses2;
  logic [5:0]  res_src;
  int unsigned lat;

  function automatic move_t mv(input logic [5:0] s, input logic [6:0] d);
    return '{guard: 2'd0, src: s, dst: d};
  endfunction

  cu_op_e  bop;
  lsu_op_e lop, sop_ls;
  alu_op_e aop;
  simd_op_e sop;

  always_comb begin
    bop = CU_BEQ; lop = LS_LW; sop_ls = LS_SW; aop = ALU_ADD; sop = SI_ADD8;
    m4 = MOVE_NOP; m3 = MOVE_NOP; m1 = MOVE_NOP;
    imm = '0; has_rd = 1'b0; res_src = S_ALU; lat = LAT_ALU;
    uses1 = 1'b0; uses2 = 1'b0;
    unique case (opc)
      7'b0110111, 7'b0010111: begin            // LUI, AUIPC
        imm = (opc[5] ? 32'd0 : pc) + imm_u;
        m4 = mv(S_SIMM, D_ALU_O1);
        m1 = mv(S_IMM, D_ALU_T + 7'(ALU_ADD));
        has_rd = 1'b1;
      end
      7'b1101111: begin                        // JAL
        imm = pc + imm_j;
        m1 = mv(S_IMM, D_CU_T + 7'(CU_CALL));
        has_rd = 1'b1; res_src = S_RA; lat = LAT_CU;
      end
      7'b1100111: begin                        // JALR
        imm = imm_i;
        m3 = mv(S_IMM, D_CU_O2);
        m1 = mv(s1, D_CU_T + 7'(CU_JALR)); uses1 = 1'b1;
        has_rd = 1'b1; res_src = S_RA; lat = LAT_CU;
      end
      7'b1100011: begin                        // branches
        unique case (f3)
          3'b000:  bop = CU_BEQ;
          3'b001:  bop = CU_BNE;
          3'b100:  bop = CU_BLT;
          3'b101:  bop = CU_BGE;
          3'b110:  bop = CU_BLTU;
          default: bop = CU_BGEU;
        endcase
        imm = pc + imm_b;
        m4 = mv(s1, D_CU_O1); uses1 = 1'b1;
        m3 = mv(S_IMM, D_CU_O2);
        if (f3[2:1] != 2'b01) begin
          m1 = mv(s2, D_CU_T + 7'(bop)); uses2 = 1'b1;
        end
      end
      7'b0000011: begin                        // loads
        unique case (f3)
          3'b000:  lop = LS_LB;
          3'b001:  lop = LS_LH;
          3'b100:  lop = LS_LBU;
          3'b101:  lop = LS_LHU;
          default: lop = LS_LW;
        endcase
        imm = imm_i;
        m3 = mv(S_IMM, D_LSU_O2);
        m1 = mv(s1, D_LSU_T + 7'(lop)); uses1 = 1'b1;
        has_rd = 1'b1; res_src = S_LSU; lat = LAT_LSU;
      end
      7'b0100011: begin                        // stores
        unique case (f3)
          3'b000:  sop_ls = LS_SB;
          3'b001:  sop_ls = LS_SH;
          default: sop_ls = LS_SW;
        endcase
        imm = imm_s;
        m4 = mv(s2, D_LSU_O1); uses2 = 1'b1;
        m3 = mv(S_IMM, D_LSU_O2);
        m1 = mv(s1, D_LSU_T + 7'(sop_ls)); uses1 = 1'b1;
      end
      7'b0010011, 7'b0110011: begin            // OP-IMM, OP
        unique case (f3)
          3'b000:  aop = (opc[5] && f7[5]) ? ALU_SUB : ALU_ADD;
          3'b001:  aop = ALU_SLL;
          3'b010:  aop = ALU_SLT;
          3'b011:  aop = ALU_SLTU;
          3'b100:  aop = ALU_XOR;
          3'b101:  aop = f7[5] ? ALU_SRA : ALU_SRL;
          3'b110:  aop = ALU_OR;
          default: aop = ALU_AND;
        endcase
        imm = imm_i;
        if (opc[5] && f7 == 7'b0000001) begin  // RV32M multiplies
          if (!f3[2]) begin
            m4 = mv(s1, D_MUL_O1); uses1 = 1'b1;
            m1 = mv(s2, D_MUL_T + 7'(f3[1:0])); uses2 = 1'b1;
            has_rd = 1'b1; res_src = S_MUL; lat = LAT_MUL;
          end
        end else begin
          m4 = mv(s1, D_ALU_O1); uses1 = 1'b1;
          if (opc[5]) begin
            m1 = mv(s2, D_ALU_T + 7'(aop)); uses2 = 1'b1;
          end else begin
            m1 = mv(S_IMM, D_ALU_T + 7'(aop));
          end
          has_rd = 1'b1;
        end
      end
      7'b0001011: begin                        // custom-0
        if (f3 == 3'b000) begin
          sop = simd_op_e'(f7[4:0]);
          if (f7[6:5] == 2'b00 && sop inside {[SI_ADD8:SI_MULRHI16],
                [SI_SATSUBU8:SI_SHRRU16], SI_VCAST8, SI_VCAST16}) begin
            m4 = mv(s1, D_SIMD_O1); uses1 = 1'b1;
            m1 = mv(s2, D_SIMD_T + 7'(sop)); uses2 = 1'b1;
            has_rd = 1'b1; res_src = S_SIMD; lat = LAT_SIMD;
          end
        end else if (f3 == 3'b001) begin       // SWTTA
          imm = pc + imm_i;
          m1 = mv(S_IMM, D_CU_T + 7'(CU_SWTTA));
        end
      end
      default: ;
    endcase
    if (rd == 5'd0) has_rd = 1'b0;
  end

  logic issue;
  assign issue = valid && rv_mode && !flush && stall_q == 0;

  always_comb begin
    out       = '0;
    out.valid = 1'b1;
    out.rv    = rv_mode;
    out.pc    = pc;
    for (int s = 0; s < NSLOTS; s++) out.moves[s] = MOVE_NOP;
    stall     = 1'b0;
    if (!rv_mode) begin
      out.valid = valid;
      if (itype_e'(word[63:62]) == IT_LIMM) begin
        out.imm_we = 1'b1;
        out.imm    = word[31:0];
      end else begin
        out.moves = unpack_moves(word);
      end
    end else if (stall_q != 0 && !flush) begin
      stall = valid;
    end else begin
      if (pend_q) out.moves[0] = mv(pend_src_q, {2'b00, pend_rd_q});
      if (issue) begin
        out.moves[4] = m4;
        out.moves[3] = m3;
        out.moves[1] = m1;
        out.imm_we   = 1'b1;
        out.imm      = imm;
      end
    end
  end

  assign ev_bypass = issue && ((uses1 && byp1) || (uses2 && byp2));
  assign ev_stall  = stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q     <= 1'b0;
      pend_src_q <= S_ALU;
      pend_rd_q  <= '0;
      stall_q    <= '0;
    end else if (flush || !rv_mode) begin
      pend_q  <= 1'b0;
      stall_q <= '0;
    end else if (stall_q != 0) begin
      stall_q <= stall_q - 2'd1;
    end else begin
      pend_q <= issue && has_rd;
      if (issue) begin
        pend_src_q <= res_src;
        pend_rd_q  <= rd;
        stall_q    <= has_rd ? 2'(lat - 1) : 2'd0;
      end
    end
  end
endmodule
