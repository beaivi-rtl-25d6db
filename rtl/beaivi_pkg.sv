// Shared types and encodings of the Beaivi dual-mode DSP.
//
// The core executes 64-bit instruction words. In exposed-datapath (TTA) mode a
// word holds five move slots; each move transports one value from a source
// (register file, function-unit result, immediate) to a destination socket
// (register file, function-unit operand, or a function-unit trigger that
// starts an operation). In RISC-V mode the word holds two RV32 instructions
// that the microcode unit lowers into the same moves.
//
// Taken from the design description: the 64-bit word, five move slots, the
// two-bit instruction-type prefix (01 header/fill, 11 uncompressed, 10
// compressed bundle), three 20-bit compressed instructions per bundle and the
// dictionary depths 32/8/8/32/16 for slots 4..0. Chosen here: slot widths,
// source/destination codes, operation codes, latencies, the 00 prefix used
// for a long-immediate word, and the RISC-V custom-instruction encodings.
package beaivi_pkg;

  localparam int IW        = 64;   // instruction word
  localparam int NSLOTS    = 5;
  localparam int CIDX_W    = 20;   // one compressed instruction
  localparam int NCOMP     = 3;    // compressed instructions per bundle

  // Instruction-type prefix, bits [63:62]
  typedef enum logic [1:0] {
    IT_LIMM  = 2'b00,   // long immediate word (this design's own template)
    IT_FILL  = 2'b01,   // dictionary header or fill
    IT_COMP  = 2'b10,   // compressed bundle
    IT_UNC   = 2'b11    // uncompressed moves
  } itype_e;

  // Bit positions of the move slots in an uncompressed / fill word
  localparam int SLOT_LSB [NSLOTS] = '{0, 15, 30, 38, 46};
  localparam int SLOT_W   [NSLOTS] = '{15, 15, 8, 8, 15};
  // Dictionary depths and index widths per slot (slot 0..4)
  localparam int DICT_D   [NSLOTS] = '{16, 32, 8, 8, 32};
  localparam int IDX_W    [NSLOTS] = '{4, 5, 3, 3, 5};
  localparam int IDX_LSB  [NSLOTS] = '{0, 4, 9, 12, 15};

  typedef struct packed {
    logic [1:0] guard;   // 0 always, 1 if b0, 2 if !b0, 3 if b1
    logic [5:0] src;
    logic [6:0] dst;
  } move_t;

  // Source codes
  localparam logic [5:0] S_ALU  = 6'h20;
  localparam logic [5:0] S_SIMD = 6'h21;
  localparam logic [5:0] S_MUL  = 6'h22;
  localparam logic [5:0] S_LSU  = 6'h23;
  localparam logic [5:0] S_RA   = 6'h24;
  localparam logic [5:0] S_IMM  = 6'h25;
  localparam logic [5:0] S_B0   = 6'h26;
  localparam logic [5:0] S_B1   = 6'h27;
  localparam logic [5:0] S_SIMM = 6'h30;  // 0x30..0x3F: signed 4-bit immediate

  // Destination codes
  localparam logic [6:0] D_NOP     = 7'h40;
  localparam logic [6:0] D_ALU_O1  = 7'h41;
  localparam logic [6:0] D_SIMD_O1 = 7'h42;
  localparam logic [6:0] D_SIMD_O2 = 7'h43;
  localparam logic [6:0] D_MUL_O1  = 7'h44;
  localparam logic [6:0] D_MUL_O2  = 7'h45;
  localparam logic [6:0] D_LSU_O1  = 7'h46;
  localparam logic [6:0] D_LSU_O2  = 7'h47;
  localparam logic [6:0] D_CU_O1   = 7'h48;
  localparam logic [6:0] D_CU_O2   = 7'h49;
  localparam logic [6:0] D_B0      = 7'h4A;
  localparam logic [6:0] D_B1      = 7'h4B;
  localparam logic [6:0] D_ALU_T   = 7'h50;  // + alu_op_e
  localparam logic [6:0] D_SIMD_T  = 7'h20;  // + simd_op_e
  localparam logic [6:0] D_MUL_T   = 7'h60;  // + mul_op_e
  localparam logic [6:0] D_LSU_T   = 7'h68;  // + lsu_op_e
  localparam logic [6:0] D_CU_T    = 7'h70;  // + cu_op_e

  localparam move_t MOVE_NOP = '{guard: 2'd0, src: 6'd0, dst: D_NOP};

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLL, ALU_SRL, ALU_SRA,
    ALU_SLT, ALU_SLTU, ALU_EQ, ALU_NE, ALU_GE, ALU_GEU, ALU_MIN, ALU_MAX
  } alu_op_e;

  typedef enum logic [4:0] {
    SI_ADD8, SI_ADD16, SI_SUB8, SI_SUB16,
    SI_ADDRHI_S8, SI_ADDRHI_S16, SI_ADDRHI_U8, SI_ADDRHI_U16,
    SI_SUBRHI_S8, SI_SUBRHI_S16, SI_SUBRHI_U8, SI_SUBRHI_U16,
    SI_MULRHI8, SI_MULRHI16, SI_REFLECT,
    SI_DOT_S8, SI_DOT_S16, SI_DOT_U8, SI_DOT_U16,
    SI_SATSUBU8, SI_SATSUBU16, SI_SHRRU8, SI_SHRRU16,
    SI_SHUF8, SI_SHUF16, SI_VCAST8, SI_VCAST16
  } simd_op_e;

  typedef enum logic [2:0] {
    MU_MUL, MU_MULH, MU_MULHSU, MU_MULHU, MU_MAC
  } mul_op_e;

  typedef enum logic [2:0] {
    LS_LW, LS_LH, LS_LHU, LS_LB, LS_LBU, LS_SW, LS_SH, LS_SB
  } lsu_op_e;

  typedef enum logic [3:0] {
    CU_JUMP, CU_CALL, CU_JALR, CU_SWTTA, CU_BEQ, CU_BNE, CU_BLT, CU_BGE,
    CU_BLTU, CU_BGEU, CU_SWRV
  } cu_op_e;

  // Function-unit latencies in cycles from trigger to readable result
  localparam int LAT_ALU  = 1;
  localparam int LAT_SIMD = 2;
  localparam int LAT_MUL  = 3;
  localparam int LAT_LSU  = 2;
  localparam int LAT_CU   = 1;

  // TTA-mode control transfers take effect after this many further words
  localparam int DELAY_SLOTS = 2;

  // Per-FU control produced by the interconnect
  typedef struct packed {
    logic        o1_we;
    logic [31:0] o1;
    logic        o2_we;
    logic [31:0] o2;
    logic        trig;
    logic [4:0]  op;
    logic [31:0] t;
  } fu_ctrl_t;

  // One decoded instruction as it leaves the decode stage
  typedef struct packed {
    logic                valid;
    logic                rv;        // came from the RISC-V microcode
    logic [31:0]         pc;
    logic                imm_we;
    logic [31:0]         imm;
    move_t [NSLOTS-1:0]  moves;
  } dec_instr_t;

  // Expand a narrow (8-bit) move: src3 selects an FU result, dst5 an FU port
  function automatic move_t expand_narrow(input logic [7:0] m);
    move_t r;
    r.guard = 2'd0;
    r.src   = {3'b100, m[7:5]};
    r.dst   = {2'b10, m[4:0]};
    return r;
  endfunction

  // Extract the five moves of an uncompressed word
  function automatic move_t [NSLOTS-1:0] unpack_moves(input logic [IW-1:0] w);
    move_t [NSLOTS-1:0] r;
    r[0] = move_t'(w[14:0]);
    r[1] = move_t'(w[29:15]);
    r[2] = expand_narrow(w[37:30]);
    r[3] = expand_narrow(w[45:38]);
    r[4] = move_t'(w[60:46]);
    return r;
  endfunction

  // Pack five moves into an uncompressed word (slots 2,3 must be narrow-encodable)
  function automatic logic [IW-1:0] pack_moves(input move_t [NSLOTS-1:0] m);
    logic [IW-1:0] w;
    w = {IT_UNC, 62'd0};
    w[14:0]  = m[0];
    w[29:15] = m[1];
    w[37:30] = {m[2].src[2:0], m[2].dst[4:0]};
    w[45:38] = {m[3].src[2:0], m[3].dst[4:0]};
    w[60:46] = m[4];
    return w;
  endfunction

endpackage
