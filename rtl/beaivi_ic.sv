// Transport network and move decode of the execute stage.
//
// Every cycle the five moves of the executing instruction are carried out in
// parallel. For each move the guard is evaluated against the boolean
// registers; an enabled move reads its source (register file through one of
// the two read ports, a function-unit result, the long-immediate register or
// a 4-bit signed short immediate) and writes its destination socket: a
// register-file write, a function-unit operand, or a function-unit trigger
// whose destination code also carries the operation. If several moves write
// the same socket the lowest slot wins (code generation never does this).
//
// The register-file read ports are assigned in slot order to the distinct
// registers read; r0 reads zero without a port. At most two distinct
// registers may be read and one written per instruction, which matches the
// 2-read/1-write register file; assertions check it.
// (Lint reports rst_n as both an asynchronous reset and a synchronous
// signal; the synchronous use is only the assertions' disable condition.)
//
// The long-immediate register (the IMM unit) lives here: an instruction that
// carries an immediate loads it, and moves of that same instruction already
// see the new value. The move-based organisation follows the document; codes,
// port sharing rules and the immediate register are this design's choices.
module beaivi_ic
  import beaivi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  dec_instr_t  ins,
  input  logic [1:0]  bool_q,
  input  logic [31:0] alu_r,
  input  logic [31:0] simd_r,
  input  logic [31:0] mul_r,
  input  logic [31:0] lsu_r,
  input  logic [31:0] ra_r,
  // register file
  output logic [4:0]  rf_raddr0,
  output logic [4:0]  rf_raddr1,
  input  logic [31:0] rf_rdata0,
  input  logic [31:0] rf_rdata1,
  output logic        rf_we,
  output logic [4:0]  rf_waddr,
  output logic [31:0] rf_wdata,
  // boolean registers
  output logic [1:0]  bool_we,
  output logic [1:0]  bool_wdata,
  // function units
  output fu_ctrl_t    alu_c,
  output fu_ctrl_t    simd_c,
  output fu_ctrl_t    mul_c,
  output fu_ctrl_t    lsu_c,
  output fu_ctrl_t    cu_c,
  // activity, for observation
  output logic [NSLOTS-1:0] move_act,
  output logic [31:0] imm_q
);
  logic [31:0] imm_v;
  logic [NSLOTS-1:0][31:0] val;
  logic [NSLOTS-1:0] act;
  logic rd0_v, rd1_v;
  int unsigned nrd_extra, nwr;

  assign imm_v = ins.imm_we ? ins.imm : imm_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   imm_q <= '0;
    else if (ins.valid && ins.imm_we) imm_q <= ins.imm;
  end

  // guards
  always_comb begin
    for (int s = 0; s < NSLOTS; s++) begin
      logic g;
      unique case (ins.moves[s].guard)
        2'd0: g = 1'b1;
        2'd1: g = bool_q[0];
        2'd2: g = !bool_q[0];
        default: g = bool_q[1];
      endcase
      act[s] = ins.valid && g && (ins.moves[s].dst != D_NOP);
    end
  end
  assign move_act = act;

  // register-file read-port allocation
  always_comb begin
    rf_raddr0 = '0;
    rf_raddr1 = '0;
    rd0_v = 1'b0;
    rd1_v = 1'b0;
    nrd_extra = 0;
    for (int s = 0; s < NSLOTS; s++) begin
      logic [5:0] sc;
      sc = ins.moves[s].src;
      if (act[s] && !sc[5] && sc[4:0] != 5'd0) begin
        if (!rd0_v) begin
          rd0_v = 1'b1; rf_raddr0 = sc[4:0];
        end else if (sc[4:0] != rf_raddr0) begin
          if (!rd1_v) begin
            rd1_v = 1'b1; rf_raddr1 = sc[4:0];
          end else if (sc[4:0] != rf_raddr1) begin
            nrd_extra++;
          end
        end
      end
    end
  end

  // source values
  always_comb begin
    for (int s = 0; s < NSLOTS; s++) begin
      logic [5:0] sc;
      sc = ins.moves[s].src;
      if (!sc[5]) begin
        if (sc[4:0] == 5'd0)            val[s] = '0;
        else if (sc[4:0] == rf_raddr0)  val[s] = rf_rdata0;
        else                            val[s] = rf_rdata1;
      end else if (sc[4]) begin
        val[s] = {{28{sc[3]}}, sc[3:0]};
      end else begin
        unique case (sc)
          S_ALU:   val[s] = alu_r;
          S_SIMD:  val[s] = simd_r;
          S_MUL:   val[s] = mul_r;
          S_LSU:   val[s] = lsu_r;
          S_RA:    val[s] = ra_r;
          S_IMM:   val[s] = imm_v;
          S_B0:    val[s] = {31'd0, bool_q[0]};
          S_B1:    val[s] = {31'd0, bool_q[1]};
          default: val[s] = '0;
        endcase
      end
    end
  end

  // destination decode; iterate downwards so the lowest slot wins
  always_comb begin
    alu_c = '0; simd_c = '0; mul_c = '0; lsu_c = '0; cu_c = '0;
    rf_we = 1'b0; rf_waddr = '0; rf_wdata = '0;
    bool_we = '0; bool_wdata = '0;
    nwr = 0;
    for (int s = NSLOTS - 1; s >= 0; s--) begin
      logic [6:0] d;
      logic [31:0] v;
      d = ins.moves[s].dst;
      v = val[s];
      if (act[s]) begin
        if (d[6:5] == 2'b00) begin
          rf_we = 1'b1; rf_waddr = d[4:0]; rf_wdata = v; nwr++;
        end else if (d[6:5] == 2'b01) begin
          simd_c.trig = 1'b1; simd_c.op = d[4:0]; simd_c.t = v;
        end else if (d[6:4] == 3'b101) begin
          alu_c.trig = 1'b1; alu_c.op = {1'b0, d[3:0]}; alu_c.t = v;
        end else if (d[6:3] == 4'b1100) begin
          mul_c.trig = 1'b1; mul_c.op = {2'b0, d[2:0]}; mul_c.t = v;
        end else if (d[6:3] == 4'b1101) begin
          lsu_c.trig = 1'b1; lsu_c.op = {2'b0, d[2:0]}; lsu_c.t = v;
        end else if (d[6:4] == 3'b111) begin
          cu_c.trig = 1'b1; cu_c.op = {1'b0, d[3:0]}; cu_c.t = v;
        end else begin
          unique case (d)
            D_ALU_O1:  begin alu_c.o1_we  = 1'b1; alu_c.o1  = v; end
            D_SIMD_O1: begin simd_c.o1_we = 1'b1; simd_c.o1 = v; end
            D_SIMD_O2: begin simd_c.o2_we = 1'b1; simd_c.o2 = v; end
            D_MUL_O1:  begin mul_c.o1_we  = 1'b1; mul_c.o1  = v; end
            D_MUL_O2:  begin mul_c.o2_we  = 1'b1; mul_c.o2  = v; end
            D_LSU_O1:  begin lsu_c.o1_we  = 1'b1; lsu_c.o1  = v; end
            D_LSU_O2:  begin lsu_c.o2_we  = 1'b1; lsu_c.o2  = v; end
            D_CU_O1:   begin cu_c.o1_we   = 1'b1; cu_c.o1   = v; end
            D_CU_O2:   begin cu_c.o2_we   = 1'b1; cu_c.o2   = v; end
            D_B0:      begin bool_we[0] = 1'b1; bool_wdata[0] = v[0]; end
            D_B1:      begin bool_we[1] = 1'b1; bool_wdata[1] = v[0]; end
            default: ;
          endcase
        end
      end
    end
  end

  // The 2-read / 1-write register file allows no more per instruction.
  a_rf_reads:  assert property (@(posedge clk) disable iff (!rst_n) nrd_extra == 0);
  a_rf_writes: assert property (@(posedge clk) disable iff (!rst_n) nwr <= 1);
endmodule
