// Beaivi DSP core: a 32-bit exposed-datapath (TTA) pipeline with a RISC-V
// front end and a dictionary decompressor.
//
// Pipeline: fetch (program counter, synchronous instruction memory) ->
// decode (dictionary decompressor, RISC-V microcode and mode mux, all
// combinational, into the decode/execute register) -> execute (the five
// moves of the instruction travel over the transport network; function-unit
// results appear after each unit's latency). Function units: ALU, SIMD/DSP
// unit, multiplier, load-store unit, control unit; a 2-read/1-write register
// file, two boolean guard registers and the long-immediate register.
//
// Control transfers are resolved in execute. Exposed-datapath code sees the
// words already fetched as delay slots; RISC-V code has them squashed (the
// decode output this cycle, the fetched word the next). Decode holds its word
// while a compressed bundle is expanded or a RISC-V multi-cycle operation is
// waited for. The memories sit outside the core.
module beaivi_core
  import beaivi_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0,
  parameter int unsigned IAW      = 13,   // IMEM word address bits (64 kB)
  parameter int unsigned DAW      = 14    // DMEM word address bits (64 kB)
) (
  input  logic           clk,
  input  logic           rst_n,
  // instruction memory
  output logic [IAW-1:0] imem_addr,
  input  logic [63:0]    imem_rdata,
  // data memory
  output logic           dmem_req,
  output logic           dmem_we,
  output logic [DAW-1:0] dmem_addr,
  output logic [3:0]     dmem_be,
  output logic [31:0]    dmem_wdata,
  input  logic [31:0]    dmem_rdata,
  // status and event strobes
  output logic           rv_mode,
  output logic           ev_bypass,
  output logic           ev_stall,
  output logic           ev_flush,
  output logic           ev_mode_switch,
  output logic           ev_dict_header,
  output logic           ev_dict_fill,
  output logic           ev_compressed,
  output logic           ev_guard_off
);
  // front end
  logic        d_valid, d_rv, stall, dc_hold, mc_stall, flush;
  logic [31:0] d_pc;
  logic [63:0] dc_out;
  dec_instr_t  mc_out, e_q;

  // execute
  logic        redirect, set_mode, mode_tta;
  logic [31:0] target;
  logic [1:0]  bool_q, bool_we, bool_wdata;
  logic [4:0]  rf_ra0, rf_ra1, rf_wa;
  logic [31:0] rf_rd0, rf_rd1, rf_wd, imm_q;
  logic        rf_we;
  fu_ctrl_t    alu_c, simd_c, mul_c, lsu_c, cu_c;
  logic [31:0] alu_r, simd_r, mul_r, lsu_r, ra_r;
  logic [NSLOTS-1:0] move_act;

  assign stall = dc_hold || mc_stall;

  beaivi_ifetch #(.RESET_PC(RESET_PC), .IAW(IAW)) u_fetch (
    .clk, .rst_n, .stall, .redirect, .target, .set_mode, .mode_tta, .flush,
    .imem_addr, .d_valid, .d_pc, .d_rv, .rv_mode
  );

  beaivi_decompressor u_dec (
    .clk, .rst_n,
    .valid(d_valid && !d_rv),
    .kill(flush),
    .word(imem_rdata),
    .out(dc_out),
    .hold(dc_hold),
    .ev_header(ev_dict_header),
    .ev_fill(ev_dict_fill),
    .ev_comp(ev_compressed)
  );

  beaivi_microcode u_mc (
    .clk, .rst_n,
    .valid(d_valid),
    .rv_mode(d_rv),
    .word(d_rv ? imem_rdata : dc_out),
    .pc(d_pc),
    .flush,
    .out(mc_out),
    .stall(mc_stall),
    .ev_bypass,
    .ev_stall
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_q <= '0;
      for (int s = 0; s < NSLOTS; s++) e_q.moves[s] <= MOVE_NOP;
    end else begin
      e_q <= mc_out;
    end
  end

  beaivi_ic u_ic (
    .clk, .rst_n, .ins(e_q), .bool_q,
    .alu_r, .simd_r, .mul_r, .lsu_r, .ra_r,
    .rf_raddr0(rf_ra0), .rf_raddr1(rf_ra1), .rf_rdata0(rf_rd0), .rf_rdata1(rf_rd1),
    .rf_we, .rf_waddr(rf_wa), .rf_wdata(rf_wd),
    .bool_we, .bool_wdata,
    .alu_c, .simd_c, .mul_c, .lsu_c, .cu_c,
    .move_act, .imm_q
  );

  beaivi_rf u_rf (
    .clk, .rst_n, .raddr0(rf_ra0), .rdata0(rf_rd0), .raddr1(rf_ra1), .rdata1(rf_rd1),
    .we(rf_we), .waddr(rf_wa), .wdata(rf_wd)
  );

  beaivi_brf u_brf (.clk, .rst_n, .we(bool_we), .wdata(bool_wdata), .b(bool_q));

  beaivi_alu  u_alu  (.clk, .rst_n, .ctrl(alu_c),  .result(alu_r));
  beaivi_simd u_simd (.clk, .rst_n, .ctrl(simd_c), .result(simd_r));
  beaivi_mul  u_mul  (.clk, .rst_n, .ctrl(mul_c),  .result(mul_r));

  beaivi_lsu #(.AW(DAW)) u_lsu (
    .clk, .rst_n, .ctrl(lsu_c), .result(lsu_r),
    .mem_req(dmem_req), .mem_we(dmem_we), .mem_addr(dmem_addr), .mem_be(dmem_be),
    .mem_wdata(dmem_wdata), .mem_rdata(dmem_rdata)
  );

  beaivi_cu u_cu (
    .clk, .rst_n, .ctrl(cu_c), .pc(e_q.pc), .rv(e_q.rv),
    .redirect, .target, .flush, .set_mode, .mode_tta, .result(ra_r)
  );

  assign ev_flush       = flush;
  assign ev_mode_switch = set_mode;
  always_comb begin
    ev_guard_off = 1'b0;
    for (int s = 0; s < NSLOTS; s++)
      if (e_q.valid && e_q.moves[s].guard != 2'd0 && e_q.moves[s].dst != D_NOP && !move_act[s])
        ev_guard_off = 1'b1;
  end
endmodule
