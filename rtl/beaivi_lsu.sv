// Load-store unit for the 64 kB data scratchpad.
//
// Operands: o1 (store data), o2 (address offset) and the trigger value t
// (base address); the byte address is t + o2, so a RISC-V "lw rd, imm(rs1)"
// maps onto one trigger. Loads and stores of 8, 16 and 32 bits; narrow loads
// sign- or zero-extend. A trigger issues the scratchpad access in the same
// cycle; the synchronous memory answers one cycle later and the aligned load
// result is registered, so a load result is readable LAT_LSU (2) cycles after
// the trigger. Misaligned accesses are not supported (the low address bits
// select bytes inside the aligned word). The document gives the unit and its
// scratchpad; offsets, widths and timing are this design's choices.
module beaivi_lsu
  import beaivi_pkg::*;
#(
  parameter int unsigned AW = 14   // word address bits of the data memory
) (
  input  logic          clk,
  input  logic          rst_n,
  input  fu_ctrl_t      ctrl,
  output logic [31:0]   result,
  // data memory port (synchronous, read data one cycle after req)
  output logic          mem_req,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [3:0]    mem_be,
  output logic [31:0]   mem_wdata,
  input  logic [31:0]   mem_rdata
);
  logic [31:0] o1_q, o2_q, d, off, addr;
  lsu_op_e     op;
  logic        ld_q;
  lsu_op_e     op_q;
  logic [1:0]  bsel_q;
  logic [31:0] ld;

  assign d    = ctrl.o1_we ? ctrl.o1 : o1_q;
  assign off  = ctrl.o2_we ? ctrl.o2 : o2_q;
  assign addr = ctrl.t + off;
  assign op   = lsu_op_e'(ctrl.op[2:0]);

  always_comb begin
    mem_req   = ctrl.trig;
    mem_we    = ctrl.trig && (op inside {LS_SW, LS_SH, LS_SB});
    mem_addr  = addr[AW+1:2];
    mem_be    = 4'b1111;
    mem_wdata = d;
    unique case (op)
      LS_SH: begin mem_be = addr[1] ? 4'b1100 : 4'b0011; mem_wdata = {2{d[15:0]}}; end
      LS_SB: begin mem_be = 4'b0001 << addr[1:0];        mem_wdata = {4{d[7:0]}};  end
      default: ;
    endcase
  end

  always_comb begin
    logic [15:0] h;
    logic [7:0]  by;
    h  = bsel_q[1] ? mem_rdata[31:16] : mem_rdata[15:0];
    by = mem_rdata[8*bsel_q +: 8];
    unique case (op_q)
      LS_LH:   ld = {{16{h[15]}}, h};
      LS_LHU:  ld = {16'd0, h};
      LS_LB:   ld = {{24{by[7]}}, by};
      LS_LBU:  ld = {24'd0, by};
      default: ld = mem_rdata;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o1_q   <= '0;
      o2_q   <= '0;
      ld_q   <= 1'b0;
      op_q   <= LS_LW;
      bsel_q <= '0;
      result <= '0;
    end else begin
      if (ctrl.o1_we) o1_q <= ctrl.o1;
      if (ctrl.o2_we) o2_q <= ctrl.o2;
      ld_q <= ctrl.trig && !mem_we;
      if (ctrl.trig) begin
        op_q   <= op;
        bsel_q <= addr[1:0];
      end
      if (ld_q) result <= ld;
    end
  end
endmodule
