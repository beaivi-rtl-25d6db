// Control unit: jumps, calls, conditional branches and instruction-set mode
// switches.
//
// Operands: o1 (first compare operand), o2 (branch target, or offset for
// JALR) and the trigger value t. JUMP/CALL go to t, JALR to (t + o2) with bit
// 0 cleared, a conditional branch compares o1 with t and goes to o2 when the
// condition holds. SWTTA and SWRV go to t and switch the fetch to exposed-
// datapath or RISC-V mode. CALL and JALR write the return address to the
// result register (readable next cycle): the next instruction for RISC-V code
// (pc + 4), the word after the delay slots for exposed-datapath code
// (pc + 8 * (1 + DELAY_SLOTS)).
//
// The redirect is combinational in the execute cycle. In exposed-datapath mode
// the instructions already fetched behind the jump execute (visible delay
// slots); for an instruction from the RISC-V microcode "flush" tells the
// front end to squash them, as the document describes for the RISC-V mode.
// The mode switches are the custom instructions the document mentions; their
// form as jumps is this design's choice.
module beaivi_cu
  import beaivi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  fu_ctrl_t    ctrl,
  input  logic [31:0] pc,        // address of the executing instruction
  input  logic        rv,        // executing instruction came from RISC-V code
  output logic        redirect,
  output logic [31:0] target,
  output logic        flush,
  output logic        set_mode,
  output logic        mode_tta,
  output logic [31:0] result     // return address
);
  logic [31:0] o1_q, o2_q, a, tg, b;
  logic        take, link;
  cu_op_e      op;

  assign a  = ctrl.o1_we ? ctrl.o1 : o1_q;
  assign tg = ctrl.o2_we ? ctrl.o2 : o2_q;
  assign b  = ctrl.t;
  assign op = cu_op_e'(ctrl.op[3:0]);

  always_comb begin
    take     = 1'b0;
    link     = 1'b0;
    target   = tg;
    set_mode = 1'b0;
    mode_tta = 1'b0;
    unique case (op)
      CU_JUMP:  begin take = 1'b1; target = b; end
      CU_CALL:  begin take = 1'b1; target = b; link = 1'b1; end
      CU_JALR:  begin take = 1'b1; target = (b + tg) & ~32'd1; link = 1'b1; end
      CU_SWTTA: begin take = 1'b1; target = b; set_mode = 1'b1; mode_tta = 1'b1; end
      CU_SWRV:  begin take = 1'b1; target = b; set_mode = 1'b1; mode_tta = 1'b0; end
      CU_BEQ:   take = (a == b);
      CU_BNE:   take = (a != b);
      CU_BLT:   take = ($signed(a) <  $signed(b));
      CU_BGE:   take = ($signed(a) >= $signed(b));
      CU_BLTU:  take = (a <  b);
      CU_BGEU:  take = (a >= b);
      default:  take = 1'b0;
    endcase
    redirect = ctrl.trig && take;
    flush    = redirect && rv;
    set_mode = set_mode && redirect;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o1_q   <= '0;
      o2_q   <= '0;
      result <= '0;
    end else begin
      if (ctrl.o1_we) o1_q <= ctrl.o1;
      if (ctrl.o2_we) o2_q <= ctrl.o2;
      if (ctrl.trig && link)
        result <= rv ? pc + 32'd4 : pc + 32'(8 * (1 + DELAY_SLOTS));
    end
  end
endmodule
