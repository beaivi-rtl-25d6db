// Multiplier function unit with 32-bit multiply-accumulate.
//
// Operands: o1 (a), o2 (accumulator for MAC) and the trigger value t (b).
// Operations: MUL (low 32 bits of a*b), MULH / MULHSU / MULHU (upper 32 bits,
// signed x signed, signed x unsigned, unsigned x unsigned, as in RV32M) and
// MAC (o2 + a*b, low 32 bits). The document names the unit and its 32-bit
// multiply-accumulate; the latency of LAT_MUL (3) cycles, fully pipelined, is
// this design's choice.
module beaivi_mul
  import beaivi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  fu_ctrl_t    ctrl,
  output logic [31:0] result
);
  logic [31:0] o1_q, o2_q, a, b, c, r;
  logic signed [65:0] p;

  assign a = ctrl.o1_we ? ctrl.o1 : o1_q;
  assign c = ctrl.o2_we ? ctrl.o2 : o2_q;
  assign b = ctrl.t;

  always_comb begin
    logic signed [32:0] ae, be;
    ae = 33'(signed'({1'b0, a}));
    be = 33'(signed'({1'b0, b}));
    unique case (mul_op_e'(ctrl.op[2:0]))
      MU_MULH:   begin ae = {a[31], a}; be = {b[31], b}; end
      MU_MULHSU: begin ae = {a[31], a}; end
      default: ;
    endcase
    p = ae * be;
    unique case (mul_op_e'(ctrl.op[2:0]))
      MU_MUL:                       r = p[31:0];
      MU_MULH, MU_MULHSU, MU_MULHU: r = p[63:32];
      MU_MAC:                       r = c + p[31:0];
      default:                      r = p[31:0];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o1_q <= '0;
      o2_q <= '0;
    end else begin
      if (ctrl.o1_we) o1_q <= ctrl.o1;
      if (ctrl.o2_we) o2_q <= ctrl.o2;
    end
  end

  beaivi_fu_pipe #(.LAT(LAT_MUL), .W(32)) u_pipe (
    .clk, .rst_n, .in_valid(ctrl.trig), .in(r), .out(result)
  );
endmodule
