// Integer ALU function unit of the exposed datapath.
//
// Like every function unit here it has an operand register (o1) and a
// trigger port: a move to the trigger starts the operation "o1 OP t", where t
// is the value moved to the trigger and o1 is either the value written to the
// operand port in the same cycle or the one stored earlier. The result
// register is readable by moves one cycle after the trigger (latency 1) and
// holds its value until the next trigger. The unit covers the RV32I register
// and immediate ALU operations plus comparisons that produce 0/1 for the
// boolean registers; the operation list is this design's choice, the
// document only names the unit.
module beaivi_alu
  import beaivi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  fu_ctrl_t    ctrl,
  output logic [31:0] result
);
  logic [31:0] o1_q, a, b, r;

  assign a = ctrl.o1_we ? ctrl.o1 : o1_q;
  assign b = ctrl.t;

  always_comb begin
    unique case (alu_op_e'(ctrl.op[3:0]))
      ALU_ADD:  r = a + b;
      ALU_SUB:  r = a - b;
      ALU_AND:  r = a & b;
      ALU_OR:   r = a | b;
      ALU_XOR:  r = a ^ b;
      ALU_SLL:  r = a << b[4:0];
      ALU_SRL:  r = a >> b[4:0];
      ALU_SRA:  r = 32'($signed(a) >>> b[4:0]);
      ALU_SLT:  r = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: r = {31'd0, a < b};
      ALU_EQ:   r = {31'd0, a == b};
      ALU_NE:   r = {31'd0, a != b};
      ALU_GE:   r = {31'd0, $signed(a) >= $signed(b)};
      ALU_GEU:  r = {31'd0, a >= b};
      ALU_MIN:  r = ($signed(a) < $signed(b)) ? a : b;
      ALU_MAX:  r = ($signed(a) < $signed(b)) ? b : a;
      default:  r = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o1_q   <= '0;
      result <= '0;
    end else begin
      if (ctrl.o1_we) o1_q <= ctrl.o1;
      if (ctrl.trig)  result <= r;
    end
  end
endmodule
