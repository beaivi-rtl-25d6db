// Unit test of the control unit: every conditional branch on random and
// equal operands (redirect only when the condition holds, target from o2),
// jumps, calls and JALR with their return addresses in both modes, mode
// switches, and flush raised only for RISC-V instructions.
module tb_beaivi_cu;
  import beaivi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  fu_ctrl_t ctrl;
  logic [31:0] pc, target, result;
  logic rv, redirect, flush, set_mode, mode_tta;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  beaivi_cu dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    ctrl = '0; pc = '0; rv = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      logic [31:0] a, b, tg;
      cu_op_e op;
      bit exp;
      a = $urandom; b = (i % 4 == 0) ? a : $urandom; tg = $urandom & ~3;
      if (i % 8 == 1) b = a ^ 32'h8000_0000;
      op = cu_op_e'(4 + i % 6);
      rv = i[0];
      case (op)
        CU_BEQ: exp = a == b;  CU_BNE: exp = a != b;
        CU_BLT: exp = signed'(a) < signed'(b);  CU_BGE: exp = signed'(a) >= signed'(b);
        CU_BLTU: exp = a < b;  default: exp = a >= b;
      endcase
      @(negedge clk);
      ctrl = '0; ctrl.o1_we = 1'b1; ctrl.o1 = a; ctrl.o2_we = 1'b1; ctrl.o2 = tg;
      ctrl.trig = 1'b1; ctrl.op = 5'(op); ctrl.t = b;
      #1;
      chk(redirect == exp, "branch condition");
      chk(!exp || target == tg, "branch target");
      chk(flush == (exp && rv), "flush only for RISC-V");
      chk(!set_mode, "no mode change on branch");
    end
    // call in RISC-V mode
    @(negedge clk);
    pc = 32'h100; rv = 1'b1;
    ctrl = '0; ctrl.trig = 1'b1; ctrl.op = 5'(CU_CALL); ctrl.t = 32'h400;
    #1 chk(redirect && target == 32'h400, "call target");
    @(negedge clk); ctrl = '0; #1;
    chk(result == 32'h104, "RISC-V link");
    // call in exposed-datapath mode: after the two delay slots
    pc = 32'h208; rv = 1'b0;
    ctrl.trig = 1'b1; ctrl.op = 5'(CU_CALL); ctrl.t = 32'h400;
    #1 chk(!flush, "no flush in exposed-datapath mode");
    @(negedge clk); ctrl = '0; #1;
    chk(result == 32'h220, "exposed-datapath link");
    // jalr with offset, bit 0 cleared
    rv = 1'b1; pc = 32'h40;
    ctrl.o2_we = 1'b1; ctrl.o2 = 32'd5; ctrl.trig = 1'b1; ctrl.op = 5'(CU_JALR); ctrl.t = 32'h1000;
    #1 chk(redirect && target == 32'h1004, "jalr target");
    @(negedge clk); ctrl = '0; #1;
    chk(result == 32'h44, "jalr link");
    // mode switches
    ctrl.trig = 1'b1; ctrl.op = 5'(CU_SWTTA); ctrl.t = 32'h800;
    #1 chk(redirect && set_mode && mode_tta && target == 32'h800, "switch to TTA");
    @(negedge clk);
    rv = 1'b0; ctrl.op = 5'(CU_SWRV); ctrl.t = 32'h900;
    #1 chk(redirect && set_mode && !mode_tta && target == 32'h900 && !flush, "switch to RISC-V");
    @(negedge clk); ctrl = '0;
    #1 chk(!redirect && !set_mode, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
