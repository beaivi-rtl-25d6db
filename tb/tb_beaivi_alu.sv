// Unit test of the ALU: random operands for every operation, the operand
// written in the trigger cycle or earlier, result checked one cycle later
// against a reference model in the testbench.
module tb_beaivi_alu;
  import beaivi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  fu_ctrl_t ctrl;
  logic [31:0] result;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  beaivi_alu dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [31:0] ref_alu(input int op, input logic [31:0] a, b);
    int sa = signed'(a), sb = signed'(b);
    case (op)
      0: return a + b;            1: return a - b;
      2: return a & b;            3: return a | b;
      4: return a ^ b;            5: return a << (b % 32);
      6: return a >> (b % 32);    7: return 32'(sa >>> (b % 32));
      8: return (sa < sb) ? 1 : 0;   9: return (a < b) ? 1 : 0;
      10: return (a == b) ? 1 : 0;   11: return (a != b) ? 1 : 0;
      12: return (sa >= sb) ? 1 : 0; 13: return (a >= b) ? 1 : 0;
      14: return (sa < sb) ? a : b;  default: return (sa > sb) ? a : b;
    endcase
  endfunction

  initial begin
    ctrl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      logic [31:0] a, b;
      int op;
      a = $urandom; b = (i % 3 == 0) ? 32'($urandom % 40) : $urandom;
      if (i % 7 == 0) b = a;
      op = i % 16;
      @(negedge clk);
      ctrl = '0;
      if (i % 2 == 0) begin   // operand in an earlier cycle
        ctrl.o1_we = 1'b1; ctrl.o1 = a;
        @(negedge clk);
        ctrl = '0;
      end else begin
        ctrl.o1_we = 1'b1; ctrl.o1 = a;
      end
      ctrl.trig = 1'b1; ctrl.op = 5'(op); ctrl.t = b;
      @(negedge clk);
      ctrl = '0;
      checks++;
      if (result !== ref_alu(op, a, b)) begin
        failures++;
        $display("FAIL op %0d a=%h b=%h got %h exp %h", op, a, b, result, ref_alu(op, a, b));
      end
      @(negedge clk);  // result holds without a trigger
      checks++;
      if (result !== ref_alu(op, a, b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
