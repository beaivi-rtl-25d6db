// Unit test of the multiplier: MUL/MULH/MULHSU/MULHU/MAC on random operands
// against 64-bit reference arithmetic, the 3-cycle latency (the result
// register must not change before the third edge) and back-to-back issue.
module tb_beaivi_mul;
  import beaivi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  fu_ctrl_t ctrl;
  logic [31:0] result;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  beaivi_mul dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [31:0] ref_mul(input int op, input logic [31:0] a, b, c);
    longint sa = longint'(signed'(a)), sb = longint'(signed'(b));
    longint ua = longint'(a), ub = longint'(b);
    logic [127:0] p;
    case (op)
      0: return 32'(ua * ub);
      1: begin p = 128'(sa * sb); return p[63:32]; end
      2: begin p = 128'(sa * ub); return p[63:32]; end
      3: begin p = 128'(ua * ub); return p[63:32]; end
      default: return c + 32'(ua * ub);
    endcase
  endfunction

  logic [31:0] expq [$];
  initial begin
    ctrl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // latency check
    @(negedge clk);
    ctrl.o1_we = 1'b1; ctrl.o1 = 32'd7; ctrl.trig = 1'b1; ctrl.op = 5'(MU_MUL); ctrl.t = 32'd6;
    @(negedge clk); ctrl = '0;
    checks++; if (result == 32'd42) failures++;
    @(negedge clk);
    checks++; if (result == 32'd42) failures++;
    @(negedge clk);
    checks++; if (result != 32'd42) begin failures++; $display("FAIL latency"); end
    // pipelined stream: one trigger per cycle
    for (int i = 0; i < 300; i++) begin
      logic [31:0] a, b, c;
      int op;
      a = $urandom; b = $urandom; c = $urandom; op = i % 5;
      if (i % 11 == 0) a = 32'h8000_0000;
      @(negedge clk);
      ctrl = '0;
      ctrl.o1_we = 1'b1; ctrl.o1 = a; ctrl.o2_we = 1'b1; ctrl.o2 = c;
      ctrl.trig = 1'b1; ctrl.op = 5'(op); ctrl.t = b;
      expq.push_back(ref_mul(op, a, b, c));
      if (i >= 2) begin
        @(posedge clk); #1;
        checks++;
        if (result !== expq.pop_front()) begin failures++; $display("FAIL stream %0d", i); end
      end
    end
    @(negedge clk); ctrl = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
