// Unit test of the load-store unit with a data memory: byte, halfword and
// word stores at random addresses (address = base + offset) mirrored in a
// reference byte array, then loads of every width with sign/zero extension,
// each checked exactly two cycles after its trigger.
module tb_beaivi_lsu;
  import beaivi_pkg::*;
  localparam int AW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  fu_ctrl_t ctrl;
  logic [31:0] result;
  logic mem_req, mem_we;
  logic [AW-1:0] mem_addr;
  logic [3:0] mem_be;
  logic [31:0] mem_wdata, mem_rdata, b_rdata;
  logic [7:0] refm [1024];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  beaivi_lsu #(.AW(AW)) dut (.*);
  beaivi_dmem #(.WORDS(256)) mem (
    .clk, .a_req(mem_req), .a_we(mem_we), .a_addr(mem_addr), .a_be(mem_be),
    .a_wdata(mem_wdata), .a_rdata(mem_rdata),
    .b_req(1'b0), .b_we(1'b0), .b_addr('0), .b_be('0), .b_wdata('0), .b_rdata(b_rdata));
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic trig(input lsu_op_e op, input logic [31:0] base, off, data);
    @(negedge clk);
    ctrl = '0;
    ctrl.o1_we = 1'b1; ctrl.o1 = data; ctrl.o2_we = 1'b1; ctrl.o2 = off;
    ctrl.trig = 1'b1; ctrl.op = 5'(op); ctrl.t = base;
    @(negedge clk); ctrl = '0;
  endtask

  logic [31:0] prev;
  initial begin
    ctrl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1024; i += 4) begin
      automatic logic [31:0] d = $urandom;
      trig(LS_SW, 32'(i), 0, d);
      for (int k = 0; k < 4; k++) refm[i + k] = d[8*k +: 8];
    end
    for (int i = 0; i < 300; i++) begin
      automatic int a = $urandom % 1024;
      automatic logic [31:0] d = $urandom;
      automatic int off = ($urandom % 64) - 32;
      case (i % 3)
        0: begin trig(LS_SB, 32'(a - off), 32'(off), d); refm[a] = d[7:0]; end
        1: begin a &= ~1; trig(LS_SH, 32'(a - off), 32'(off), d); refm[a] = d[7:0]; refm[a+1] = d[15:8]; end
        default: begin a &= ~3; trig(LS_SW, 32'(a), 0, d);
          for (int k = 0; k < 4; k++) refm[a + k] = d[8*k +: 8]; end
      endcase
    end
    for (int i = 0; i < 400; i++) begin
      automatic int a = $urandom % 1024;
      lsu_op_e op;
      logic [31:0] exp;
      case (i % 5)
        0: begin op = LS_LB;  exp = {{24{refm[a][7]}}, refm[a]}; end
        1: begin op = LS_LBU; exp = {24'd0, refm[a]}; end
        2: begin op = LS_LH;  a &= ~1; exp = {{16{refm[a+1][7]}}, refm[a+1], refm[a]}; end
        3: begin op = LS_LHU; a &= ~1; exp = {16'd0, refm[a+1], refm[a]}; end
        default: begin op = LS_LW; a &= ~3; exp = {refm[a+3], refm[a+2], refm[a+1], refm[a]}; end
      endcase
      trig(op, 32'(a - 8), 32'd8, 0);      // one edge after trigger: not yet
      if (i > 0) begin
        checks++;
        if (result !== prev) begin failures++; $display("FAIL load result early"); end
      end
      @(negedge clk);                      // two edges: result
      checks++;
      if (result !== exp) begin
        failures++;
        $display("FAIL load op %0d addr %0d got %h exp %h", op, a, result, exp);
      end
      prev = exp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
