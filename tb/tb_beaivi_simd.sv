// Unit test of the SIMD/DSP unit: every operation on random and corner-case
// lanes against a lane-by-lane integer reference model written here, plus
// hand-computed vectors, and the two-cycle latency.
module tb_beaivi_simd;
  import beaivi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  fu_ctrl_t ctrl;
  logic [31:0] result;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  beaivi_simd dut (.*);
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int lane(input logic [31:0] x, input int w, i, input bit sgn);
    int v = int'((x >> (w * i)) & ((1 << w) - 1));
    if (sgn && v >= (1 << (w - 1))) v -= (1 << w);
    return v;
  endfunction

  function automatic logic [31:0] ref_simd(input int op, input logic [31:0] a, b, c);
    logic [31:0] r = 0;
    int w, n;
    w = (op inside {1,3,5,7,9,11,13,16,18,20,22,24}) ? 16 : 8;
    n = 32 / w;
    case (op)
      14: begin for (int i = 0; i < 32; i++) r[i] = a[31 - i]; return r; end
      15, 16, 17, 18: begin
        longint s;
        bit sg = (op == 15 || op == 16);
        s = sg ? longint'(signed'(c)) : longint'(c);
        for (int i = 0; i < n; i++) s += longint'(lane(a, w, i, sg)) * longint'(lane(b, w, i, sg));
        if (sg) begin
          if (s > 64'sd2147483647) s = 64'sd2147483647;
          if (s < -64'sd2147483648) s = -64'sd2147483648;
        end else begin
          if (s > 64'sd4294967295) s = 64'sd4294967295;
          if (s < 0) s = 0;
        end
        return 32'(s);
      end
      25: begin
        int lo = b[0] ? 2 : 0;
        return {8'd0, 8'(lane(a, 8, lo + 1, 0)), 8'd0, 8'(lane(a, 8, lo, 0))};
      end
      26: begin
        int h0 = lane(a, 16, 0, 0), h1 = lane(a, 16, 1, 0);
        logic [15:0] pk = {8'(h1 > 255 ? 255 : h1), 8'(h0 > 255 ? 255 : h0)};
        return b[0] ? {pk, 16'd0} : {16'd0, pk};
      end
      default: ;
    endcase
    for (int i = 0; i < n; i++) begin
      longint x, y, v;
      bit sg = op inside {4, 5, 8, 9, 12, 13};
      x = lane(a, w, i, sg); y = lane(b, w, i, sg);
      case (op)
        0, 1: v = x + y;
        2, 3: v = x - y;
        4, 5, 6, 7: v = (x + y + 1) >>> 1;
        8, 9, 10, 11: v = (x - y + 1) >>> 1;
        12, 13: v = (x * y + (longint'(1) << (w - 1))) >>> w;
        19, 20: v = (x > y) ? x - y : 0;
        21, 22: begin
          int s = int'(b[4:0]);
          v = (s == 0) ? x : ((x + (longint'(1) << (s - 1))) >> s);
          if (v > (1 << w) - 1) v = (1 << w) - 1;
        end
        23, 24: begin
          int sel = (w == 8) ? int'(c[8*i +: 3]) : int'(c[16*i +: 2]);
          v = (sel < n) ? lane(a, w, sel, 0) : lane(b, w, sel - n, 0);
        end
        default: v = 0;
      endcase
      r[w*i +: 16] = 16'(v);
    end
    return r;
  endfunction

  task automatic run_op(input int op, input logic [31:0] a, b, c, input logic [31:0] exp);
    @(negedge clk);
    ctrl = '0;
    ctrl.o1_we = 1'b1; ctrl.o1 = a; ctrl.o2_we = 1'b1; ctrl.o2 = c;
    ctrl.trig = 1'b1; ctrl.op = 5'(op); ctrl.t = b;
    @(negedge clk); ctrl = '0;
    @(negedge clk);
    checks++;
    if (result !== exp) begin
      failures++;
      $display("FAIL op %0d a=%h b=%h c=%h got %h exp %h", op, a, b, c, result, exp);
    end
  endtask

  initial begin
    ctrl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // hand-computed vectors
    run_op(SI_ADDRHI_S8, 32'h7F7F_FF01, 32'h0101_FF01, 0, 32'h4040_FF01);
    run_op(SI_SATSUBU8,  32'h0A64_0005, 32'h0B17_0003, 0, 32'h004D_0002);
    run_op(SI_REFLECT,   32'h0000_0001, 0, 0, 32'h8000_0000);
    run_op(SI_DOT_S8,    32'h0102_03FF, 32'h0101_0102, 32'd10, 32'd14);   // 1+2+3-2+10
    run_op(SI_DOT_S16,   32'h7FFF_7FFF, 32'h7FFF_7FFF, 32'h7FFF_0000, 32'h7FFF_FFFF); // saturates
    run_op(SI_MULRHI16,  32'h4000_C000, 32'h4000_4000, 0, 32'h1000_F000);
    run_op(SI_SHRRU8,    32'hFF03_0201, 32'd1, 0, 32'h8002_0101);
    run_op(SI_SHUF8,     32'h4433_2211, 32'h8877_6655, 32'h0007_0400, 32'h1188_5511);
    run_op(SI_VCAST16,   32'h0100_0042, 32'd1, 0, 32'hFF42_0000);
    // random operands, every operation
    for (int i = 0; i < 27 * 30; i++) begin
      logic [31:0] a, b, c;
      automatic int op = i % 27;
      a = $urandom; b = $urandom; c = $urandom;
      if (i % 5 == 0) b = $urandom % 20;
      run_op(op, a, b, c, ref_simd(op, a, b, c));
    end
    // latency: not visible after one edge
    @(negedge clk);
    ctrl = '0; ctrl.o1_we = 1'b1; ctrl.o1 = 32'h0101_0101; ctrl.trig = 1'b1;
    ctrl.op = 5'(SI_ADD8); ctrl.t = 32'h0202_0202;
    @(negedge clk); ctrl = '0;
    checks++; if (result == 32'h0303_0303) begin failures++; $display("FAIL latency"); end
    @(negedge clk);
    checks++; if (result != 32'h0303_0303) begin failures++; $display("FAIL latency 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
