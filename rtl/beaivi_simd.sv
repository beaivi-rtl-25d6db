// DSP extension unit: packed 8x4 / 16x2 SIMD and fixed-point operations.
//
// Operands: o1 (a), o2 (third input c: accumulator or shuffle control) and
// the trigger value t (b). Operations:
//   ADD/SUB        lane-wise wrapping add/subtract
//   ADDRHI/SUBRHI  (a +/- b + 1) computed one bit wider than the lane, upper
//                  lane-width bits kept (rounded halving add/sub); signed
//                  operands are sign-extended, unsigned zero-extended
//   MULRHI         signed lane product, rounded upper half: (a*b + 2^(W-1)) >> W
//   REFLECT        32-bit bit reversal of a
//   SATACCDOT      c + sum(a_i * b_i), saturated to 32-bit signed/unsigned
//   SATSUBU        lane-wise max(a - b, 0)
//   SHRRU          lane-wise (a + 2^(s-1)) >> s, s = b[4:0], saturated to lane max
//   SHUFFLE2       output lane i = lane c_i of the concatenation {b, a}
//   VCAST          8x4: zero-extend byte pair b[0] ? {a3,a2} : {a1,a0} to 16x2;
//                  16x2: saturate both halfwords of a to bytes, placed in the
//                  low (b[0]=0) or high (b[0]=1) half of the result
// The operation set follows the document's table of custom instructions; the
// exact rounding points, lane orders and operand roles are this design's own.
// Latency LAT_SIMD (2) cycles, fully pipelined.
module beaivi_simd
  import beaivi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  fu_ctrl_t    ctrl,
  output logic [31:0] result
);
  logic [31:0] o1_q, o2_q, a, b, c, r;

  assign a = ctrl.o1_we ? ctrl.o1 : o1_q;
  assign c = ctrl.o2_we ? ctrl.o2 : o2_q;
  assign b = ctrl.t;

  function automatic logic [31:0] rhi8(input logic [31:0] x, y, input logic sub, sgn);
    logic [31:0] q;
    for (int i = 0; i < 4; i++) begin
      logic [8:0] xe, ye, s;
      xe = {sgn & x[8*i+7], x[8*i +: 8]};
      ye = {sgn & y[8*i+7], y[8*i +: 8]};
      s  = sub ? (xe - ye + 9'd1) : (xe + ye + 9'd1);
      q[8*i +: 8] = s[8:1];
    end
    return q;
  endfunction

  function automatic logic [31:0] rhi16(input logic [31:0] x, y, input logic sub, sgn);
    logic [31:0] q;
    for (int i = 0; i < 2; i++) begin
      logic [16:0] xe, ye, s;
      xe = {sgn & x[16*i+15], x[16*i +: 16]};
      ye = {sgn & y[16*i+15], y[16*i +: 16]};
      s  = sub ? (xe - ye + 17'd1) : (xe + ye + 17'd1);
      q[16*i +: 16] = s[16:1];
    end
    return q;
  endfunction

  function automatic logic [31:0] dot(input logic [31:0] x, y, acc, input logic sgn, w16);
    logic signed [35:0] s;
    logic [31:0] q;
    s = sgn ? 36'(signed'(acc)) : 36'(acc);
    if (w16) begin
      for (int i = 0; i < 2; i++) begin
        logic signed [16:0] xe, ye;
        xe = {sgn & x[16*i+15], x[16*i +: 16]};
        ye = {sgn & y[16*i+15], y[16*i +: 16]};
        s = s + 36'(xe * ye);
      end
    end else begin
      for (int i = 0; i < 4; i++) begin
        logic signed [8:0] xe, ye;
        xe = {sgn & x[8*i+7], x[8*i +: 8]};
        ye = {sgn & y[8*i+7], y[8*i +: 8]};
        s = s + 36'(xe * ye);
      end
    end
    if (sgn) begin
      if (s > 36'sh0_7FFF_FFFF)       q = 32'h7FFF_FFFF;
      else if (s < -36'sh0_8000_0000) q = 32'h8000_0000;
      else                            q = s[31:0];
    end else begin
      if (s < 0)                      q = 32'h0;
      else if (s > 36'sh0_FFFF_FFFF)  q = 32'hFFFF_FFFF;
      else                            q = s[31:0];
    end
    return q;
  endfunction

  logic [63:0] ba;
  logic [15:0] pk;
  logic [39:0] sh8;
  logic [47:0] sh16;
  logic signed [15:0] p8;
  logic signed [31:0] p16;

  always_comb begin
    r    = '0;
    ba   = {b, a};
    pk   = '0;
    sh8  = '0;
    sh16 = '0;
    p8   = '0;
    p16  = '0;
    unique case (simd_op_e'(ctrl.op))
      SI_ADD8:  for (int i = 0; i < 4; i++) r[8*i +: 8]   = a[8*i +: 8] + b[8*i +: 8];
      SI_ADD16: for (int i = 0; i < 2; i++) r[16*i +: 16] = a[16*i +: 16] + b[16*i +: 16];
      SI_SUB8:  for (int i = 0; i < 4; i++) r[8*i +: 8]   = a[8*i +: 8] - b[8*i +: 8];
      SI_SUB16: for (int i = 0; i < 2; i++) r[16*i +: 16] = a[16*i +: 16] - b[16*i +: 16];
      SI_ADDRHI_S8:  r = rhi8 (a, b, 1'b0, 1'b1);
      SI_ADDRHI_S16: r = rhi16(a, b, 1'b0, 1'b1);
      SI_ADDRHI_U8:  r = rhi8 (a, b, 1'b0, 1'b0);
      SI_ADDRHI_U16: r = rhi16(a, b, 1'b0, 1'b0);
      SI_SUBRHI_S8:  r = rhi8 (a, b, 1'b1, 1'b1);
      SI_SUBRHI_S16: r = rhi16(a, b, 1'b1, 1'b1);
      SI_SUBRHI_U8:  r = rhi8 (a, b, 1'b1, 1'b0);
      SI_SUBRHI_U16: r = rhi16(a, b, 1'b1, 1'b0);
      SI_MULRHI8:
        for (int i = 0; i < 4; i++) begin
          p8 = $signed(a[8*i +: 8]) * $signed(b[8*i +: 8]);
          p8 = p8 + 16'sd128;
          r[8*i +: 8] = p8[15:8];
        end
      SI_MULRHI16:
        for (int i = 0; i < 2; i++) begin
          p16 = $signed(a[16*i +: 16]) * $signed(b[16*i +: 16]);
          p16 = p16 + 32'sd32768;
          r[16*i +: 16] = p16[31:16];
        end
      SI_REFLECT: for (int i = 0; i < 32; i++) r[i] = a[31-i];
      SI_DOT_S8:  r = dot(a, b, c, 1'b1, 1'b0);
      SI_DOT_S16: r = dot(a, b, c, 1'b1, 1'b1);
      SI_DOT_U8:  r = dot(a, b, c, 1'b0, 1'b0);
      SI_DOT_U16: r = dot(a, b, c, 1'b0, 1'b1);
      SI_SATSUBU8:
        for (int i = 0; i < 4; i++)
          r[8*i +: 8] = (a[8*i +: 8] > b[8*i +: 8]) ? a[8*i +: 8] - b[8*i +: 8] : 8'd0;
      SI_SATSUBU16:
        for (int i = 0; i < 2; i++)
          r[16*i +: 16] = (a[16*i +: 16] > b[16*i +: 16]) ? a[16*i +: 16] - b[16*i +: 16] : 16'd0;
      SI_SHRRU8:
        for (int i = 0; i < 4; i++) begin
          sh8 = 40'(a[8*i +: 8]);
          if (b[4:0] != 0) sh8 = (sh8 + (40'd1 << (b[4:0] - 5'd1))) >> b[4:0];
          r[8*i +: 8] = (sh8 > 40'd255) ? 8'hFF : sh8[7:0];
        end
      SI_SHRRU16:
        for (int i = 0; i < 2; i++) begin
          sh16 = 48'(a[16*i +: 16]);
          if (b[4:0] != 0) sh16 = (sh16 + (48'd1 << (b[4:0] - 5'd1))) >> b[4:0];
          r[16*i +: 16] = (sh16 > 48'd65535) ? 16'hFFFF : sh16[15:0];
        end
      SI_SHUF8:
        for (int i = 0; i < 4; i++) r[8*i +: 8] = ba[8*c[8*i +: 3] +: 8];
      SI_SHUF16:
        for (int i = 0; i < 2; i++) r[16*i +: 16] = ba[16*c[16*i +: 2] +: 16];
      SI_VCAST8:
        r = b[0] ? {8'd0, a[31:24], 8'd0, a[23:16]} : {8'd0, a[15:8], 8'd0, a[7:0]};
      SI_VCAST16: begin
        pk[7:0]  = (a[15:0]  > 16'd255) ? 8'hFF : a[7:0];
        pk[15:8] = (a[31:16] > 16'd255) ? 8'hFF : a[23:16];
        r = b[0] ? {pk, 16'd0} : {16'd0, pk};
      end
      default: r = '0;
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

  beaivi_fu_pipe #(.LAT(LAT_SIMD), .W(32)) u_pipe (
    .clk, .rst_n, .in_valid(ctrl.trig), .in(r), .out(result)
  );
endmodule
