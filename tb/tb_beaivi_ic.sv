// Unit test of the transport network: random instructions of five moves
// (register, FU-result, short- and long-immediate sources; register,
// operand, trigger and boolean destinations; all guard codes) are decoded
// and every produced control signal is compared with an independent model of
// the move semantics. Instructions that would need a third register read port
// or a second register write are not generated.
module tb_beaivi_ic;
  import beaivi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  dec_instr_t ins;
  logic [1:0] bool_q, bool_we, bool_wdata;
  logic [31:0] alu_r, simd_r, mul_r, lsu_r, ra_r, rf_rdata0, rf_rdata1, rf_wdata, imm_q;
  logic [4:0] rf_raddr0, rf_raddr1, rf_waddr;
  logic rf_we;
  fu_ctrl_t alu_c, simd_c, mul_c, lsu_c, cu_c;
  logic [NSLOTS-1:0] move_act;
  logic [31:0] regs [32];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  beaivi_ic dut (.*);
  assign rf_rdata0 = (rf_raddr0 == 0) ? 0 : regs[rf_raddr0];
  assign rf_rdata1 = (rf_raddr1 == 0) ? 0 : regs[rf_raddr1];
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [31:0] imm_model = 0;

  // sockets that share one control bundle count as one destination
  function automatic int grp(input logic [6:0] d);
    if (d < 7'h20) return 0;
    if (d inside {[7'h20:7'h3F]}) return 7'h20;
    if (d inside {[7'h50:7'h5F]}) return 7'h50;
    if (d inside {[7'h60:7'h67]}) return 7'h60;
    if (d inside {[7'h68:7'h6F]}) return 7'h68;
    if (d inside {[7'h70:7'h7F]}) return 7'h70;
    return int'(d);
  endfunction

  initial begin
    ins = '0;
    for (int s = 0; s < NSLOTS; s++) ins.moves[s] = MOVE_NOP;
    for (int i = 0; i < 32; i++) regs[i] = $urandom;
    alu_r = $urandom; simd_r = $urandom; mul_r = $urandom; lsu_r = $urandom; ra_r = $urandom;
    bool_q = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 2000; it++) begin
      automatic int nreads = 0, nwrites = 0;
      automatic int rd_a = -1, rd_b = -1;
      logic [31:0] v [NSLOTS];
      bit en [NSLOTS];
      logic [127:0] used;
      @(negedge clk);
      bool_q = 2'($urandom);
      ins = '0;
      used = '0;
      ins.valid = ($urandom % 8) != 0;
      ins.imm_we = $urandom % 2;
      ins.imm = $urandom;
      for (int s = 0; s < NSLOTS; s++) begin
        move_t m;
        int k;
        m.guard = 2'($urandom);
        // source
        k = $urandom % 4;
        if (k == 0) begin
          automatic int r = $urandom % 32;
          if (r != 0 && r != rd_a && r != rd_b) begin
            if (rd_a < 0) rd_a = r; else if (rd_b < 0) rd_b = r; else r = rd_a;
          end
          m.src = 6'(r);
        end else if (k == 1) m.src = {2'b11, 4'($urandom)};
        else m.src = 6'h20 + 6'($urandom % 8);
        // destination, each socket at most once
        for (int tries = 0; tries < 20; tries++) begin
          k = $urandom % 6;
          if (k == 0) m.dst = (nwrites == 0) ? 7'($urandom % 32) : D_NOP;
          else if (k == 1) m.dst = 7'h41 + 7'($urandom % 11);
          else if (k == 2) m.dst = D_ALU_T + 7'($urandom % 16);
          else if (k == 3) m.dst = D_SIMD_T + 7'($urandom % 27);
          else if (k == 4) m.dst = 7'h60 + 7'($urandom % 32);
          else m.dst = D_NOP;
          if (m.dst == D_NOP || !used[grp(m.dst)]) break;
          m.dst = D_NOP;
        end
        if (m.dst != D_NOP) used[grp(m.dst)] = 1'b1;
        if (m.dst[6:5] == 2'b00) nwrites++;
        ins.moves[s] = m;
      end
      if (ins.valid && ins.imm_we) imm_model = ins.imm;
      #1;
      // model
      for (int s = 0; s < NSLOTS; s++) begin
        automatic move_t m = ins.moves[s];
        automatic bit g = (m.guard == 0) || (m.guard == 1 && bool_q[0]) || (m.guard == 2 && !bool_q[0]) ||
                (m.guard == 3 && bool_q[1]);
        en[s] = ins.valid && g && m.dst != D_NOP;
        if (m.src < 6'h20) v[s] = (m.src == 0) ? 0 : regs[m.src];
        else if (m.src >= 6'h30) v[s] = 32'(signed'(m.src[3:0]));
        else case (m.src)
          S_ALU: v[s] = alu_r;  S_SIMD: v[s] = simd_r; S_MUL: v[s] = mul_r;
          S_LSU: v[s] = lsu_r;  S_RA: v[s] = ra_r;
          S_IMM: v[s] = ins.imm_we ? ins.imm : imm_model;
          S_B0: v[s] = bool_q[0]; S_B1: v[s] = bool_q[1]; default: v[s] = 0;
        endcase
      end
      begin
        automatic bit wr = 0, alu_t = 0, simd_t = 0, b0 = 0;
        for (int s = 0; s < NSLOTS; s++) begin
          automatic move_t m = ins.moves[s];
          if (!en[s]) continue;
          if (m.dst < 7'h20) begin
            wr = 1;
            chk(rf_we && rf_waddr == m.dst[4:0] && rf_wdata == v[s], "rf write");
          end else if (m.dst inside {[7'h50:7'h5F]}) begin
            alu_t = 1;
            chk(alu_c.trig && alu_c.op == 5'(m.dst - 7'h50) && alu_c.t == v[s], "alu trigger");
          end else if (m.dst inside {[7'h20:7'h3F]}) begin
            simd_t = 1;
            chk(simd_c.trig && simd_c.op == 5'(m.dst - 7'h20) && simd_c.t == v[s], "simd trigger");
          end else if (m.dst inside {[7'h60:7'h67]})
            chk(mul_c.trig && mul_c.op == 5'(m.dst - 7'h60) && mul_c.t == v[s], "mul trigger");
          else if (m.dst inside {[7'h68:7'h6F]})
            chk(lsu_c.trig && lsu_c.op == 5'(m.dst - 7'h68) && lsu_c.t == v[s], "lsu trigger");
          else if (m.dst inside {[7'h70:7'h7F]})
            chk(cu_c.trig && cu_c.op == 5'(m.dst - 7'h70) && cu_c.t == v[s], "cu trigger");
          else case (m.dst)
            D_ALU_O1:  chk(alu_c.o1_we && alu_c.o1 == v[s], "alu o1");
            D_SIMD_O1: chk(simd_c.o1_we && simd_c.o1 == v[s], "simd o1");
            D_SIMD_O2: chk(simd_c.o2_we && simd_c.o2 == v[s], "simd o2");
            D_MUL_O1:  chk(mul_c.o1_we && mul_c.o1 == v[s], "mul o1");
            D_MUL_O2:  chk(mul_c.o2_we && mul_c.o2 == v[s], "mul o2");
            D_LSU_O1:  chk(lsu_c.o1_we && lsu_c.o1 == v[s], "lsu o1");
            D_LSU_O2:  chk(lsu_c.o2_we && lsu_c.o2 == v[s], "lsu o2");
            D_CU_O1:   chk(cu_c.o1_we && cu_c.o1 == v[s], "cu o1");
            D_CU_O2:   chk(cu_c.o2_we && cu_c.o2 == v[s], "cu o2");
            D_B0:      chk(bool_we[0] && bool_wdata[0] == v[s][0], "b0");
            D_B1:      chk(bool_we[1] && bool_wdata[1] == v[s][0], "b1");
            default: ;
          endcase
        end
        chk(rf_we == wr, "no spurious rf write");
        chk(alu_c.trig == alu_t && simd_c.trig == simd_t, "no spurious trigger");
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
