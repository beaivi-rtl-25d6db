// Unit test of the dictionary decompressor: a header announcing N fill words
// programs random entries into the five dictionaries (more entries than the
// narrow dictionaries hold, which must be dropped), then random bundles are
// expanded and each of the three output instructions is compared with the
// entries a reference copy of the dictionaries holds. Checks that a bundle
// takes exactly three cycles with hold raised in the first two, that header
// and fill words decode as no-ops and that uncompressed and long-immediate
// words pass unchanged.
module tb_beaivi_decompressor;
  import beaivi_pkg::*;
  import beaivi_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid, kill, hold, ev_header, ev_fill, ev_comp;
  logic [63:0] word, out;
  logic [14:0] refd [5][32];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  beaivi_decompressor dut (.*);
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam int WID [5] = '{15, 15, 8, 8, 15};
  localparam int LSB [5] = '{0, 15, 30, 38, 46};
  localparam int DEP [5] = '{16, 32, 8, 8, 32};

  function automatic logic [63:0] expect_word(input logic [19:0] c);
    logic [63:0] w = {3'b110, 61'd0};
    int idx [5];
    idx[0] = c[3:0]; idx[1] = c[8:4]; idx[2] = c[11:9]; idx[3] = c[14:12]; idx[4] = c[19:15];
    for (int k = 0; k < 5; k++)
      for (int b = 0; b < WID[k]; b++) w[LSB[k] + b] = refd[k][idx[k]][b];
    return w;
  endfunction

  initial begin
    valid = 0; kill = 0; word = '0;
    for (int k = 0; k < 5; k++) for (int e = 0; e < 32; e++) refd[k][e] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 3; round++) begin
      automatic int n = (round == 0) ? 32 : 5 + round;
      // header
      @(negedge clk);
      valid = 1; word = header(n);
      #1 chk(ev_header && !ev_fill && !hold, "header seen");
      chk(out == pack_moves('{default: MOVE_NOP}), "header is a no-op");
      for (int e = 0; e < n; e++) begin
        logic [63:0] w;
        @(negedge clk);
        w = {2'b01, 62'($urandom) << 32 | 62'($urandom)};
        word = w;
        for (int k = 0; k < 5; k++)
          if (e < DEP[k]) for (int b = 0; b < WID[k]; b++) refd[k][e][b] = w[LSB[k] + b];
        #1 chk(ev_fill && !ev_header, "fill seen");
        chk(out == pack_moves('{default: MOVE_NOP}), "fill is a no-op");
      end
      // bundles
      for (int bnum = 0; bnum < 40; bnum++) begin
        logic [19:0] c [3];
        for (int j = 0; j < 3; j++) c[j] = 20'($urandom);
        @(negedge clk);
        word = bundle(c[2], c[1], c[0]);
        for (int j = 0; j < 3; j++) begin
          #1;
          chk(ev_comp, "bundle seen");
          chk(hold == (j < 2), "hold during the first two cycles");
          chk(out == expect_word(c[j]), $sformatf("bundle instr %0d", j));
          if (j < 2) @(negedge clk);
        end
      end
    end
    // uncompressed and long immediate pass through
    @(negedge clk);
    word = {2'b11, 62'h1234_5678_9ABC_DEF};
    #1 chk(out == word && !hold && !ev_comp, "uncompressed passes");
    @(negedge clk);
    word = limm(32'hCAFE_F00D);
    #1 chk(out == word && !hold, "long immediate passes");
    // invalid cycles leave the state alone
    @(negedge clk);
    valid = 0; word = header(3);
    #1 chk(!ev_header && !hold, "invalid ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
