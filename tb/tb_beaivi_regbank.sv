// Unit test of the flip-flop register bank in its 512-byte data size:
// reset clears it, then random byte-enabled reads and writes on both ports
// (port A wins on a byte written by both in one cycle) are compared with a
// reference array, with read data one cycle after the request.
module tb_beaivi_regbank;
  localparam int WORDS = 128;
  localparam int AW = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  logic a_req, a_we, b_req, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [3:0] a_be, b_be;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  beaivi_regbank #(.W(32), .WORDS(WORDS)) dut (.*);
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    a_req = 0; b_req = 0; a_we = 0; b_we = 0; a_addr = '0; b_addr = '0;
    a_be = '0; b_be = '0; a_wdata = '0; b_wdata = '0;
    for (int i = 0; i < WORDS; i++) ref_mem[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      automatic logic [AW-1:0] x = AW'($urandom), y = AW'($urandom);
      automatic logic [31:0] ea, eb;
      if ($urandom_range(0, 7) == 0) y = x;
      @(negedge clk);
      a_req = 1'($urandom); a_we = 1'($urandom); a_addr = x; a_be = 4'($urandom); a_wdata = $urandom;
      b_req = 1'($urandom); b_we = 1'($urandom); b_addr = y; b_be = 4'($urandom); b_wdata = $urandom;
      ea = a_req ? ref_mem[x] : a_rdata;
      eb = b_req ? ref_mem[y] : b_rdata;
      for (int k = 0; k < 4; k++) begin
        if (b_req && b_we && b_be[k]) ref_mem[y][8*k +: 8] = b_wdata[8*k +: 8];
        if (a_req && a_we && a_be[k]) ref_mem[x][8*k +: 8] = a_wdata[8*k +: 8];
      end
      @(posedge clk); #1;
      checks += 2;
      if (a_rdata !== ea) begin failures++; $display("FAIL A %0d %h %h", x, a_rdata, ea); end
      if (b_rdata !== eb) begin failures++; $display("FAIL B %0d %h %h", y, b_rdata, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
