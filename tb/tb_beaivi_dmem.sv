// Unit test of the data scratchpad: random byte-enabled writes and reads on
// both ports (never the same word on both in one cycle) against a reference
// array; read data must appear one cycle after the request.
module tb_beaivi_dmem;
  localparam int WORDS = 16384;
  localparam int AW = 14;
  logic clk = 1'b0;
  logic a_req, a_we, b_req, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [3:0] a_be, b_be;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  beaivi_dmem dut (.*);
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    a_req = 0; b_req = 0; a_we = 0; b_we = 0; a_addr = '0; b_addr = '0;
    a_be = '0; b_be = '0; a_wdata = '0; b_wdata = '0;
    // initialise a small window so reads are defined
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      b_req = 1; b_we = 1; b_be = 4'hF; b_addr = AW'(i); b_wdata = $urandom;
      ref_mem[i] = b_wdata;
    end
    for (int i = 0; i < 4000; i++) begin
      automatic logic [AW-1:0] x = AW'($urandom_range(0, 63));
      automatic logic [AW-1:0] y = AW'($urandom_range(0, 63));
      automatic logic [31:0] ea, eb;
      if (x == y) y = y ^ 1;
      @(negedge clk);
      a_req = 1; a_we = $urandom_range(0, 1); a_addr = x; a_be = 4'($urandom); a_wdata = $urandom;
      b_req = 1; b_we = $urandom_range(0, 1); b_addr = y; b_be = 4'($urandom); b_wdata = $urandom;
      ea = ref_mem[x]; eb = ref_mem[y];
      for (int k = 0; k < 4; k++) begin
        if (a_we && a_be[k]) ref_mem[x][8*k +: 8] = a_wdata[8*k +: 8];
        if (b_we && b_be[k]) ref_mem[y][8*k +: 8] = b_wdata[8*k +: 8];
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
