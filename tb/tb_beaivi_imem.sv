// Unit test of the instruction scratchpad: random host writes through port
// B, then reads through both ports compared with a reference array; read
// data must appear one cycle after the address.
module tb_beaivi_imem;
  localparam int WORDS = 8192;
  localparam int AW = 13;
  logic clk = 1'b0;
  logic [AW-1:0] a_addr, b_addr;
  logic [63:0] a_rdata, b_rdata, b_wdata;
  logic b_req, b_we;
  logic [63:0] ref_mem [WORDS];
  bit written [WORDS];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  beaivi_imem dut (.*);
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    b_req = 0; b_we = 0; a_addr = '0; b_addr = '0; b_wdata = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      b_req = 1; b_we = 1; b_addr = AW'($urandom); b_wdata = {$urandom, $urandom};
      ref_mem[b_addr] = b_wdata; written[b_addr] = 1;
    end
    @(negedge clk); b_we = 0; b_req = 0;
    for (int i = 0; i < 3000; i++) begin
      automatic logic [AW-1:0] x = AW'($urandom), y = AW'($urandom);
      @(negedge clk);
      a_addr = x; b_addr = y; b_req = 1;
      @(posedge clk); #1;
      if (written[x]) begin checks++; if (a_rdata !== ref_mem[x]) begin failures++; $display("FAIL port A %h", x); end end
      if (written[y]) begin checks++; if (b_rdata !== ref_mem[y]) begin failures++; $display("FAIL port B %h", y); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
