// Unit test of the boolean registers: independent writes of b0 and b1 and
// their values after each clock edge.
module tb_beaivi_brf;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] we, wdata, b, refb;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  beaivi_brf dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    we = 0; wdata = 0; refb = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      checks++;
      if (b !== refb) begin failures++; $display("FAIL %b %b", b, refb); end
      we = 2'($urandom); wdata = 2'($urandom);
      for (int k = 0; k < 2; k++) if (we[k]) refb[k] = wdata[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
