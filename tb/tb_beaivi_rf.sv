// Unit test of the register file: random writes and dual reads against a
// reference array, register 0 reading zero, write visible from the next cycle.
module tb_beaivi_rf;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] raddr0, raddr1, waddr;
  logic [31:0] rdata0, rdata1, wdata;
  logic we;
  logic [31:0] refr [32];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  beaivi_rf dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    we = 0; waddr = 0; wdata = 0; raddr0 = 0; raddr1 = 0;
    for (int i = 0; i < 32; i++) refr[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      raddr0 = 5'($urandom); raddr1 = 5'($urandom);
      #1;
      checks += 2;
      if (rdata0 !== refr[raddr0] || rdata1 !== refr[raddr1]) begin
        failures++; $display("FAIL read %0d/%0d", raddr0, raddr1);
      end
      we = $urandom % 2; waddr = 5'($urandom); wdata = $urandom;
      if (i % 9 == 0) waddr = 0;
      if (we && waddr != 0) refr[waddr] = wdata;
      @(posedge clk); #1 we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
