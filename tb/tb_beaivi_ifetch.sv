// Unit test of instruction fetch: random stalls, redirects, mode switches
// and flushes are applied and the fetch address, the decode-stage pc/valid/
// mode and the mode register are compared every cycle with a reference model
// of the program counter.
module tb_beaivi_ifetch;
  localparam int IAW = 13;
  logic clk = 1'b0, rst_n = 1'b0;
  logic stall, redirect, set_mode, mode_tta, flush;
  logic [31:0] target, d_pc;
  logic [IAW-1:0] imem_addr;
  logic d_valid, d_rv, rv_mode;
  logic [31:0] m_pc, m_dpc;
  logic m_mode, m_dv, m_drv;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  beaivi_ifetch #(.RESET_PC(32'h40)) dut (.*);
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    stall = 0; redirect = 0; set_mode = 0; mode_tta = 0; flush = 0; target = '0;
    repeat (2) @(negedge clk);
    chk(rv_mode && !d_valid && d_pc == 32'h40 && imem_addr == IAW'(32'h40 >> 3), "reset state");
    rst_n = 1;
    m_pc = 32'h40; m_dpc = 32'h40; m_mode = 1; m_dv = 0; m_drv = 1;
    // one free-running edge happens before the first stimulus
    m_dpc = m_pc; m_dv = 1; m_pc = m_pc + 4;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      stall    = ($urandom_range(0, 3) == 0);
      redirect = ($urandom_range(0, 7) == 0);
      set_mode = redirect && $urandom_range(0, 1);
      mode_tta = $urandom_range(0, 1);
      flush    = redirect && $urandom_range(0, 1);
      target   = {$urandom_range(0, 16'hFFFF), 2'b00} & 32'h0000_FFFC;
      #1;
      chk(imem_addr == (stall ? m_dpc[IAW+2:3] : m_pc[IAW+2:3]), "fetch address");
      @(posedge clk);
      if (!stall) begin m_dpc = m_pc; m_drv = m_mode; m_dv = !flush; end
      if (redirect) begin
        m_pc = target;
        if (set_mode) m_mode = !mode_tta;
      end else if (!stall) m_pc = m_pc + (m_mode ? 32'd4 : 32'd8);
      #1;
      chk(d_pc == m_dpc && d_valid == m_dv && d_rv == m_drv && rv_mode == m_mode, $sformatf("decode state %h/%h %b%b %b%b %b%b", d_pc, m_dpc, d_valid, m_dv, d_rv, m_drv, rv_mode, m_mode));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
