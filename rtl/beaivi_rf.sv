// General-purpose register file: 32 x 32 bits, two read ports, one write port.
//
// Shared by both instruction-set modes; register 0 always reads as zero so the
// RISC-V mode sees its hard-wired x0. Reads are combinational, the write takes
// effect at the clock edge, so a value written in one cycle is read by moves
// of the next. The port count follows the document; the rest is the usual
// RISC-V register file.
module beaivi_rf #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned W     = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] raddr0,
  output logic [W-1:0]             rdata0,
  input  logic [$clog2(NREGS)-1:0] raddr1,
  output logic [W-1:0]             rdata1,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] waddr,
  input  logic [W-1:0]             wdata
);
  logic [NREGS-1:0][W-1:0] regs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) regs <= '0;
    else if (we && waddr != 0) regs[waddr] <= wdata;
  end

  assign rdata0 = (raddr0 == 0) ? '0 : regs[raddr0];
  assign rdata1 = (raddr1 == 0) ? '0 : regs[raddr1];
endmodule
