// Instruction scratchpad: 64 kB as 8192 words of 64 bits (the instruction
// word width), with two synchronous ports. Port A serves instruction fetch
// (read only); port B is the host port through which a program is loaded and
// read back. Read data appears one cycle after the address. The size follows
// the document; the second port stands for its external program-load
// interface.
module beaivi_imem #(
  parameter int unsigned WORDS = 8192,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  output logic [63:0]   a_rdata,
  input  logic          b_req,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [63:0]   b_wdata,
  output logic [63:0]   b_rdata
);
  logic [63:0] mem [WORDS];

  always_ff @(posedge clk) begin
    a_rdata <= mem[a_addr];
    if (b_req) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end
endmodule
