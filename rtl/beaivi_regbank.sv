// Flip-flop register bank used for test and debug: a small memory built
// from registers instead of an SRAM macro, so that short kernels can run with
// the scratchpad SRAMs idle.
//
// Two synchronous ports with the same timing as the scratchpads: port A
// (core side, read/write with byte enables) and port B (host side). Read
// data appears one cycle after the request; a write and a read of the same
// word in one cycle return the old data; if both ports write the same byte,
// port A wins. The contents are cleared by reset,
// unlike an SRAM. Data width and depth are parameters: the subsystem uses
// 16 x 64 bit (128 bytes) for instructions and 128 x 32 bit (512 bytes) for
// data, the sizes the document gives; the port structure and the reset are
// this design's choice.
module beaivi_regbank #(
  parameter int unsigned W     = 32,
  parameter int unsigned WORDS = 128,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           a_req,
  input  logic           a_we,
  input  logic [AW-1:0]  a_addr,
  input  logic [W/8-1:0] a_be,
  input  logic [W-1:0]   a_wdata,
  output logic [W-1:0]   a_rdata,
  input  logic           b_req,
  input  logic           b_we,
  input  logic [AW-1:0]  b_addr,
  input  logic [W/8-1:0] b_be,
  input  logic [W-1:0]   b_wdata,
  output logic [W-1:0]   b_rdata
);
  logic [WORDS-1:0][W-1:0] regs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs    <= '0;
      a_rdata <= '0;
      b_rdata <= '0;
    end else begin
      if (a_req) a_rdata <= regs[a_addr];
      if (b_req) b_rdata <= regs[b_addr];
      for (int i = 0; i < W / 8; i++) begin
        // port A is assigned last, so it wins on a byte both ports write
        if (b_req && b_we && b_be[i]) regs[b_addr][8*i +: 8] <= b_wdata[8*i +: 8];
        if (a_req && a_we && a_be[i]) regs[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
      end
    end
  end
endmodule
