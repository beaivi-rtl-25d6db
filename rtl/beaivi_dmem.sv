// Data scratchpad: 64 kB as 16384 words of 32 bits with byte enables and
// two synchronous ports, port A for the load-store unit and port B for the
// host. Read data appears one cycle after the request; a write through one
// port and a read of the same word through the other in the same cycle return
// the old data. The size follows the document; the host port stands for its
// external access interface.
module beaivi_dmem #(
  parameter int unsigned WORDS = 16384,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          a_req,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [3:0]    a_be,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  input  logic          b_req,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [3:0]    b_be,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_req) begin
      for (int i = 0; i < 4; i++)
        if (a_we && a_be[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
      a_rdata <= mem[a_addr];
    end
    if (b_req) begin
      for (int i = 0; i < 4; i++)
        if (b_we && b_be[i]) mem[b_addr][8*i +: 8] <= b_wdata[8*i +: 8];
      b_rdata <= mem[b_addr];
    end
  end
endmodule
