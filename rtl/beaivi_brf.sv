// Boolean register file: two one-bit predicate registers b0 and b1.
//
// A move to b0 or b1 stores bit 0 of the transported value. The registers are
// readable as move sources (as 0/1) and feed the guard logic that makes a move
// conditional (guard codes: always, b0, !b0, b1). The unit and its predicate
// connection to decode are drawn in the document's block diagram; the count
// of two registers and the guard codes are this design's choice.
module beaivi_brf (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] we,
  input  logic [1:0] wdata,
  output logic [1:0] b
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) b <= '0;
    else for (int i = 0; i < 2; i++) if (we[i]) b[i] <= wdata[i];
  end
endmodule
