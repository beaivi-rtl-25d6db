// Instruction fetch: program counter, instruction-memory address and the
// instruction-set mode register.
//
// The instruction memory is read synchronously, so the word addressed in one
// cycle is in decode in the next. Exposed-datapath code advances the program
// counter by one 64-bit word (8 bytes); RISC-V code by one 32-bit instruction
// (4 bytes), two of which share a fetched word (decode picks the half with
// address bit 2). When decode must keep its word (a compressed bundle being
// expanded, or a RISC-V multi-cycle stall) the program counter is held and
// the word in decode is read again. A redirect from the control unit loads
// the target and, for a mode-switch instruction, the new mode. Each word in
// decode carries the mode it was fetched in. On a flush (taken RISC-V
// transfer) the word being fetched is marked invalid. Reset starts RISC-V
// code at RESET_PC. The document gives the fetch block and the halting of
// the program counter for bundles; the rest is this design's choice.
module beaivi_ifetch #(
  parameter logic [31:0] RESET_PC = 32'h0,
  parameter int unsigned IAW      = 13    // word address bits of the IMEM
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           stall,
  input  logic           redirect,
  input  logic [31:0]    target,
  input  logic           set_mode,
  input  logic           mode_tta,
  input  logic           flush,
  output logic [IAW-1:0] imem_addr,
  output logic           d_valid,
  output logic [31:0]    d_pc,
  output logic           d_rv,
  output logic           rv_mode      // current fetch mode
);
  logic [31:0] pc_q;

  assign imem_addr = stall ? d_pc[IAW+2:3] : pc_q[IAW+2:3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q    <= RESET_PC;
      rv_mode <= 1'b1;
      d_valid <= 1'b0;
      d_pc    <= RESET_PC;
      d_rv    <= 1'b1;
    end else begin
      if (!stall) begin
        d_pc    <= pc_q;
        d_rv    <= rv_mode;
        d_valid <= !flush;
      end
      if (redirect) begin
        pc_q <= target;
        if (set_mode) rv_mode <= !mode_tta;
      end else if (!stall) begin
        pc_q <= pc_q + (rv_mode ? 32'd4 : 32'd8);
      end
    end
  end
endmodule
